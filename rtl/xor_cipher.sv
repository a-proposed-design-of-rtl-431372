// xor_cipher - combines keystream bytes with data bytes.
//
// Each data byte is XORed with the next keystream byte, as the document describes for both
// encryption (plaintext in, ciphertext out) and decryption (ciphertext in, plaintext out). A
// data byte and a keystream byte are consumed together when both are valid and the output
// register is free or being emptied; the result is registered. The valid/ready handshakes and
// the output register are this design's choices.
//
// Ports:  in_*   data bytes;  ks_*  keystream bytes;  out_*  result bytes (all valid/ready)
// Timing: one byte per cycle at most; out_valid rises one cycle after the bytes are consumed.
module xor_cipher (
    input  logic       clk,
    input  logic       reset,
    input  logic       in_valid,
    output logic       in_ready,
    input  logic [7:0] in_data,
    input  logic       ks_valid,
    output logic       ks_ready,
    input  logic [7:0] ks_byte,
    output logic       out_valid,
    input  logic       out_ready,
    output logic [7:0] out_data
);

  logic fire;

  assign fire     = in_valid && ks_valid && (!out_valid || out_ready);
  assign in_ready = fire;
  assign ks_ready = fire;

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (fire) begin
      out_valid <= 1'b1;
      out_data  <= in_data ^ ks_byte;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // Handshake rule: an offered result stays offered, unchanged, until it is taken.
  a_out_held : assert property (@(posedge clk) disable iff (reset)
      out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
