// ks_buffer - packs keystream bits into keystream bytes.
//
// Bits enter one per accepted cycle and shift into the byte from the least significant end, so
// the first of eight bits ends up as bit 7 (this bit order is this design's choice). When the
// eighth bit arrives the completed byte moves to the output register and the bit count starts
// again from zero, which is the document's "buffer full -> output keystream byte -> reset
// buffer" loop. The output register holds the byte with byte_valid until byte_ready takes it;
// while a byte waits and is not being taken, bit_ready is low and the bit source must stall.
// The valid/ready handshake is this design's choice.
//
// Ports:  bit_valid/bit_ready/bit_in     incoming keystream bits
//         byte_valid/byte_ready/byte_out outgoing keystream bytes
// Timing: with no back-pressure one byte every 8 accepted bits; byte_valid rises in the cycle
// after the eighth bit is accepted.
module ks_buffer (
    input  logic       clk,
    input  logic       reset,
    input  logic       bit_valid,
    output logic       bit_ready,
    input  logic       bit_in,
    output logic       byte_valid,
    input  logic       byte_ready,
    output logic [7:0] byte_out
);

  logic [6:0] shreg;
  logic [2:0] count;
  logic       accept;

  assign bit_ready = !byte_valid || byte_ready;
  assign accept    = bit_valid && bit_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg      <= '0;
      count      <= '0;
      byte_valid <= 1'b0;
      byte_out   <= '0;
    end else begin
      if (byte_valid && byte_ready) byte_valid <= 1'b0;
      if (accept) begin
        shreg <= {shreg[5:0], bit_in};
        count <= count + 3'd1;
        if (count == 3'd7) begin
          byte_out   <= {shreg, bit_in};
          byte_valid <= 1'b1;
        end
      end
    end
  end

  // Handshake rule: an offered byte stays offered, unchanged, until it is taken.
  a_byte_held : assert property (@(posedge clk) disable iff (reset)
      byte_valid && !byte_ready |=> byte_valid && $stable(byte_out));

endmodule
