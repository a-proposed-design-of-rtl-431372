// bool_fd - the 8-input combining Boolean function f_d.
//
// f_d is balanced (128 ones in 256 entries) and highly nonlinear; its truth table is the
// document's and is held in fcsr_pkg::FD_TABLE. The function is a pure lookup: the eight inputs
// form an index and the table bit at that index is the output. The document does not state
// which input is the most significant index bit nor which end of the printed table is entry 0;
// here FCSR1's bit is the most significant index bit and entry 0 is the leftmost printed bit.
//
// Ports:  x  bit i is the output of FCSR i+1
//         y  f_d(x), combinational
module bool_fd
  import fcsr_pkg::*;
(
    input  logic [NUM_FCSR-1:0] x,
    output logic                y
);

  logic [7:0] index;

  always_comb begin
    // FCSR1 (x[0]) is the most significant index bit.
    for (int i = 0; i < 8; i++) index[7-i] = x[i];
    y = FD_TABLE[8'd255 - index];
  end

endmodule
