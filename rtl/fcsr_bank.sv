// fcsr_bank - the eight FCSRs of the key generator, seeded and stepped together.
//
// FCSR i (i = 1..8) has the document's p_i and e_i (fcsr_pkg::FCSR_P/FCSR_E), giving register
// lengths 31, 37, 127, 107, 55, 70, 83 and 100 cells and ell-sequence periods q_i(p_i-1)/p_i.
// All eight take their seeds in the same cycle ('start' with one c per register, or reset with
// fcsr_pkg::DEFAULT_C) and each initialises for as many cycles as it has cells. 'ready' rises
// when the longest, FCSR3 with 127 cells, has finished; only then does 'step' advance them, all
// together, so their output streams stay aligned.
//
// Ports:  c[i]       seed of FCSR i+1, sampled with start
//         step       advance every register one step (ignored until ready)
//         out_bits   bit i is the output cell of FCSR i+1
//         ready      all registers initialised
//         c_bad      bit i flags an unusable seed for FCSR i+1
// Timing: ready rises 127 cycles after start or after reset is released.
module fcsr_bank
  import fcsr_pkg::*;
(
    input  logic                clk,
    input  logic                reset,
    input  logic                start,
    input  wide_t               c        [NUM_FCSR],
    input  logic                step,
    output logic [NUM_FCSR-1:0] out_bits,
    output logic                ready,
    output logic [NUM_FCSR-1:0] c_bad
);

  logic [NUM_FCSR-1:0] fcsr_ready;

  for (genvar i = 0; i < NUM_FCSR; i++) begin : g_fcsr
    fcsr #(
        .P      (FCSR_P[i]),
        .E      (FCSR_E[i]),
        .C_RESET(DEFAULT_C[i])
    ) u_fcsr (
        .clk    (clk),
        .reset  (reset),
        .start  (start),
        .c      (c[i]),
        .step   (step && ready),
        .out_bit(out_bits[i]),
        .ready  (fcsr_ready[i]),
        .c_bad  (c_bad[i])
    );
  end

  assign ready = &fcsr_ready;

endmodule
