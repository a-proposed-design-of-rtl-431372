// fcsr - one Fibonacci feedback-with-carry shift register (FCSR) that loads its own initial state.
//
// The register holds r cells a_{r-1} .. a_0 and a carry memory m. One step forms the sum
// sigma = m + sum_{k=1..r} q_k * a_{r-k} over the tapped cells, shifts the register one place
// towards the output cell a_0 (whose bit is the output), writes sigma mod 2 into the freed cell
// a_{r-1} and keeps sigma div 2 as the new memory. q = P**E is the connection integer and the
// taps q_k are the bits of q+1; r = floor(log2(q+1)). All of this follows the document.
//
// Initialisation follows the document's initial-state procedure: for i = 1..r,
// a(i) = (sum_{k<i} q_{i-k} a(k) + m) mod 2 and m = (that sum) div 2, starting from m = c. That
// is exactly r ordinary steps of this register started from all-zero cells and memory c, so the
// same datapath performs it: 'start' clears the cells, loads c into the memory and the register
// then steps by itself for r cycles. The bits then leaving the register are the 2-adic expansion
// of -c/q, beginning with c mod 2. Because the memory must hold c during initialisation it is r+1
// bits wide, although in normal running it stays below the number of taps plus one.
//
// Reset (synchronous, active high) starts the same initialisation with the parameter C_RESET, so
// the register also runs from reset alone; start/c reseed it for a new session. Both the reset
// seed and the start/c interface are this design's choices.
//
// Ports:  start    one-cycle request to initialise from c
//         c        seed, sampled in the cycle start is high
//         step     advance one step (ignored until ready)
//         out_bit  output cell a_0: the bit that the next step shifts out
//         ready    initialisation finished; stays high until the next start or reset
//         c_bad    the last seed was 0, not below q, or a multiple of p
// Timing: ready rises r cycles after start (or after reset is released); out_bit changes one
// cycle after each accepted step.
module fcsr
  import fcsr_pkg::*;
#(
    parameter int unsigned P       = 11,
    parameter int unsigned E       = 9,
    parameter wide_t       C_RESET = 128'h52e6b439
) (
    input  logic  clk,
    input  logic  reset,
    input  logic  start,
    input  wide_t c,
    input  logic  step,
    output logic  out_bit,
    output logic  ready,
    output logic  c_bad
);

  localparam wide_t       Q    = conn_int(P, E);
  localparam int unsigned R    = reg_len(Q);
  localparam wide_t       TAPS = tap_mask(Q, R);
  localparam int unsigned MW   = R + 1;             // memory width
  localparam int unsigned SW   = R + 2;             // sum width
  localparam int unsigned CNTW = $clog2(R);

  logic [R-1:0]    cells;
  logic [MW-1:0]   mem;
  logic [SW-1:0]   sigma;
  logic [CNTW-1:0] init_cnt;
  logic            init_busy;
  logic            advance;
  logic            c_ok;
  logic            c_reset_ok;

  fcsr_c_check #(.P(P), .E(E)) u_check (.c(c), .ok(c_ok));
  fcsr_c_check #(.P(P), .E(E)) u_check_reset (.c(C_RESET), .ok(c_reset_ok));

  // Sum of the tapped cells plus the memory.
  always_comb begin
    sigma = SW'(mem);
    for (int unsigned j = 0; j < R; j++)
      if (TAPS[j]) sigma = sigma + SW'(cells[j]);
  end

  assign advance = init_busy || (ready && step);
  assign out_bit = cells[0];

  always_ff @(posedge clk) begin
    if (reset || start) begin
      cells     <= '0;
      mem       <= reset ? C_RESET[MW-1:0] : c[MW-1:0];
      c_bad     <= reset ? !c_reset_ok : !c_ok;
      init_busy <= 1'b1;
      init_cnt  <= '0;
      ready     <= 1'b0;
    end else begin
      if (advance) begin
        cells <= {sigma[0], cells[R-1:1]};
        mem   <= sigma[SW-1:1];
      end
      if (init_busy) begin
        init_cnt <= init_cnt + 1'b1;
        if (init_cnt == CNTW'(R - 1)) begin
          init_busy <= 1'b0;
          ready     <= 1'b1;
        end
      end
    end
  end

  // The register is never reported ready while it is still initialising.
  a_ready : assert property (@(posedge clk) disable iff (reset) !(ready && init_busy));

endmodule
