// keygen - keystream bit and byte generation from the eight FCSR output bits.
//
// Once the FCSR bank reports 'run' (all registers initialised), every cycle in which the byte
// buffer can accept a bit the combining function f_d is applied to the eight current FCSR output
// bits, the result enters the byte buffer, and 'step' clocks all FCSRs once so that the next
// eight output bits appear. This is the document's loop "clock each FCSR once, apply f_d, fill
// the buffer, output a byte when it is full". When a finished byte is waiting and not taken,
// 'step' stays low and the FCSRs hold their state, so no keystream bit is lost (this stall is
// this design's choice; the document's generator runs freely). 'start' empties the byte buffer
// for a new session.
//
// Ports:  out_bits   FCSR output bits, bit i from FCSR i+1
//         run        FCSR bank initialised
//         step       advance the FCSRs this cycle
//         key        current keystream bit f_d(out_bits); key_valid when it is consumed
//         ks_*       keystream byte stream, valid/ready
// Timing: one keystream bit per cycle while not stalled; a byte 8 cycles after its first bit.
module keygen
  import fcsr_pkg::*;
(
    input  logic                clk,
    input  logic                reset,
    input  logic                start,
    input  logic                run,
    input  logic [NUM_FCSR-1:0] out_bits,
    output logic                step,
    output logic                key,
    output logic                key_valid,
    output logic                ks_valid,
    input  logic                ks_ready,
    output logic [7:0]          ks_byte
);

  logic bit_ready;

  bool_fd u_fd (.x(out_bits), .y(key));

  ks_buffer u_buf (
      .clk       (clk),
      .reset     (reset || start),
      .bit_valid (run && !start),
      .bit_ready (bit_ready),
      .bit_in    (key),
      .byte_valid(ks_valid),
      .byte_ready(ks_ready),
      .byte_out  (ks_byte)
  );

  assign step      = run && !start && bit_ready;
  assign key_valid = step;

endmodule
