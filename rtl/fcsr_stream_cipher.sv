// fcsr_stream_cipher - synchronous stream cipher built from eight FCSRs and a Boolean combiner.
//
// The FCSR bank produces eight pseudo-random bit streams; keygen combines the eight current bits
// with the balanced Boolean function f_d into one keystream bit per cycle and packs eight bits
// into a keystream byte; xor_cipher XORs each keystream byte with one data byte. The same
// circuit decrypts, given the same seeds. All of this structure follows the document.
//
// A session begins with reset (seeds fcsr_pkg::DEFAULT_C) or with 'start' (seeds c[0..7]). Each
// FCSR then computes its initial cells and memory from its seed by the document's procedure,
// which takes as many cycles as it has cells; keystream generation begins when the 127-cell FCSR3
// is done ('ready'). c_bad flags a seed that is 0, not below q or a multiple of p; the seed
// source should then supply another one and pulse 'start' again. The seed ports, the reset seeds,
// the c_bad flags and the back-pressure on the keystream are this design's choices.
//
// Ports:  key/key_valid   keystream bit and the cycle it is used
//         ks_byte/ks_valid keystream byte waiting for data (observation only)
//         pt_*            input data bytes (valid/ready)
//         ct_*            output data bytes (valid/ready)
// Timing: ready 127 cycles after start or reset; afterwards one keystream bit per cycle and,
// with data always present, one output byte every 8 cycles.
module fcsr_stream_cipher
  import fcsr_pkg::*;
(
    input  logic                clk,
    input  logic                reset,
    input  logic                start,
    input  wide_t               c        [NUM_FCSR],
    output logic [NUM_FCSR-1:0] c_bad,
    output logic                ready,
    output logic                key,
    output logic                key_valid,
    output logic [7:0]          ks_byte,
    output logic                ks_valid,
    input  logic                pt_valid,
    output logic                pt_ready,
    input  logic [7:0]          pt_data,
    output logic                ct_valid,
    input  logic                ct_ready,
    output logic [7:0]          ct_data
);

  logic [NUM_FCSR-1:0] out_bits;
  logic                step;
  logic                ks_ready;

  fcsr_bank u_bank (
      .clk     (clk),
      .reset   (reset),
      .start   (start),
      .c       (c),
      .step    (step),
      .out_bits(out_bits),
      .ready   (ready),
      .c_bad   (c_bad)
  );

  keygen u_keygen (
      .clk      (clk),
      .reset    (reset),
      .start    (start),
      .run      (ready),
      .out_bits (out_bits),
      .step     (step),
      .key      (key),
      .key_valid(key_valid),
      .ks_valid (ks_valid),
      .ks_ready (ks_ready),
      .ks_byte  (ks_byte)
  );

  xor_cipher u_xor (
      .clk      (clk),
      .reset    (reset),
      .in_valid (pt_valid),
      .in_ready (pt_ready),
      .in_data  (pt_data),
      .ks_valid (ks_valid),
      .ks_ready (ks_ready),
      .ks_byte  (ks_byte),
      .out_valid(ct_valid),
      .out_ready(ct_ready),
      .out_data (ct_data)
  );

endmodule
