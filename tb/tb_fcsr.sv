// tb_fcsr - self-checking testbench for one FCSR.
//
// Three instances are checked: FCSR1 (p=11, e=9, 31 cells), FCSR3 (p=19, e=30, 127 cells) and
// FCSR8 (p=61, e=17, 100 cells). The reference output is the 2-adic expansion of -c/q,
// computed here bit by bit with wide signed arithmetic (x starts at -c; each bit is x mod 2 and
// x becomes (x - bit*q)/2), with q written out as a literal. For each instance the testbench
// checks that ready rises exactly r cycles after reset and after start, that the first 600
// output bits match the reference while 'step' is driven at random, and the c_bad flag for
// good seeds, for 0, for q and for a multiple of p. Two small instances (q = 11^2 and q = 3^5)
// are run for several periods to check that the output repeats with period q(p-1)/p and is
// balanced over one period, as an ell-sequence must be.
module tb_fcsr;
  import fcsr_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam wide_t Q1 = 128'h8c8b6d2b;
  localparam wide_t Q3 = 128'had62418d14ea824701c4b4886cc66f59;
  localparam wide_t Q8 = 128'h1c4bd19b59c28ba9c314f2ce7d;

  logic        reset;
  logic [2:0]  start;
  wide_t       c [3];
  logic [2:0]  step, out_bit, ready, c_bad;

  fcsr #(.P(11), .E(9),  .C_RESET(128'h52e6b439)) dut1 (
      .clk, .reset, .start(start[0]), .c(c[0]), .step(step[0]),
      .out_bit(out_bit[0]), .ready(ready[0]), .c_bad(c_bad[0]));
  fcsr #(.P(19), .E(30), .C_RESET(128'h128b2f330c5c7fd0a6a3a4506513270f)) dut3 (
      .clk, .reset, .start(start[1]), .c(c[1]), .step(step[1]),
      .out_bit(out_bit[1]), .ready(ready[1]), .c_bad(c_bad[1]));
  fcsr #(.P(61), .E(17), .C_RESET(128'h23d9c172411e20b8f6b0d549c)) dut8 (
      .clk, .reset, .start(start[2]), .c(c[2]), .step(step[2]),
      .out_bit(out_bit[2]), .ready(ready[2]), .c_bad(c_bad[2]));

  // Small instances whose full period can be simulated: q = 11^2 = 121 (period 110, 6 cells)
  // and q = 3^5 = 243 (period 162, 7 cells).
  logic       s_start, s_step;
  logic [1:0] s_out, s_ready, s_bad;
  wide_t      s_c;
  fcsr #(.P(11), .E(2), .C_RESET(128'd1)) dut_s1 (
      .clk, .reset, .start(s_start), .c(s_c), .step(s_step),
      .out_bit(s_out[0]), .ready(s_ready[0]), .c_bad(s_bad[0]));
  fcsr #(.P(3), .E(5), .C_RESET(128'd1)) dut_s2 (
      .clk, .reset, .start(s_start), .c(s_c), .step(s_step),
      .out_bit(s_out[1]), .ready(s_ready[1]), .c_bad(s_bad[1]));

  // Smallest period of a bit string, and its number of ones over that period.
  task automatic check_period(input bit seq[$], input int expect_per, input string name);
    int per = 0, ones = 0;
    for (int t = 1; t <= seq.size() / 2 && per == 0; t++) begin
      bit same = 1;
      for (int i = 0; i + t < seq.size(); i++) if (seq[i] != seq[i+t]) same = 0;
      if (same) per = t;
    end
    for (int i = 0; i < per; i++) ones += int'(seq[i]);
    check(per == expect_per, $sformatf("%s period %0d, expected %0d", name, per, expect_per));
    check(2 * ones == per, $sformatf("%s has %0d ones in a period of %0d", name, ones, per));
  endtask

  task automatic small_periods(input wide_t cval);
    bit seq1[$], seq2[$];
    s_c     = cval;
    s_start = 1;
    @(posedge clk);
    #1 s_start = 0;
    while (!(s_ready[0] && s_ready[1])) begin
      @(posedge clk);
      #1;
    end
    s_step = 1;
    for (int k = 0; k < 400; k++) begin
      seq1.push_back(s_out[0]);
      seq2.push_back(s_out[1]);
      @(posedge clk);
      #1;
    end
    s_step = 0;
    check(s_bad == 2'b00, "small seeds flagged bad");
    check_period(seq1, 110, "q=121");
    check_period(seq2, 162, "q=243");
  endtask

  function automatic wide_t qof(int i);
    return (i == 0) ? Q1 : (i == 1) ? Q3 : Q8;
  endfunction
  function automatic int rof(int i);
    return (i == 0) ? 31 : (i == 1) ? 127 : 100;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Wait for ready on instance i, counting cycles from the edge that took the seed.
  task automatic wait_ready(input int i);
    int n = 0;
    while (!ready[i] && n < 1000) begin
      @(posedge clk);
      #1;
      n++;
    end
    check(n == rof(i), $sformatf("fcsr%0d ready after %0d cycles, expected %0d", i, n, rof(i)));
  endtask

  // Compare nbits of output with the 2-adic expansion of -cval/q, stepping at random.
  task automatic run_stream(input int i, input wide_t cval, input int nbits);
    logic signed [CW+3:0] x, qs;
    logic                 b;
    int                   k = 0, errs = 0;
    x  = -$signed({4'b0, cval});
    qs = $signed({4'b0, qof(i)});
    while (k < nbits) begin
      step[i] = ($urandom_range(0, 3) != 0);
      #1;
      if (step[i]) begin
        b = x[0];
        if (out_bit[i] !== b) errs++;
        if (b) x = x - qs;
        x = x >>> 1;
        k++;
      end
      @(posedge clk);
      #1;
    end
    step[i] = 1'b0;
    check(errs == 0, $sformatf("fcsr%0d: %0d of %0d bits differ from -c/q", i, errs, nbits));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1;
    start = '0;
    step  = '0;
    s_start = 0;
    s_step  = 0;
    s_c     = '0;
    for (int i = 0; i < 3; i++) c[i] = '0;
    @(posedge clk);
    #1 reset = 1'b0;
    fork
      wait_ready(0);
      wait_ready(1);
      wait_ready(2);
    join
    check(c_bad == 3'b000, "reset seeds flagged bad");
    #1;
    run_stream(0, 128'h52e6b439, 600);
    run_stream(1, 128'h128b2f330c5c7fd0a6a3a4506513270f, 600);
    run_stream(2, 128'h23d9c172411e20b8f6b0d549c, 600);

    // New sessions with random seeds below q and coprime to p.
    for (int rep = 0; rep < 4; rep++) begin
      wide_t cv [3];
      int    pv [3] = '{11, 19, 61};
      for (int i = 0; i < 3; i++) begin
        do begin
          cv[i] = {$urandom, $urandom, $urandom, $urandom} % qof(i);
        end while (cv[i] == 0 || (cv[i] % pv[i]) == 0);
        c[i] = cv[i];
      end
      start = 3'b111;
      @(posedge clk);
      #1 start = '0;
      check(ready == 3'b000, "ready cleared by start");
      fork
        wait_ready(0);
        wait_ready(1);
        wait_ready(2);
      join
      check(c_bad == 3'b000, "good seeds flagged bad");
      #1;
      for (int i = 0; i < 3; i++) run_stream(i, cv[i], 300);
    end

    // Seeds that must be flagged: 0, q, and a multiple of p.
    c[0] = 128'd0;  c[1] = Q3;  c[2] = 128'd61 * 128'd1000003;
    start = 3'b111;
    @(posedge clk);
    #1 start = '0;
    check(c_bad == 3'b111, $sformatf("bad seeds flagged %b, expected 111", c_bad));
    c[0] = 128'd22;  c[1] = Q3 - 1;  c[2] = 128'd62;
    start = 3'b111;
    @(posedge clk);
    #1 start = '0;
    check(c_bad == 3'b001, $sformatf("seeds 22, q-1, 62 flagged %b, expected 001", c_bad));
    fork
      wait_ready(0);
      wait_ready(1);
      wait_ready(2);
    join

    // ell-sequences: period q(p-1)/p and balanced, for seeds coprime to p.
    small_periods(128'd1);
    small_periods(128'd100);
    small_periods(128'd50);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
