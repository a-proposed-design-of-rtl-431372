// tb_keystream_stats - statistical workload: the five basic randomness tests on keystream samples.
//
// The cipher is run with an all-zero plaintext, so its keystream bits (key while key_valid) are
// collected directly. NUM_SAMPLES samples of SAMPLE_BITS bits are produced, sample 0 from the
// built-in reset seeds and the rest from seeds derived deterministically from them, each with a
// new session. Five statistics are computed on every sample: frequency (chi-square, 1 degree of
// freedom), serial (2 d.o.f.), poker with 8-bit blocks (255 d.o.f.), runs up to length 14
// (26 d.o.f.) and autocorrelation at shift 8 (standard normal). A sample passes a test at
// significance 0.05 or 0.01 when its statistic is below the chi-square or normal bound for that
// level. Since an ideal source fails a test at level a with probability a, the check is that each
// test is passed by at least 88% of the samples at 0.05 and 93% at 0.01 (the runs statistic is
// only approximately chi-square, which costs it a few samples in the tail). The first
// 4000 bits of every sample are also compared with the reference keystream model, and the
// ciphertext bytes with the collected keystream bits.
module tb_keystream_stats;
  import tb_ref_pkg::*;
  import fcsr_pkg::wide_t;

  localparam int NUM_SAMPLES = 100;
  localparam int SAMPLE_BITS = 500_000;
  localparam int RUNS_K      = 14;
  localparam int AC_D        = 8;

  // Chi-square bounds for 1, 2, 255 and 26 degrees of freedom, and the normal bound.
  localparam real FREQ_05 = 3.8415, FREQ_01 = 6.6349;
  localparam real SER_05  = 5.9915, SER_01  = 9.2103;
  localparam real POK_05  = 293.2478, POK_01 = 310.4574;
  localparam real RUN_05  = 38.8851, RUN_01 = 45.6417;
  localparam real AC_05   = 1.9600, AC_01   = 2.5758;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       reset, start, ready, key, key_valid, ks_valid, pt_ready, ct_valid;
  wide_t      c [8];
  logic [7:0] c_bad, ks_byte, ct_data;

  fcsr_stream_cipher dut (
      .clk, .reset, .start, .c, .c_bad, .ready, .key, .key_valid, .ks_byte, .ks_valid,
      .pt_valid(1'b1), .pt_ready, .pt_data(8'h00), .ct_valid, .ct_ready(1'b1), .ct_data);

  // Running statistics of the current sample.
  int          nbits, n1, pair [4], poker [256], blocks [RUNS_K+1], gaps [RUNS_K+1];
  int          run_len, ac_sum, model_errs, byte_errs;
  logic        prev_bit, run_bit;
  logic [7:0]  nib, hist;
  logic [7:0]  byte_q[$];
  logic [7:0]  cur_byte;
  twoadic_t    model [8];
  int          pass05 [5], pass01 [5];
  bit          collecting;

  task automatic clear_stats();
    nbits = 0; n1 = 0; run_len = 0; ac_sum = 0; model_errs = 0; byte_errs = 0;
    foreach (pair[i]) pair[i] = 0;
    foreach (poker[i]) poker[i] = 0;
    foreach (blocks[i]) begin
      blocks[i] = 0;
      gaps[i]   = 0;
    end
    hist = '0;
    byte_q.delete();
  endtask

  task automatic end_run();
    if (run_len >= 1 && run_len <= RUNS_K) begin
      if (run_bit) blocks[run_len]++;
      else gaps[run_len]++;
    end
  endtask

  always @(posedge clk) begin
    if (collecting && key_valid && nbits < SAMPLE_BITS) begin
      logic b;
      b = key;
      if (nbits < 4000) begin
        logic [7:0] bits;
        for (int i = 0; i < 8; i++) bits[i] = model[i].next();
        if (b !== fd_ref(fd_index(bits))) model_errs++;
      end
      n1 += int'(b);
      if (nbits > 0) pair[{prev_bit, b}]++;
      nib = {nib[6:0], b};
      if (nbits % 8 == 7) begin
        poker[nib]++;
        byte_q.push_back(nib);
      end
      if (nbits == 0 || b != run_bit) begin
        if (nbits > 0) end_run();
        run_bit = b;
        run_len = 1;
      end else run_len++;
      if (nbits >= AC_D) ac_sum += int'(b ^ hist[AC_D-1]);
      hist = {hist[6:0], b};
      prev_bit = b;
      nbits++;
    end
    if (collecting && ct_valid && byte_q.size() > 0) begin
      cur_byte = byte_q.pop_front();
      if (ct_data !== cur_byte) byte_errs++;
    end
  end

  task automatic evaluate(input int s);
    real n, x1, x2, x3, x4, x5, e;
    real stat [5];
    int  kblk;
    n  = real'(nbits);
    x1 = (real'(nbits - n1) - real'(n1)) ** 2 / n;
    x2 = 4.0 / (n - 1.0) * (real'(pair[0]) ** 2 + real'(pair[1]) ** 2 + real'(pair[2]) ** 2 +
                            real'(pair[3]) ** 2)
         - 2.0 / n * (real'(nbits - n1) ** 2 + real'(n1) ** 2) + 1.0;
    kblk = nbits / 8;
    x3 = 0.0;
    for (int i = 0; i < 256; i++) x3 += real'(poker[i]) ** 2;
    x3 = 256.0 / real'(kblk) * x3 - real'(kblk);
    x4 = 0.0;
    for (int i = 1; i <= RUNS_K; i++) begin
      e  = (n - real'(i) + 3.0) / (2.0 ** (i + 2));
      x4 += (real'(blocks[i]) - e) ** 2 / e + (real'(gaps[i]) - e) ** 2 / e;
    end
    x5 = 2.0 * (real'(ac_sum) - (n - AC_D) / 2.0) / $sqrt(n - AC_D);
    if (x5 < 0.0) x5 = -x5;
    stat = '{x1, x2, x3, x4, x5};
    for (int t = 0; t < 5; t++) begin
      real b05, b01;
      b05 = (t == 0) ? FREQ_05 : (t == 1) ? SER_05 : (t == 2) ? POK_05 : (t == 3) ? RUN_05 : AC_05;
      b01 = (t == 0) ? FREQ_01 : (t == 1) ? SER_01 : (t == 2) ? POK_01 : (t == 3) ? RUN_01 : AC_01;
      if (stat[t] < b05) pass05[t]++;
      if (stat[t] < b01) pass01[t]++;
      if (!(stat[t] < b05))
        $display("sample %0d: test %0d statistic %f above the 0.05 bound %f", s, t, stat[t], b05);
    end
    checks += 2;
    if (model_errs != 0) begin
      failures++;
      $display("FAIL: sample %0d: %0d keystream bits differ from the model", s, model_errs);
    end
    if (byte_errs != 0) begin
      failures++;
      $display("FAIL: sample %0d: %0d ciphertext bytes differ from the keystream", s, byte_errs);
    end
  endtask

  initial begin
    repeat (NUM_SAMPLES * (SAMPLE_BITS + 200) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    collecting = 0;
    foreach (pass05[i]) begin
      pass05[i] = 0;
      pass01[i] = 0;
    end
    reset = 1; start = 0;
    for (int i = 0; i < 8; i++) c[i] = fcsr_pkg::DEFAULT_C[i];
    for (int s = 0; s < NUM_SAMPLES; s++) begin
      if (s == 0) begin
        @(posedge clk);
        #1 reset = 0;
      end else begin
        // Next seeds: (previous * 5 + sample number) mod q, moved up until coprime to p.
        for (int i = 0; i < 8; i++) begin
          logic [131:0] v;
          v = ({4'b0, c[i]} * 132'd5 + 132'(s)) % {4'b0, REF_Q[i]};
          while (v == 0 || mod_serial(v[127:0], REF_P[i]) == 0) v = v + 1;
          c[i] = v[127:0];
        end
        start = 1;
        @(posedge clk);
        #1 start = 0;
      end
      clear_stats();
      for (int i = 0; i < 8; i++) model[i] = new(c[i], REF_Q[i]);
      collecting = 1;
      while (nbits < SAMPLE_BITS) @(posedge clk);
      #1;
      collecting = 0;
      end_run();
      evaluate(s);
    end
    $display("samples=%0d bits=%0d  passed at 0.05: freq=%0d serial=%0d poker=%0d runs=%0d autocorr=%0d",
             NUM_SAMPLES, SAMPLE_BITS, pass05[0], pass05[1], pass05[2], pass05[3], pass05[4]);
    $display("                         passed at 0.01: freq=%0d serial=%0d poker=%0d runs=%0d autocorr=%0d",
             pass01[0], pass01[1], pass01[2], pass01[3], pass01[4]);
    // A truly random source passes each test at level a with probability 1-a; allow for that.
    for (int t = 0; t < 5; t++) begin
      checks += 2;
      if (pass05[t] * 100 < NUM_SAMPLES * 88) begin
        failures++;
        $display("FAIL: test %0d passed by only %0d of %0d samples at 0.05", t, pass05[t], NUM_SAMPLES);
      end
      if (pass01[t] * 100 < NUM_SAMPLES * 93) begin
        failures++;
        $display("FAIL: test %0d passed by only %0d of %0d samples at 0.01", t, pass01[t], NUM_SAMPLES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
