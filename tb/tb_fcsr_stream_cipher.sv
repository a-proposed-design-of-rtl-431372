// tb_fcsr_stream_cipher - end-to-end test of the stream cipher at its full, default size.
//
// Two copies of the cipher are seeded alike: the first encrypts a random plaintext stream, its
// ciphertext feeds the second, which must return the plaintext. Every ciphertext byte is also
// compared with plaintext XOR a reference keystream built here from the 2-adic expansions of
// -c_i/q_i and the printed f_d table. Valid/ready on the plaintext and on the recovered text are
// random. Sessions: reset (built-in seeds), three starts with random seeds, one start with a bad
// seed (c_bad must rise) and a good start after it. A phase without stalls checks the timing:
// the first ciphertext byte 136 cycles after start (127 initialisation cycles, 8 keystream bits,
// 1 XOR register) and then one byte every 8 cycles. Each mechanism (reset and start
// initialisation, bad seed, keystream stall, plaintext waiting for keystream, ciphertext
// back-pressure) is counted and must occur.
module tb_fcsr_stream_cipher;
  import tb_ref_pkg::*;
  import fcsr_pkg::wide_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       reset, start;
  wide_t      c [8];
  logic [7:0] e_c_bad, d_c_bad;
  logic       e_ready, d_ready, e_key, d_key, e_key_valid, d_key_valid, e_ks_valid, d_ks_valid;
  logic [7:0] e_ks_byte, d_ks_byte;
  logic       pt_valid, pt_ready, mid_valid, mid_ready, rec_valid, rec_ready;
  logic [7:0] pt_data, mid_data, rec_data;

  fcsr_stream_cipher enc (
      .clk, .reset, .start, .c, .c_bad(e_c_bad), .ready(e_ready), .key(e_key),
      .key_valid(e_key_valid), .ks_byte(e_ks_byte), .ks_valid(e_ks_valid),
      .pt_valid(pt_valid), .pt_ready(pt_ready), .pt_data(pt_data),
      .ct_valid(mid_valid), .ct_ready(mid_ready), .ct_data(mid_data));

  fcsr_stream_cipher dec (
      .clk, .reset, .start, .c, .c_bad(d_c_bad), .ready(d_ready), .key(d_key),
      .key_valid(d_key_valid), .ks_byte(d_ks_byte), .ks_valid(d_ks_valid),
      .pt_valid(mid_valid), .pt_ready(mid_ready), .pt_data(mid_data),
      .ct_valid(rec_valid), .ct_ready(rec_ready), .ct_data(rec_data));

  twoadic_t   model [8];
  logic [7:0] ct_exp[$], pt_sent[$];
  int n_reset_init = 0, n_start_init = 0, n_bad_seed = 0, n_ks_stall = 0, n_pt_wait = 0,
      n_ct_backpressure = 0, n_bytes = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] model_byte();
    logic [7:0] b, bits;
    for (int k = 7; k >= 0; k--) begin
      for (int i = 0; i < 8; i++) bits[i] = model[i].next();
      b[k] = fd_ref(fd_index(bits));
    end
    return b;
  endfunction

  task automatic new_models();
    for (int i = 0; i < 8; i++) model[i] = new(c[i], REF_Q[i]);
  endtask

  // Monitors.
  always @(posedge clk) begin
    if (!reset && !start) begin
      if (pt_valid && pt_ready) begin
        ct_exp.push_back(pt_data ^ model_byte());
        pt_sent.push_back(pt_data);
      end
      if (mid_valid && mid_ready) begin
        logic [7:0] e;
        e = ct_exp.pop_front();
        check(mid_data == e, $sformatf("ciphertext %h expected %h", mid_data, e));
      end
      if (rec_valid && rec_ready) begin
        logic [7:0] e;
        e = pt_sent.pop_front();
        check(rec_data == e, $sformatf("recovered %h expected %h", rec_data, e));
        n_bytes++;
      end
      if (e_ks_valid && !pt_valid) n_ks_stall++;
      if (pt_valid && e_ready && !e_ks_valid) n_pt_wait++;
      if (rec_valid && !rec_ready) n_ct_backpressure++;
    end
  end

  task automatic wait_ready();
    int n = 0;
    while (!(e_ready && d_ready) && n < 1000) begin
      @(posedge clk);
      #1;
      n++;
    end
    check(n == 127, $sformatf("ready after %0d cycles, expected 127", n));
  endtask

  task automatic session_start();
    start = 1;
    @(posedge clk);
    #1 start = 0;
    new_models();
    n_start_init++;
    wait_ready();
  endtask

  task automatic traffic(input int cycles);
    for (int k = 0; k < cycles; k++) begin
      if (!pt_valid || pt_ready) begin
        pt_valid = ($urandom_range(0, 9) < 3);
        pt_data  = 8'($urandom);
      end
      rec_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
    end
    // Drain.
    if (pt_valid) begin
      while (!pt_ready) begin
        @(posedge clk);
        #1;
      end
      @(posedge clk);
      #1;
    end
    pt_valid  = 0;
    rec_ready = 1;
    repeat (40) @(posedge clk);
    #1;
    check(ct_exp.size() == 0 && pt_sent.size() == 0, "bytes left in flight after drain");
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, first, n;
    reset = 1; start = 0; pt_valid = 0; pt_data = 0; rec_ready = 0;
    for (int i = 0; i < 8; i++) c[i] = fcsr_pkg::DEFAULT_C[i];
    @(posedge clk);
    #1 reset = 0;
    new_models();
    n_reset_init++;
    wait_ready();
    check(e_c_bad == 0, "built-in seeds flagged bad");
    traffic(3000);

    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 8; i++) c[i] = rand_seed(i);
      session_start();
      check(e_c_bad == 0 && d_c_bad == 0, "random seeds flagged bad");
      traffic(2000);
    end

    // A bad seed is flagged; the supplier then gives a good one.
    c[4] = 128'd3 * 128'h1234567;
    session_start();
    check(e_c_bad == 8'b0001_0000, $sformatf("c_bad %b, expected 00010000", e_c_bad));
    if (e_c_bad != 0) n_bad_seed++;
    c[4] = rand_seed(4);
    session_start();
    check(e_c_bad == 0, "c_bad stayed after a good seed");

    // Timing without stalls: plaintext always present, output always taken.
    for (int i = 0; i < 8; i++) c[i] = rand_seed(i);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    new_models();
    n_start_init++;
    pt_valid  = 1;
    pt_data   = 8'($urandom);
    rec_ready = 1;
    t0 = 0;
    first = -1;
    n = 0;
    while (n < 20 && t0 < 400) begin
      if (pt_ready) begin
        @(posedge clk);
        #1 pt_data = 8'($urandom);
      end else begin
        @(posedge clk);
        #1;
      end
      t0++;
      if (mid_valid && mid_ready) begin
        if (first < 0) begin
          first = t0;
          check(t0 == 136, $sformatf("first ciphertext byte %0d cycles after start, expected 136", t0));
        end else check((t0 - first) % 8 == 0, $sformatf("ciphertext byte at cycle %0d", t0));
        n++;
      end
    end
    check(n == 20, "ciphertext stream stopped");
    traffic(0);

    check(n_reset_init > 0, "no reset initialisation");
    check(n_start_init > 0, "no start initialisation");
    check(n_bad_seed > 0, "bad seed never flagged");
    check(n_ks_stall > 0, "keystream never stalled");
    check(n_pt_wait > 0, "plaintext never waited for keystream");
    check(n_ct_backpressure > 0, "output never back-pressured");
    check(n_bytes > 500, $sformatf("only %0d bytes recovered", n_bytes));
    $display("mechanisms: reset_init=%0d start_init=%0d bad_seed=%0d ks_stall=%0d pt_wait=%0d ct_backpressure=%0d bytes=%0d",
             n_reset_init, n_start_init, n_bad_seed, n_ks_stall, n_pt_wait, n_ct_backpressure, n_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
