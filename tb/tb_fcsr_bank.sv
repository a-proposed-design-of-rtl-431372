// tb_fcsr_bank - checks the eight FCSRs together: ready exactly 127 cycles after reset and after
// each start, each register's output stream against the 2-adic expansion of -c_i/q_i (with
// 'step' driven at random, including before ready, when it must be ignored), and the c_bad flags
// for a mix of good and bad seeds.
module tb_fcsr_bank;
  import tb_ref_pkg::*;
  import fcsr_pkg::wide_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       reset, start, step, ready;
  wide_t      c [8];
  logic [7:0] out_bits, c_bad;

  fcsr_bank dut (.*);

  twoadic_t model [8];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_ready();
    int n = 0;
    while (!ready && n < 1000) begin
      step = 1'($urandom);
      @(posedge clk);
      #1;
      n++;
    end
    step = 0;
    check(n == 127, $sformatf("ready after %0d cycles, expected 127", n));
  endtask

  task automatic run_streams(input int nbits);
    int k = 0, errs = 0;
    while (k < nbits) begin
      step = ($urandom_range(0, 2) != 0);
      #1;
      if (step) begin
        for (int i = 0; i < 8; i++) if (out_bits[i] !== model[i].next()) errs++;
        k++;
      end
      @(posedge clk);
      #1;
    end
    step = 0;
    check(errs == 0, $sformatf("%0d output bits differ from -c/q over %0d steps", errs, nbits));
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; start = 0; step = 0;
    for (int i = 0; i < 8; i++) c[i] = '0;
    @(posedge clk);
    #1 reset = 0;
    wait_ready();
    check(c_bad == 8'h00, "reset seeds flagged bad");
    for (int i = 0; i < 8; i++) model[i] = new(fcsr_pkg::DEFAULT_C[i], REF_Q[i]);
    run_streams(1000);

    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 8; i++) begin
        c[i] = rand_seed(i);
        model[i] = new(c[i], REF_Q[i]);
      end
      start = 1;
      @(posedge clk);
      #1 start = 0;
      check(!ready, "ready not cleared by start");
      wait_ready();
      check(c_bad == 8'h00, "random good seeds flagged bad");
      run_streams(400);
    end

    // Bad seeds on the odd-numbered registers.
    for (int i = 0; i < 8; i++)
      c[i] = (i % 2 == 0) ? rand_seed(i) : ((i % 4 == 1) ? REF_Q[i] : 128'(REF_P[i]) * 128'd977);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    check(c_bad == 8'b1010_1010, $sformatf("c_bad %b, expected 10101010", c_bad));
    wait_ready();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
