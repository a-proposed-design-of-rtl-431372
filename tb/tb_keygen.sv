// tb_keygen - drives eight stand-in FCSR bit streams (random bits that change only when keygen
// steps), and checks that each keystream byte is the eight f_d outputs, first bit in bit 7; that
// step stays low before run, during start and while a byte waits; and that without stalls a
// byte arrives every 8 cycles.
module tb_keygen;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       reset, start, run, step, key, key_valid, ks_valid, ks_ready;
  logic [7:0] out_bits, ks_byte;

  keygen dut (.*);

  bit key_q[$];
  int stalls = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!reset) begin
      if (step) begin
        key_q.push_back(fd_ref(fd_index(out_bits)));
        if (key !== fd_ref(fd_index(out_bits))) begin
          failures++;
          $display("FAIL: key bit");
        end
        checks++;
        out_bits <= 8'($urandom);
      end
      if (ks_valid && ks_ready) begin
        logic [7:0] e;
        for (int i = 7; i >= 0; i--) e[i] = key_q.pop_front();
        check(ks_byte == e, $sformatf("byte %h expected %h", ks_byte, e));
      end
      if (ks_valid && !ks_ready) stalls++;
      if ((!run || start) && step) check(0, "step without run or during start");
      if (ks_valid && !ks_ready && step) check(0, "step while byte held");
    end
  end

  initial begin
    int first, n;
    reset = 1; start = 0; run = 0; ks_ready = 0; out_bits = 8'($urandom);
    repeat (2) @(posedge clk);
    #1 reset = 0;
    repeat (5) @(posedge clk);
    #1 run = 1;
    for (int k = 0; k < 3000; k++) begin
      ks_ready = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      #1;
    end
    // New session: start clears the partial byte.
    ks_ready = 1;
    @(posedge clk);
    #1;
    start = 1;
    @(posedge clk);
    #1 start = 0;
    key_q.delete();
    first = -1;
    n = 0;
    for (int k = 0; k < 80; k++) begin
      @(posedge clk);
      #1;
      if (ks_valid) begin
        if (first < 0) begin
          first = k;
          check(k == 7, $sformatf("first byte after start at cycle %0d, expected 7", k));
        end else check((k - first) % 8 == 0, "byte spacing");
        n++;
      end
    end
    check(n == 10, $sformatf("%0d bytes in 80 cycles", n));
    check(stalls > 0, "no stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
