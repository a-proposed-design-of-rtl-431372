// tb_ks_buffer - checks byte packing (first bit in bit 7), the hold of a finished byte under
// back-pressure (bit_ready low, byte unchanged), and the rate of one byte per 8 cycles when
// neither side stalls.
module tb_ks_buffer;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       reset, bit_valid, bit_ready, bit_in, byte_valid, byte_ready;
  logic [7:0] byte_out;

  ks_buffer dut (.*);

  bit   sent[$];
  int   stalls = 0;

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

  // Output side: compare every byte taken with the next eight bits sent.
  always @(posedge clk) begin
    if (!reset && byte_valid && byte_ready) begin
      logic [7:0] exp_b;
      for (int i = 7; i >= 0; i--) exp_b[i] = sent.pop_front();
      check(byte_out == exp_b, $sformatf("byte %h, expected %h", byte_out, exp_b));
    end
    if (!reset && bit_valid && bit_ready) sent.push_back(bit_in);
    if (!reset && byte_valid && !byte_ready) stalls++;
  end

  initial begin
    logic [7:0] held;
    int         first, n;
    reset = 1'b1; bit_valid = 0; bit_in = 0; byte_ready = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;

    // Random traffic on both sides.
    for (int k = 0; k < 4000; k++) begin
      bit_valid  = ($urandom_range(0, 3) != 0);
      bit_in     = 1'($urandom);
      byte_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      #1;
    end

    // Back-pressure: a held byte stays, and no bit is accepted.
    byte_ready = 0;
    bit_valid  = 1;
    while (!byte_valid) begin
      bit_in = 1'($urandom);
      @(posedge clk);
      #1;
    end
    held = byte_out;
    for (int k = 0; k < 5; k++) begin
      check(!bit_ready, "bit_ready high while a byte is held");
      @(posedge clk);
      #1;
      check(byte_valid && byte_out == held, "held byte changed");
    end

    // Rate with no stalls: drain, then byte_valid every 8 cycles.
    byte_ready = 1;
    first = -1;
    n = 0;
    for (int k = 0; k < 80; k++) begin
      bit_in = 1'($urandom);
      @(posedge clk);
      #1;
      if (byte_valid) begin
        if (first >= 0) check((k - first) % 8 == 0, $sformatf("byte at cycle %0d", k));
        else first = k;
        n++;
      end
    end
    check(n == 10, $sformatf("%0d bytes in 80 cycles, expected 10", n));
    check(stalls > 0, "no stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
