// tb_xor_cipher - random data and keystream bytes with random valid/ready on all three sides;
// every output byte must be the XOR of the data byte and keystream byte of the same position,
// in order, and nothing may be lost or duplicated.
module tb_xor_cipher;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       reset, in_valid, in_ready, ks_valid, ks_ready, out_valid, out_ready;
  logic [7:0] in_data, ks_byte, out_data;

  xor_cipher dut (.*);

  logic [7:0] exp_q[$];
  int         nout = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!reset && in_valid && in_ready) begin
      checks++;
      if (!ks_ready) begin
        failures++;
        $display("FAIL: data consumed without keystream");
      end
      exp_q.push_back(in_data ^ ks_byte);
    end
    if (!reset && out_valid && out_ready) begin
      logic [7:0] e;
      e = exp_q.pop_front();
      checks++;
      nout++;
      if (out_data !== e) begin
        failures++;
        $display("FAIL: out %h expected %h", out_data, e);
      end
    end
  end

  initial begin
    reset = 1; in_valid = 0; ks_valid = 0; out_ready = 0; in_data = 0; ks_byte = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int k = 0; k < 5000; k++) begin
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(0, 2) != 0);
        in_data  = 8'($urandom);
      end
      if (!ks_valid || ks_ready) begin
        ks_valid = ($urandom_range(0, 2) != 0);
        ks_byte  = 8'($urandom);
      end
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    ks_valid = 0;
    out_ready = 1;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || nout < 500) begin
      failures++;
      $display("FAIL: %0d bytes left, %0d out", exp_q.size(), nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
