// tb_bool_fd - checks all 256 entries of f_d against the printed table read character by
// character, its balance (128 ones), and a few entries worked out by hand from the first and
// last hexadecimal digits (6 = 0110, F = 1111, 7 = 0111).
module tb_bool_fd;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] x;
  logic       y;

  bool_fd dut (.x(x), .y(y));

  // Drive index idx: FCSR1 (x[0]) is the most significant index bit.
  task automatic drive(input int idx);
    for (int i = 0; i < 8; i++) x[i] = idx[7-i];
    #1;
  endtask

  task automatic expect_bit(input int idx, input bit v);
    drive(idx);
    checks++;
    if (y !== v) begin
      failures++;
      $display("FAIL: f_d(%0d) = %b, expected %b", idx, y, v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    for (int idx = 0; idx < 256; idx++) begin
      expect_bit(idx, fd_ref(idx));
      ones += int'(y);
    end
    checks++;
    if (ones != 128) begin
      failures++;
      $display("FAIL: f_d has %0d ones, expected 128", ones);
    end
    expect_bit(0, 0);
    expect_bit(1, 1);
    expect_bit(2, 1);
    expect_bit(3, 0);
    expect_bit(4, 1);
    expect_bit(7, 1);
    expect_bit(252, 0);
    expect_bit(253, 1);
    expect_bit(255, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
