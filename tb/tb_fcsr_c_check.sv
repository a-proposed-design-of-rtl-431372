// tb_fcsr_c_check - checks the seed validity test for FCSR3 (q = 19^30) and FCSR5 (q = 3^35).
// The reference computes c mod p bit-serially and compares c with the literal q. Random seeds,
// multiples of p, 0, q-1, q and values above q are applied.
module tb_fcsr_c_check;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] c3, c5;
  logic         ok3, ok5;

  fcsr_c_check #(.P(19), .E(30)) dut3 (.c(c3), .ok(ok3));
  fcsr_c_check #(.P(3),  .E(35)) dut5 (.c(c5), .ok(ok5));

  function automatic bit ref_ok(input logic [127:0] c, input int i);
    return (c != 0) && (c < REF_Q[i]) && (mod_serial(c, REF_P[i]) != 0);
  endfunction

  task automatic apply(input logic [127:0] a, input logic [127:0] b);
    c3 = a;
    c5 = b;
    #1;
    checks += 2;
    if (ok3 !== ref_ok(a, 2)) begin
      failures++;
      $display("FAIL: p=19 c=%h ok=%b", a, ok3);
    end
    if (ok5 !== ref_ok(b, 4)) begin
      failures++;
      $display("FAIL: p=3 c=%h ok=%b", b, ok5);
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
    int n_ok = 0, n_bad = 0;
    apply(0, 0);
    apply(1, 1);
    apply(19, 3);
    apply(REF_Q[2] - 1, REF_Q[4] - 1);
    apply(REF_Q[2], REF_Q[4]);
    apply(REF_Q[2] + 1, REF_Q[4] + 2);
    apply(128'd19 * 128'h123456789abcdef, 128'd3 * 128'h123456789abcdef);
    apply('1, '1);
    for (int k = 0; k < 2000; k++) begin
      logic [127:0] a, b;
      a = {$urandom, $urandom, $urandom, $urandom} % REF_Q[2];
      b = {$urandom, $urandom} % REF_Q[4];
      if (k % 4 == 0) a = a - (a % 19);
      if (k % 4 == 1) b = b - (b % 3);
      apply(a, b);
      if (ok3) n_ok++; else n_bad++;
    end
    checks++;
    if (n_ok == 0 || n_bad == 0) begin
      failures++;
      $display("FAIL: random seeds did not cover both outcomes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
