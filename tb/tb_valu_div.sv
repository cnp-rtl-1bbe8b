// tb_valu_div: checks the saturating Q8.8 quotient on random and extreme
// operand pairs against trunc(a*256/b) clipped to 16 bits, and the
// zero-divisor rule (largest value with the sign of a).
module tb_valu_div;
  import cnp_pkg::*;
  logic clk = 0;
  sample_t a, b, q;
  int checks = 0, failures = 0;

  valu_div dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int av, int bv);
    longint e, n;
    a = sample_t'(av); b = sample_t'(bv); #1;
    n = longint'(av) * 256;
    if (bv == 0) e = (av < 0) ? -32768 : 32767;
    else begin
      e = n / longint'(bv);     // truncates toward zero
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
    end
    checks++;
    if (longint'(q) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d/%0d got %0d exp %0d", av, bv, q, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      check(int'(sample_t'($urandom)), int'(sample_t'($urandom)));
      check($urandom_range(0, 4095) - 2048, $urandom_range(1, 2048));
      check($urandom_range(0, 4095) - 2048, -$urandom_range(1, 2048));
      @(negedge clk);
    end
    check(100, 0); check(-100, 0); check(0, 0); check(32767, 1); check(-32768, -1); check(512, 256); check(-768, 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
