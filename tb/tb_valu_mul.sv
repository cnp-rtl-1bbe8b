// tb_valu_mul: checks the saturating Q8.8 product on random and extreme
// operand pairs against floor(a*b/256) clipped to [-32768, 32767].
module tb_valu_mul;
  import cnp_pkg::*;
  logic clk = 0;
  sample_t a, b, p;
  int checks = 0, failures = 0;

  valu_mul dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int av, int bv);
    longint e;
    a = sample_t'(av); b = sample_t'(bv); #1;
    e = longint'(av) * longint'(bv);
    e = (e >= 0) ? e / 256 : -((-e + 255) / 256);   // floor division
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d got %0d exp %0d", av, bv, p, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      check(int'(sample_t'($urandom)), int'(sample_t'($urandom)));
      check($urandom_range(0, 2047) - 1024, $urandom_range(0, 2047) - 1024);
      @(negedge clk);
    end
    check(32767, 32767); check(-32768, -32768); check(-32768, 32767); check(256, -300); check(0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
