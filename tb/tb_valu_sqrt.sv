// tb_valu_sqrt: checks the Q8.8 square root on every non-negative input
// step of 7 plus edge values: the result r must satisfy
// r^2 <= x*256 < (r+1)^2 (truncated square root), and negatives give 0.
module tb_valu_sqrt;
  import cnp_pkg::*;
  logic clk = 0;
  sample_t x, y;
  int checks = 0, failures = 0;

  valu_sqrt dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int xv);
    longint r, v;
    x = sample_t'(xv); #1;
    r = longint'(y); v = longint'(xv) * 256;
    checks++;
    if (xv < 0 ? (r != 0) : !(r*r <= v && (r+1)*(r+1) > v)) begin
      failures++;
      if (failures < 10) $display("FAIL sqrt x=%0d got %0d", xv, r);
    end
  endtask

  initial begin
    for (int xv = 0; xv < 32768; xv += 7) begin check(xv); @(negedge clk); end
    check(32767); check(1); check(256); check(1024); check(-1); check(-32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
