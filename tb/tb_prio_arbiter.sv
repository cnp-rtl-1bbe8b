// tb_prio_arbiter: checks the fixed-priority grant for all 64 request
// patterns of a 6-port arbiter: exactly the lowest requesting port is
// granted, and nothing when nobody requests.
module tb_prio_arbiter;
  logic clk = 0;
  logic [5:0] req, gnt;
  int checks = 0, failures = 0;

  prio_arbiter #(.N(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      logic [5:0] e;
      e = '0;
      for (int i = 5; i >= 0; i--) if (r[i]) e = 6'(1) << i;
      req = 6'(r); #1;
      checks++;
      if (gnt !== e) begin
        failures++;
        $display("FAIL req=%b gnt=%b exp %b", req, gnt, e);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
