// tb_dot_unit: self-checking test of the interleaved-plane dot product.
// Loads a random vector, streams random pixels of n interleaved channels
// (n = 1, 3, 16) with idle cycles, and checks each completed pixel against
// sum_k v[k]*x^k computed here; also checks one result per n samples.
module tb_dot_unit;
  import cnp_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4:0] cfg_n;
  logic vw_en = 0;
  logic [3:0] vw_addr;
  sample_t vw_data, x;
  logic step = 0, o_valid;
  acc_t o_acc;

  int checks = 0, failures = 0;
  sample_t v [16];

  dot_unit #(.N_MAX(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, int pixels);
    int nout = 0;
    for (int k = 0; k < n; k++) begin
      v[k] = sample_t'($urandom);
      @(negedge clk); vw_en = 1; vw_addr = 4'(k); vw_data = v[k];
    end
    @(negedge clk); vw_en = 0; cfg_n = 5'(n); start = 1;
    @(negedge clk); start = 0;
    for (int p = 0; p < pixels; p++) begin
      acc_t s = 0;
      for (int k = 0; k < n; k++) begin
        if ($urandom_range(0, 2) == 0) begin step = 0; @(negedge clk); end
        step = 1; x = sample_t'($urandom);
        s += acc_t'(x) * acc_t'(v[k]);
        #1;
        if (o_valid != (k == n-1)) begin
          failures++; $display("FAIL valid n=%0d k=%0d", n, k);
        end
        if (o_valid) begin
          checks++; nout++;
          if (o_acc != s) begin failures++; $display("FAIL n=%0d got %0d exp %0d", n, o_acc, s); end
        end
        @(negedge clk);
      end
    end
    step = 0;
    checks++;
    if (nout != pixels) begin failures++; $display("FAIL count"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3, 20);
    run(1, 10);
    run(16, 12);
    run(6, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
