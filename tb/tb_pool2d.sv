// tb_pool2d: self-checking test of P x P average pooling.
// Streams random planes of odd and even sizes in raster order (with random
// idle cycles and samples that are presented but not taken), for P = 1, 2
// and 4, and compares every emitted value with the window sum shifted right
// by 2*log2(P); the number of outputs must be floor(W/P)*floor(H/P).
module tb_pool2d;
  import cnp_pkg::*;

  logic clk = 0;
  logic [1:0] cfg_plog2;
  logic [9:0] cfg_ow, in_row, in_col;
  logic in_valid = 0, adv = 0, emit;
  acc_t in_acc, out_acc;

  int checks = 0, failures = 0;
  acc_t pl [32][32];

  pool2d #(.W_MAX(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int h, int pl2);
    int p = 1 << pl2, nout = 0, ei = 0;
    acc_t exp_v [$];
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) pl[r][c] = acc_t'($urandom_range(0, 200000)) - 100000;
    for (int i = 0; i + p <= h; i += p)
      for (int j = 0; j + p <= w; j += p) begin
        acc_t s = 0;
        for (int a = 0; a < p; a++) for (int b = 0; b < p; b++) s += pl[i+a][j+b];
        exp_v.push_back(s >>> (2*pl2));
      end
    @(negedge clk); cfg_plog2 = 2'(pl2); cfg_ow = 10'(w);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        // presented but not taken: must not disturb the state
        while ($urandom_range(0, 3) == 0) begin
          in_valid = $urandom_range(0, 1); adv = 0;
          in_row = 10'(r); in_col = 10'(c); in_acc = acc_t'($urandom);
          @(negedge clk);
        end
        in_valid = 1; adv = 1; in_row = 10'(r); in_col = 10'(c); in_acc = pl[r][c];
        #1;
        if (emit) begin
          checks++; nout++;
          if (ei >= exp_v.size() || out_acc != exp_v[ei]) begin
            failures++;
            $display("FAIL p=%0d r=%0d c=%0d got %0d", p, r, c, out_acc);
          end
          ei++;
        end
        @(negedge clk);
      end
    in_valid = 0; adv = 0;
    checks++;
    if (nout != (w/p)*(h/p)) begin
      failures++;
      $display("FAIL count p=%0d: %0d outputs, expected %0d", p, nout, (w/p)*(h/p));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(10, 8, 1);
    run(11, 7, 1);
    run(17, 9, 2);
    run(16, 12, 2);
    run(6, 5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
