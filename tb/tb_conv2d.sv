// tb_conv2d: self-checking test of the streaming K x K convolver.
// Uses K = 3 and a 16-sample maximum width to stay small. For several plane
// sizes, including width = K (no line delay) and width = K+1, a random
// kernel and a random plane are streamed in with random idle cycles; every
// output is compared with a direct evaluation of
//   z[i][j] = sum_{m,n} x[i+m][j+n] * ker[m][n]
// and the number of outputs must be (H-K+1)*(W-K+1).
module tb_conv2d;
  import cnp_pkg::*;

  localparam int K = 3;
  localparam int WM = 16;

  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] cfg_width, cfg_height;
  logic kw_en = 0;
  logic [$clog2(K*K)-1:0] kw_addr;
  sample_t kw_data, x;
  logic step = 0;
  logic o_valid, last_in;
  acc_t o_acc;
  logic [9:0] o_row, o_col;

  int checks = 0, failures = 0;
  sample_t img [16][16];
  sample_t ker [K][K];

  conv2d #(.K(K), .W_MAX(WM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic acc_t ref_z(int i, int j);
    acc_t s = 0;
    for (int m = 0; m < K; m++)
      for (int n = 0; n < K; n++)
        s += acc_t'(img[i+m][j+n]) * acc_t'(ker[m][n]);
    return s;
  endfunction

  task automatic run(int w, int h);
    int nout = 0, lasts = 0;
    for (int m = 0; m < K; m++)
      for (int n = 0; n < K; n++) begin
        ker[m][n] = sample_t'($urandom_range(0, 1023)) - 512;
        @(negedge clk); kw_en = 1; kw_addr = m*K + n; kw_data = ker[m][n];
      end
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) img[r][c] = sample_t'($urandom_range(0, 4095)) - 2048;
    @(negedge clk); kw_en = 0; cfg_width = 10'(w); cfg_height = 10'(h); start = 1;
    @(negedge clk); start = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        while ($urandom_range(0, 3) == 0) begin
          step = 0; @(negedge clk);
        end
        step = 1; x = img[r][c];
        #1;
        if (o_valid) begin
          nout++;
          checks++;
          if (o_row != 10'(r-K+1) || o_col != 10'(c-K+1) || o_acc != ref_z(r-K+1, c-K+1)) begin
            failures++;
            $display("FAIL w=%0d r=%0d c=%0d got %0d exp %0d", w, r, c, o_acc, ref_z(r-K+1, c-K+1));
          end
        end
        if (last_in) lasts++;
        @(negedge clk);
      end
    step = 0;
    checks++;
    if (nout != (h-K+1)*(w-K+1) || lasts != 1) begin
      failures++;
      $display("FAIL count w=%0d h=%0d: %0d outputs, %0d last", w, h, nout, lasts);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8, 6);
    run(3, 4);
    run(4, 5);
    run(16, 7);
    run(5, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
