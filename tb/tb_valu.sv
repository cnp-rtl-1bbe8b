// tb_valu: self-checking test of the vector ALU, K = 3, widths up to 16.
// Runs every instruction on random data: CONV with and without y and with
// pooling 1, 2 and 4; DOT with and without y; NONLIN; SQRT; PROD; DIV. Each
// output stream is compared with results computed here from the definitions.
// Every instruction is run twice: with random gaps on the input streams and
// random back-pressure on z (stalls), and with all streams always ready,
// where it must take one cycle per input sample (+ at most 3 cycles).
module tb_valu;
  import cnp_pkg::*;

  localparam int K = 3;
  logic clk = 0, rst_n = 0, start = 0;
  valu_op_e op;
  logic [9:0] cfg_width, cfg_height;
  logic [1:0] cfg_plog2;
  logic cfg_use_y;
  logic [4:0] cfg_n;
  logic [21:0] cfg_len;
  logic busy, done;
  logic wr_en = 0;
  wr_sel_e wr_sel;
  logic [7:0] wr_addr;
  logic [31:0] wr_data;
  logic x_valid, x_ready, y_valid, y_ready, z_valid, z_ready;
  sample_t x_data, y_data, z_data;

  int checks = 0, failures = 0, stalls = 0;
  sample_t xs [$], ys [$], zs [$], exp_z [$];
  int xi, yi;
  bit rnd;

  valu #(.K(K), .W_MAX(16), .N_MAX(16), .NSEG(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream sources and sink
  assign x_data = (xi < xs.size()) ? xs[xi] : '0;
  assign y_data = (yi < ys.size()) ? ys[yi] : '0;
  always @(negedge clk) begin
    x_valid <= (xi < xs.size()) && (!rnd || $urandom_range(0, 3) != 0);
    y_valid <= (yi < ys.size()) && (!rnd || $urandom_range(0, 3) != 0);
    z_ready <= !rnd || $urandom_range(0, 2) != 0;
  end
  always @(posedge clk) begin
    if (x_valid && x_ready) xi <= xi + 1;
    if (y_valid && y_ready) yi <= yi + 1;
    if (z_valid && z_ready) zs.push_back(z_data);
    if (z_valid && !z_ready) stalls++;
  end

  function automatic sample_t sat(longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return sample_t'(v);
  endfunction

  task automatic wr(wr_sel_e s, int a, logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_sel = s; wr_addr = 8'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic execute(string name, valu_op_e o, int nin);
    int t0, cyc;
    for (int pass = 0; pass < 2; pass++) begin
      rnd = (pass == 0);
      xi = 0; yi = 0; zs.delete();
      @(negedge clk); op = o; start = 1;
      @(negedge clk); start = 0; t0 = $time;
      while (!done) @(negedge clk);
      cyc = ($time - t0) / 10;
      checks++;
      if (zs.size() != exp_z.size() || xi != xs.size()) begin
        failures++;
        $display("FAIL %s: %0d outputs, expected %0d; %0d of %0d inputs", name, zs.size(), exp_z.size(), xi, xs.size());
      end
      for (int i = 0; i < zs.size() && i < exp_z.size(); i++) begin
        checks++;
        if (zs[i] != exp_z[i]) begin
          failures++;
          if (failures < 20) $display("FAIL %s z[%0d] = %0d, expected %0d", name, i, zs[i], exp_z[i]);
        end
      end
      if (!rnd) begin
        checks++;
        if (cyc > nin + 3) begin failures++; $display("FAIL %s took %0d cycles for %0d inputs", name, cyc, nin); end
        $display("%-8s %5d inputs  %5d outputs  %5d cycles", name, nin, zs.size(), cyc);
      end
    end
  endtask

  task automatic t_conv(int w, int h, int pl, bit use_y);
    longint ker [K][K];
    longint cz [16][16];
    int ow = w - K + 1, oh = h - K + 1, p = 1 << pl;
    sample_t img [16][16];
    xs.delete(); ys.delete(); exp_z.delete();
    for (int m = 0; m < K; m++) for (int n = 0; n < K; n++) begin
      ker[m][n] = longint'($urandom_range(0, 511)) - 256;
      wr(WR_KERNEL, m*K+n, 32'(ker[m][n]));
    end
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      img[r][c] = sample_t'($urandom_range(0, 2047)) - 1024;
      xs.push_back(img[r][c]);
    end
    for (int i = 0; i < oh; i++) for (int j = 0; j < ow; j++) begin
      cz[i][j] = 0;
      for (int m = 0; m < K; m++) for (int n = 0; n < K; n++) cz[i][j] += longint'(img[i+m][j+n]) * ker[m][n];
      if (use_y) begin
        sample_t yv = sample_t'($urandom_range(0, 4095)) - 2048;
        ys.push_back(yv);
        cz[i][j] += longint'(yv) * 256;
      end
    end
    for (int i = 0; i + p <= oh; i += p) for (int j = 0; j + p <= ow; j += p) begin
      longint s = 0;
      for (int a = 0; a < p; a++) for (int b = 0; b < p; b++) s += cz[i+a][j+b];
      exp_z.push_back(sat((s >>> (2*pl)) >>> 8));
    end
    cfg_width = 10'(w); cfg_height = 10'(h); cfg_plog2 = 2'(pl); cfg_use_y = use_y;
    execute($sformatf("CONV%0d%s", p, use_y ? "+y" : ""), OP_CONV, w*h);
  endtask

  task automatic t_dot(int n, int pix, bit use_y);
    longint v [16];
    xs.delete(); ys.delete(); exp_z.delete();
    for (int k = 0; k < n; k++) begin
      v[k] = longint'($urandom_range(0, 1023)) - 512;
      wr(WR_VECTOR, k, 32'(v[k]));
    end
    for (int q = 0; q < pix; q++) begin
      longint s = 0;
      for (int k = 0; k < n; k++) begin
        sample_t xv = sample_t'($urandom_range(0, 4095)) - 2048;
        xs.push_back(xv);
        s += longint'(xv) * v[k];
      end
      if (use_y) begin
        sample_t yv = sample_t'($urandom);
        ys.push_back(yv);
        s += longint'(yv) * 256;
      end
      exp_z.push_back(sat(s >>> 8));
    end
    cfg_n = 5'(n); cfg_len = 22'(n*pix); cfg_use_y = use_y;
    execute(use_y ? "DOT+y" : "DOT", OP_DOT, n*pix);
  endtask

  task automatic t_point(valu_op_e o, int len);
    xs.delete(); ys.delete(); exp_z.delete();
    for (int i = 0; i < len; i++) begin
      longint xv, yv, e;
      xv = longint'($urandom_range(0, 8191)) - 4096;
      yv = longint'($urandom_range(0, 8191)) - 4096;
      if (i == 3) yv = 0;
      xs.push_back(sample_t'(xv));
      case (o)
        OP_NONLIN: begin   // table: x<0 -> x/2 + x/4 ; x>=0 -> x + x/8 + 0.25
          e = (xv < 0) ? (xv >>> 1) + (xv >>> 2) : xv + (xv >>> 3) + 64;
        end
        OP_SQRT: begin
          e = 0;
          if (xv > 0) while ((e+1)*(e+1) <= xv*256) e++;
        end
        OP_PROD: begin ys.push_back(sample_t'(yv)); e = (xv * yv) >>> 8; end
        default: begin
          ys.push_back(sample_t'(yv));
          e = (yv == 0) ? ((xv < 0) ? -32768 : 32767) : (xv * 256) / yv;
        end
      endcase
      exp_z.push_back(sat(e));
    end
    cfg_len = 22'(len);
    execute(o.name(), o, len);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    t_conv(8, 7, 0, 0);
    t_conv(10, 9, 1, 1);
    t_conv(16, 11, 2, 1);
    t_conv(3, 5, 0, 1);
    t_dot(4, 10, 0);
    t_dot(3, 12, 1);
    // non-linear table: segment 0 (x < 0) slope 1/2+1/4, segment 1 (x >= 0)
    // slope 1+1/8 offset 64; later breakpoints set to the maximum
    wr(WR_NONLIN, 0, {16'sh8000, 3'd1, 3'd2, 10'd0});
    wr(WR_NONLIN, 1, {16'sh0000, 3'd0, 3'd3, 10'd64});
    for (int i = 2; i < 8; i++) wr(WR_NONLIN, i, {16'sh7fff, 3'd0, 3'd3, 10'd64});
    t_point(OP_NONLIN, 50);
    t_point(OP_SQRT, 50);
    t_point(OP_PROD, 50);
    t_point(OP_DIV, 50);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL output back-pressure never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
