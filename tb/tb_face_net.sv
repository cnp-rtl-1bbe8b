// tb_face_net: runs the complete face-detection ConvNet on the processor,
// at the design's default parameters, on a reduced 58x58 input image.
// Layer structure as in the face-detection network (feature-map counts
// 6/16/80/2/1, 7x7 kernels, 2x2 subsampling):
//   C1+S2  6 maps   conv 7x7 + 2x2 subsampling, then squashing  -> 6@26x26
//   C3+S4  16 maps  sum over all 6 S2 maps (chained through y), last pass
//                   subsampled, then squashing                  -> 16@10x10
//   C5     80 maps  sum over all 16 S4 maps, squashing          -> 80@4x4
//   F6     2 maps   full connection to the 80 C5 maps: DOT with n = 1 per
//                   map, chained through y, squashing           -> 2@4x4
//   F7     1 map    full connection to F6, squashing            -> 1@4x4
// The testbench acts as the soft processor's control program: it loads
// kernels, vectors and an 8-segment tanh table, sets up memory ports and
// issues about 1,650 VALU instructions. An independent model computes every
// layer the same way (each pass rounds and saturates to Q8.8) and every
// map is compared with memory. Layer connectivity (all-to-all) and the
// reduced image size are choices of this test.
module tb_face_net;
  import cnp_pkg::*;
  import cnp_ref::*;

  localparam int K = 7, IW = 512, IH = 384;
  logic clk = 0, rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end   // reset edge before the first clock
  logic valu_start = 0, valu_busy, valu_done, valu_use_y;
  valu_op_e valu_op;
  logic [9:0] valu_width, valu_height;
  logic [1:0] valu_plog2;
  logic [4:0] valu_n;
  logic [21:0] valu_len;
  logic wr_en = 0;
  wr_sel_e wr_sel;
  logic [7:0] wr_addr;
  logic [31:0] wr_data;
  logic [5:0] port_start = '0, port_write = '0, port_busy;
  logic [5:0][23:0] port_base = '0;
  logic [5:0][21:0] port_len = '0;
  logic [2:0] p_rd_valid, p_rd_ready = '0, p_wr_valid = '0, p_wr_ready;
  logic [2:0][15:0] p_rd_data, p_wr_data = '0;
  logic mem_req, mem_we, mem_rvalid;
  logic [23:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;

  int checks = 0, failures = 0, n_instr = 0;

  cnp_top dut (.*);
  ext_mem_model #(.WORDS(1 << 22), .LAT(3)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- squashing table (as in tb_nonlin) ---------------------------------------
  int bl [8] = '{-32768, -768, -384, -128, 0, 128, 384, 768};
  int bm [8] = '{6, 2, 1, 0, 0, 1, 2, 6};
  int bn [8] = '{6, 6, 2, 3, 3, 2, 6, 6};
  int bb [8];

  function automatic longint g_ref(longint xv);
    int s = 0;
    longint r;
    for (int i = 1; i < 8; i++) if (xv >= bl[i]) s = i;
    r = bb[s];
    if (bm[s] <= 5) r += xv >>> bm[s];
    if (bn[s] <= 5) r += xv >>> bn[s];
    return sat16(r);
  endfunction

  // ---- control-program helpers ------------------------------------------------
  int heap = 0;
  function automatic int alloc(int words);
    int a = heap;
    heap += words;
    return a;
  endfunction

  task automatic wr_coef(wr_sel_e s, int a, logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_sel = s; wr_addr = 8'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic port(int p, bit w, int base, int len);
    port_write[p] = w; port_base[p] = 24'(base); port_len[p] = 22'(len);
    port_start[p] = 1;
  endtask

  task automatic valu_run(valu_op_e o, int xa, int xn, int ya, int yn, int za, int zn);
    @(negedge clk);
    port(0, 0, xa, xn);
    if (yn > 0) port(1, 0, ya, yn);
    port(2, 1, za, zn);
    @(negedge clk); port_start = '0;
    valu_op = o; valu_start = 1;
    @(negedge clk); valu_start = 0;
    while (!valu_done) @(negedge clk);
    while (port_busy[2:0] != '0) @(negedge clk);
    n_instr++;
  endtask

  // ---- reference model: planes as flat arrays ---------------------------------
  typedef longint plane_t [];

  function automatic plane_t ref_conv(plane_t x, int w, int h, longint ker [K][K],
                                      bit use_y, plane_t y, int pl);
    int ow = w - K + 1, oh = h - K + 1, p = 1 << pl;
    plane_t cz = new[ow*oh], z;
    for (int i = 0; i < oh; i++)
      for (int j = 0; j < ow; j++) begin
        longint s = use_y ? y[i*ow + j] * 256 : 0;
        for (int m = 0; m < K; m++)
          for (int n = 0; n < K; n++) s += x[(i+m)*w + j+n] * ker[m][n];
        cz[i*ow + j] = s;
      end
    z = new[(ow/p)*(oh/p)];
    for (int i = 0; i < oh/p; i++)
      for (int j = 0; j < ow/p; j++) begin
        longint s = 0;
        for (int a = 0; a < p; a++)
          for (int b = 0; b < p; b++) s += cz[(p*i+a)*ow + p*j+b];
        z[i*(ow/p) + j] = sat16((s >>> (2*pl)) >>> 8);
      end
    return z;
  endfunction

  function automatic plane_t ref_squash(plane_t x);
    plane_t z = new[x.size()];
    foreach (x[i]) z[i] = g_ref(x[i]);
    return z;
  endfunction

  task automatic compare(string name, int addr, plane_t e);
    int bad = 0;
    foreach (e[i]) if (s16(u_mem.mem[addr + i]) != e[i]) begin
      bad++;
      if (bad < 3) $display("FAIL %s word %0d = %0d, expected %0d", name, i, s16(u_mem.mem[addr + i]), e[i]);
    end
    checks++;
    if (bad) failures++;
    foreach (e[i]) begin
      if (e[i] < vmin) vmin = e[i];
      if (e[i] > vmax) vmax = e[i];
    end
  endtask

  // value range of each layer, so a layer that collapsed to a constant
  // (all zero or all saturated) is noticed
  longint vmin, vmax;
  task automatic layer_range(string name);
    $display("%-6s outputs range %0d .. %0d", name, vmin, vmax);
    checks++;
    if (vmin == vmax) begin failures++; $display("FAIL %s is constant", name); end
    vmin = 32767; vmax = -32768;
  endtask

  task automatic put(int addr, plane_t v);
    foreach (v[i]) u_mem.mem[addr + i] = 16'(v[i]);
  endtask

  function automatic plane_t rand_plane(int n, int amp);
    plane_t v = new[n];
    foreach (v[i]) v[i] = longint'($urandom_range(0, 2*amp)) - amp;
    return v;
  endfunction

  task automatic load_kernel(output longint ker [K][K], input int amp);
    for (int m = 0; m < K; m++)
      for (int n = 0; n < K; n++) begin
        ker[m][n] = longint'($urandom_range(0, 2*amp)) - amp;
        wr_coef(WR_KERNEL, m*K+n, 32'(ker[m][n]));
      end
  endtask

  // conv layer: nout maps, each the sum over all nin input maps
  task automatic conv_layer(string name, int nin, int nout, int w, int h, int pl, int amp,
                            int in_addr [], plane_t in_ref [],
                            ref int out_addr [], ref plane_t out_ref []);
    int ow = w - K + 1, oh = h - K + 1, p = 1 << pl;
    int tmp [2];
    plane_t acc;
    longint ker [K][K];
    tmp[0] = alloc(ow*oh); tmp[1] = alloc(ow*oh);
    out_addr = new[nout]; out_ref = new[nout];
    for (int f = 0; f < nout; f++) begin
      int raw = alloc((ow/p)*(oh/p));
      out_addr[f] = alloc((ow/p)*(oh/p));
      for (int i = 0; i < nin; i++) begin
        bit last = (i == nin - 1);
        load_kernel(ker, amp);
        valu_width = 10'(w); valu_height = 10'(h);
        valu_use_y = (i > 0); valu_plog2 = last ? 2'(pl) : 2'd0;
        valu_run(OP_CONV, in_addr[i], w*h, tmp[(i+1)%2], (i > 0) ? ow*oh : 0,
                 last ? raw : tmp[i%2], last ? (ow/p)*(oh/p) : ow*oh);
        acc = ref_conv(in_ref[i], w, h, ker, i > 0, acc, last ? pl : 0);
      end
      valu_len = 22'((ow/p)*(oh/p));
      valu_run(OP_NONLIN, raw, (ow/p)*(oh/p), 0, 0, out_addr[f], (ow/p)*(oh/p));
      out_ref[f] = ref_squash(acc);
      compare(name, out_addr[f], out_ref[f]);
    end
  endtask

  // full-connection layer: DOT with n = 1 per input map, chained through y
  task automatic full_layer(string name, int nin, int nout, int len, int amp,
                            int in_addr [], plane_t in_ref [],
                            ref int out_addr [], ref plane_t out_ref []);
    int tmp [2];
    plane_t acc;
    tmp[0] = alloc(len); tmp[1] = alloc(len);
    out_addr = new[nout]; out_ref = new[nout];
    for (int f = 0; f < nout; f++) begin
      out_addr[f] = alloc(len);
      acc = new[len];
      for (int i = 0; i < nin; i++) begin
        longint v = longint'($urandom_range(0, 2*amp)) - amp;
        wr_coef(WR_VECTOR, 0, 32'(v));
        valu_n = 1; valu_len = 22'(len); valu_use_y = (i > 0);
        valu_run(OP_DOT, in_addr[i], len, tmp[(i+1)%2], (i > 0) ? len : 0, tmp[i%2], len);
        foreach (acc[q]) acc[q] = sat16(((i > 0 ? acc[q] * 256 : 0) + in_ref[i][q] * v) >>> 8);
      end
      valu_len = 22'(len);
      valu_run(OP_NONLIN, tmp[(nin-1)%2], len, 0, 0, out_addr[f], len);
      out_ref[f] = ref_squash(acc);
      compare(name, out_addr[f], out_ref[f]);
    end
  endtask

  // ---- the network ------------------------------------------------------------
  initial begin
    int a_in [], a_s2 [], a_s4 [], a_c5 [], a_f6 [], a_f7 [];
    plane_t r_in [], r_s2 [], r_s4 [], r_c5 [], r_f6 [], r_f7 [];
    int t0;
    for (int i = 0; i < 4; i++) bb[i] = 0;
    bb[3] = 0; bb[4] = 0;
    for (int i = 5; i < 8; i++) begin
      automatic int prev = bb[i-1] + ((bm[i-1] <= 5) ? (bl[i] >>> bm[i-1]) : 0) + ((bn[i-1] <= 5) ? (bl[i] >>> bn[i-1]) : 0);
      automatic int here = ((bm[i] <= 5) ? (bl[i] >>> bm[i]) : 0) + ((bn[i] <= 5) ? (bl[i] >>> bn[i]) : 0);
      bb[i] = prev - here;
      bb[7-i] = -bb[i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) wr_coef(WR_NONLIN, i, {16'(bl[i]), 3'(bm[i]), 3'(bn[i]), 10'(bb[i])});
    t0 = $time;
    vmin = 32767; vmax = -32768;
    a_in = new[1]; r_in = new[1];
    a_in[0] = alloc(IW*IH);
    r_in[0] = rand_plane(IW*IH, 256);
    put(a_in[0], r_in[0]);
    conv_layer("C1+S2", 1, 6, IW, IH, 1, 24, a_in, r_in, a_s2, r_s2);
    layer_range("C1+S2");
    conv_layer("C3+S4", 6, 16, 253, 189, 1, 16, a_s2, r_s2, a_s4, r_s4);
    layer_range("C3+S4");
    conv_layer("C5", 16, 80, 123, 91, 0, 12, a_s4, r_s4, a_c5, r_c5);
    layer_range("C5");
    full_layer("F6", 80, 2, 117*85, 24, a_c5, r_c5, a_f6, r_f6);
    layer_range("F6");
    full_layer("F7", 2, 1, 117*85, 256, a_f6, r_f6, a_f7, r_f7);
    layer_range("F7");
    $display("face-detection network on %0dx%0d: %0d VALU instructions, %0d cycles, %0d maps checked",
             IW, IH, n_instr, ($time - t0) / 10, checks);
    $display("F7 output: %0d %0d %0d %0d ...", r_f7[0][0], r_f7[0][1], r_f7[0][2], r_f7[0][3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
