// tb_cnp_top: end-to-end test of the ConvNet processor hardware.
// The testbench plays the soft processor's control unit: it loads kernels,
// vectors and the squashing table, sets up memory ports and issues VALU
// instructions; data lives in a behavioural external memory (3-cycle
// latency). The program is a small ConvNet slice at the design's default
// parameters (7x7 kernels):
//   1. C1: conv 7x7 of a 22x18 image plane + 2x2 subsampling  -> S 8x6
//   2. C3-style accumulation: conv of a second plane, y = the conv of a
//      third plane computed first (use_y), no pooling          -> 10x12
//   3. squashing function on that result (NONLIN)
//   4. DOT of 3 interleaved planes with a vector, plus y
//   5. SQRT, PROD and DIV on planes
// While instructions run, the CPU, video and display ports (3, 4, 5) move
// streams of their own, so the priority manager has to share the memory.
// Every result region is compared with values computed here. The test
// counts how often each mechanism happened and fails for any that never did:
// pooling outputs, y accumulation, each instruction, VALU input starvation
// (memory-bound stall), back-pressure on the VALU output, memory
// arbitration conflicts, and traffic on each of ports 3..5.
module tb_cnp_top;
  import cnp_pkg::*;
  import cnp_ref::*;

  localparam int K = 7;
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
  logic [5:0][23:0] port_base;
  logic [5:0][21:0] port_len;
  logic [2:0] p_rd_valid, p_rd_ready, p_wr_valid, p_wr_ready;
  logic [2:0][15:0] p_rd_data, p_wr_data;
  logic mem_req, mem_we, mem_rvalid;
  logic [23:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;

  int checks = 0, failures = 0;
  int n_pool = 0, n_y = 0, n_starve = 0, n_bp = 0, n_conflict = 0;
  int n_op [6];
  int n_port [3];

  cnp_top dut (.*);
  ext_mem_model #(.WORDS(1 << 16), .LAT(3)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters -------------------------------------------------
  always @(posedge clk) if (rst_n) begin
    if (dut.u_valu.u_pool.emit && dut.u_valu.step && valu_plog2 != 0) n_pool++;
    if (dut.u_valu.y_ready && dut.u_valu.y_valid && valu_op inside {OP_CONV, OP_DOT}) n_y++;
    if (valu_busy && !dut.u_valu.in_done && dut.u_valu.x_ready && !dut.rd_valid[0]) n_starve++;
    if (dut.u_valu.z_valid && !dut.u_valu.z_ready) n_bp++;
    if ($countones(dut.u_mpmc.req) > 1) n_conflict++;
    if (valu_done) n_op[valu_op]++;
    for (int p = 0; p < 3; p++)
      if ((p_rd_valid[p] && p_rd_ready[p]) || (p_wr_valid[p] && p_wr_ready[p])) n_port[p]++;
  end

  // ports 3..5: 3 (CPU) and 5 (display) read, 4 (video) writes a ramp
  int vcnt = 0;
  always @(negedge clk) begin
    p_rd_ready <= 3'($urandom);
    p_wr_valid[1] <= ($urandom_range(0, 1) == 1);
    p_wr_valid[0] <= 1'b0;
    p_wr_valid[2] <= 1'b0;
  end
  always @(posedge clk) if (p_wr_valid[1] && p_wr_ready[1]) vcnt <= vcnt + 1;
  assign p_wr_data = {16'h0, 16'(vcnt * 5 + 1), 16'h0};

  // ---- control-unit helpers ---------------------------------------------------
  function automatic longint rd(int a); return s16(u_mem.mem[a]); endfunction

  task automatic wr_coef(wr_sel_e s, int a, logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_sel = s; wr_addr = 8'(a); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic port(int p, bit w, int base, int len);
    port_write[p] = w; port_base[p] = 24'(base); port_len[p] = 22'(len);
    port_start[p] = 1;
  endtask

  // run one VALU instruction: x at xa (xn words), y at ya (yn words, 0 =
  // none), z to za (zn words); waits until z is in memory
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
  endtask

  task automatic compare(string name, int za, longint e [$]);
    int bad = 0;
    for (int i = 0; i < e.size(); i++)
      if (rd(za + i) != e[i]) begin
        bad++;
        if (bad < 4) $display("FAIL %s word %0d = %0d, expected %0d", name, i, rd(za + i), e[i]);
      end
    checks++;
    if (bad) failures++;
    $display("%-8s %0d results checked, %0d wrong", name, e.size(), bad);
  endtask

  function automatic longint conv_at(int xa, int w, longint ker [K][K], int i, int j);
    longint s = 0;
    for (int m = 0; m < K; m++)
      for (int n = 0; n < K; n++) s += rd(xa + (i+m)*w + j+n) * ker[m][n];
    return s;
  endfunction

  // ---- the program --------------------------------------------------------------
  localparam int IMG = 1000, IMG2 = 2000, IMG3 = 3000;
  localparam int S1 = 5000, C3Y = 6000, C3 = 7000, NL = 8000;
  localparam int DX = 9000, DY = 10000, DZ = 11000;
  localparam int PA = 12000, PB = 13000, PS = 14000, PP = 15000, PD = 16000;

  initial begin
    longint ker [K][K], ker2 [K][K], ker3 [K][K];
    longint e [$];
    longint v [3];
    int w, h, ow, oh;
    for (int i = 0; i < (1 << 16); i++) u_mem.mem[i] = 16'($urandom_range(0, 1023) - 512);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // background traffic on ports 3..5
    @(negedge clk);
    port(3, 0, 40000, 3000); port(4, 1, 50000, 3000); port(5, 0, 44000, 3000);
    @(negedge clk); port_start = '0;

    // 1. conv + 2x2 subsampling
    w = 22; h = 18; ow = w-K+1; oh = h-K+1;
    for (int m = 0; m < K; m++) for (int n = 0; n < K; n++) begin
      ker[m][n] = $urandom_range(0, 127) - 64;
      wr_coef(WR_KERNEL, m*K+n, 32'(ker[m][n]));
    end
    valu_width = 10'(w); valu_height = 10'(h); valu_plog2 = 1; valu_use_y = 0;
    valu_run(OP_CONV, IMG, w*h, 0, 0, S1, (ow/2)*(oh/2));
    e.delete();
    for (int i = 0; i + 2 <= oh; i += 2) for (int j = 0; j + 2 <= ow; j += 2) begin
      automatic longint s = 0;
      for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++) s += conv_at(IMG, w, ker, i+a, j+b);
      e.push_back(sat16((s >>> 2) >>> 8));
    end
    compare("C1+S2", S1, e);

    // 2. two-plane accumulation: C3Y = conv(IMG3, ker3); C3 = conv(IMG2, ker2) + C3Y
    w = 16; h = 18; ow = w-K+1; oh = h-K+1;
    for (int m = 0; m < K; m++) for (int n = 0; n < K; n++) begin
      ker3[m][n] = $urandom_range(0, 63) - 32;
      wr_coef(WR_KERNEL, m*K+n, 32'(ker3[m][n]));
    end
    valu_width = 10'(w); valu_height = 10'(h); valu_plog2 = 0; valu_use_y = 0;
    valu_run(OP_CONV, IMG3, w*h, 0, 0, C3Y, ow*oh);
    e.delete();
    for (int i = 0; i < oh; i++) for (int j = 0; j < ow; j++) e.push_back(sat16(conv_at(IMG3, w, ker3, i, j) >>> 8));
    compare("C3 p1", C3Y, e);
    for (int m = 0; m < K; m++) for (int n = 0; n < K; n++) begin
      ker2[m][n] = $urandom_range(0, 63) - 32;
      wr_coef(WR_KERNEL, m*K+n, 32'(ker2[m][n]));
    end
    valu_use_y = 1;
    valu_run(OP_CONV, IMG2, w*h, C3Y, ow*oh, C3, ow*oh);
    e.delete();
    for (int i = 0; i < oh; i++) for (int j = 0; j < ow; j++)
      e.push_back(sat16((conv_at(IMG2, w, ker2, i, j) + rd(C3Y + i*ow + j) * 256) >>> 8));
    compare("C3 p2", C3, e);

    // 3. squashing: 4 segments, breakpoints -1, 0, 1 (Q8.8), odd symmetric
    wr_coef(WR_NONLIN, 0, {16'sh8000, 3'd7, 3'd7, -10'sd230});  // x < -1 : -0.9
    wr_coef(WR_NONLIN, 1, {16'shff00, 3'd0, 3'd3, 10'd0});       // -1..0 : 1.125x
    wr_coef(WR_NONLIN, 2, {16'sh0000, 3'd0, 3'd3, 10'd0});       //  0..1 : 1.125x
    for (int i = 3; i < 8; i++) wr_coef(WR_NONLIN, i, {16'sh0100, 3'd7, 3'd7, 10'd230});  // x >= 1 : 0.9
    valu_len = 22'(ow*oh);
    valu_run(OP_NONLIN, C3, ow*oh, 0, 0, NL, ow*oh);
    e.delete();
    for (int i = 0; i < ow*oh; i++) begin
      automatic longint xv = rd(C3 + i);
      e.push_back(xv < -256 ? -230 : xv >= 256 ? 230 : xv + (xv >>> 3));
    end
    compare("NONLIN", NL, e);

    // 4. dot product of 3 interleaved planes with a vector, + y
    for (int k = 0; k < 3; k++) begin
      v[k] = $urandom_range(0, 511) - 256;
      wr_coef(WR_VECTOR, k, 32'(v[k]));
    end
    valu_n = 3; valu_len = 22'(3*100); valu_use_y = 1;
    valu_run(OP_DOT, DX, 300, DY, 100, DZ, 100);
    e.delete();
    for (int q = 0; q < 100; q++) begin
      automatic longint s = rd(DY + q) * 256;
      for (int k = 0; k < 3; k++) s += rd(DX + 3*q + k) * v[k];
      e.push_back(sat16(s >>> 8));
    end
    compare("DOT", DZ, e);

    // 5. point-wise instructions
    for (int i = 0; i < 200; i++) u_mem.mem[PB + i] = (i % 17 == 0) ? 16'd0 : u_mem.mem[PB + i];
    valu_len = 200;
    valu_run(OP_SQRT, PA, 200, 0, 0, PS, 200);
    e.delete();
    for (int i = 0; i < 200; i++) e.push_back(isqrt(rd(PA + i) * 256));
    compare("SQRT", PS, e);
    valu_run(OP_PROD, PA, 200, PB, 200, PP, 200);
    e.delete();
    for (int i = 0; i < 200; i++) e.push_back(sat16((rd(PA + i) * rd(PB + i)) >>> 8));
    compare("PROD", PP, e);
    valu_run(OP_DIV, PA, 200, PB, 200, PD, 200);
    e.delete();
    for (int i = 0; i < 200; i++) begin
      automatic longint a = rd(PA + i), b = rd(PB + i);
      e.push_back(b == 0 ? (a < 0 ? -32768 : 32767) : sat16((a * 256) / b));
    end
    compare("DIV", PD, e);

    // background ports must finish and the video data must be in memory
    while (port_busy[5:3] != '0) @(negedge clk);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 3000; i++) if (u_mem.mem[50000 + i] != 16'(i * 5 + 1)) bad++;
      checks++;
      if (bad) begin failures++; $display("FAIL video port: %0d words wrong", bad); end
    end

    // ---- mechanism report ----
    $display("pooling outputs %0d, y samples %0d, input stalls %0d, output back-pressure %0d, arbitration conflicts %0d",
             n_pool, n_y, n_starve, n_bp, n_conflict);
    $display("ops CONV %0d DOT %0d NONLIN %0d SQRT %0d PROD %0d DIV %0d; port 3/4/5 words %0d/%0d/%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_port[0], n_port[1], n_port[2]);
    foreach (n_op[i]) begin checks++; if (n_op[i] == 0) begin failures++; $display("FAIL op %0d never ran", i); end end
    foreach (n_port[i]) begin checks++; if (n_port[i] == 0) begin failures++; $display("FAIL port %0d idle", i+3); end end
    checks += 5;
    if (n_pool == 0)     begin failures++; $display("FAIL no pooling"); end
    if (n_y == 0)        begin failures++; $display("FAIL no y accumulation"); end
    if (n_starve == 0)   begin failures++; $display("FAIL no input stall"); end
    if (n_bp == 0)       begin failures++; $display("FAIL no output back-pressure"); end
    if (n_conflict == 0) begin failures++; $display("FAIL no arbitration conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
