// tb_conv640: convolution of a 640x480 camera frame with K x K kernels,
// K = 1, 3, 5, 7, at the design's default parameters (7x7 grid). A smaller
// kernel is placed in the top-left corner of the 7x7 grid with zeros
// elsewhere; the output plane is then 634x474 and every output equals the
// K x K convolution at that position. Every output word is checked, and the
// cycle count must be the same for every K (the convolver's time depends
// only on the input size) and within 1% of the memory bound (one access per
// cycle: 640*480 reads + 634*474 writes).
module tb_conv640;
  import cnp_pkg::*;
  import cnp_ref::*;

  localparam int G = 7, W = 640, H = 480;
  localparam int OW = W - G + 1, OH = H - G + 1;
  localparam int IMG = 0, OUT = 400000;

  logic clk = 0, rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end   // reset edge before the first clock
  logic valu_start = 0, valu_busy, valu_done, valu_use_y = 0;
  valu_op_e valu_op = OP_CONV;
  logic [9:0] valu_width = 10'(W), valu_height = 10'(H);
  logic [1:0] valu_plog2 = 2'd0;
  logic [4:0] valu_n = '0;
  logic [21:0] valu_len = '0;
  logic wr_en = 0;
  wr_sel_e wr_sel = WR_KERNEL;
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

  int checks = 0, failures = 0;

  cnp_top dut (.*);
  ext_mem_model #(.WORDS(1 << 20), .LAT(3)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ker [G][G];
    int t0, cyc, cyc_first, bad, bound;
    for (int i = 0; i < W*H; i++) u_mem.mem[IMG + i] = 16'($urandom_range(0, 511) - 256);
    repeat (3) @(negedge clk);
    rst_n = 1;
    bound = W*H + OW*OH;
    cyc_first = 0;
    for (int k = 1; k <= G; k += 2) begin
      for (int m = 0; m < G; m++)
        for (int n = 0; n < G; n++) begin
          ker[m][n] = (m < k && n < k) ? longint'($urandom_range(0, 63)) - 32 : 0;
          @(negedge clk); wr_en = 1; wr_addr = 8'(m*G + n); wr_data = 32'(ker[m][n]);
        end
      @(negedge clk); wr_en = 0;
      port_write = 6'b000100;
      port_base[0] = 24'(IMG); port_len[0] = 22'(W*H);
      port_base[2] = 24'(OUT); port_len[2] = 22'(OW*OH);
      port_start = 6'b000101;
      @(negedge clk); port_start = '0; valu_start = 1; t0 = $time;
      @(negedge clk); valu_start = 0;
      while (!valu_done) @(negedge clk);
      while (port_busy[2]) @(negedge clk);
      cyc = ($time - t0) / 10;
      bad = 0;
      for (int i = 0; i < OH; i++)
        for (int j = 0; j < OW; j++) begin
          automatic longint s = 0;
          for (int m = 0; m < k; m++)
            for (int n = 0; n < k; n++)
              s += s16(u_mem.mem[IMG + (i+m)*W + j+n]) * ker[m][n];
          if (s16(u_mem.mem[OUT + i*OW + j]) != sat16(s >>> 8)) begin
            bad++;
            if (bad < 4) $display("FAIL k=%0d out[%0d][%0d]", k, i, j);
          end
        end
      checks++;
      if (bad) failures++;
      $display("%0dx%0d kernel on 640x480: %0d cycles (memory bound %0d), %0d outputs wrong",
               k, k, cyc, bound, bad);
      if (k == 1) cyc_first = cyc;
      checks++;
      if (cyc != cyc_first || cyc > bound + bound / 100) begin
        failures++; $display("FAIL cycle count %0d", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
