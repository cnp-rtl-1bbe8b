// tb_cnp_full: one complete full-size operation at the default parameters.
// Runs the first layer of the face-detection network on a 512x384 image:
// a 7x7 convolution followed by 2x2 subsampling, giving a 253x189 map
// (the C1 -> S2 step), with the image and the result in the external memory
// model. Every output word is compared with the definition, and the cycle
// count is checked against the memory bound: one memory access per cycle,
// so reading 512*384 samples and writing 253*189 results needs at least
// their sum in cycles; the design must stay within 1% of it.
module tb_cnp_full;
  import cnp_pkg::*;
  import cnp_ref::*;

  localparam int K = 7, W = 512, H = 384;
  localparam int OW = W - K + 1, OH = H - K + 1, PW = OW / 2, PH = OH / 2;
  localparam int IMG = 0, OUT = 400000;

  logic clk = 0, rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end   // reset edge before the first clock
  logic valu_start = 0, valu_busy, valu_done, valu_use_y = 0;
  valu_op_e valu_op = OP_CONV;
  logic [9:0] valu_width = 10'(W), valu_height = 10'(H);
  logic [1:0] valu_plog2 = 2'd1;
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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint px(int r, int c);
    return s16(u_mem.mem[IMG + r*W + c]);
  endfunction

  initial begin
    longint ker [K][K];
    int t0, cyc, bad, bound;
    // image: a smooth pattern plus noise, in Q8.8 within +-2.0
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        u_mem.mem[IMG + r*W + c] = 16'(((r * 7 + c * 3) % 512) - 256 + $urandom_range(0, 31));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < K; m++)
      for (int n = 0; n < K; n++) begin
        ker[m][n] = $urandom_range(0, 63) - 32;
        @(negedge clk); wr_en = 1; wr_addr = 8'(m*K + n); wr_data = 32'(ker[m][n]);
      end
    @(negedge clk); wr_en = 0;
    port_write = 6'b000100;
    port_base[0] = 24'(IMG); port_len[0] = 22'(W*H);
    port_base[2] = 24'(OUT); port_len[2] = 22'(PW*PH);
    port_start = 6'b000101;
    @(negedge clk); port_start = '0; valu_start = 1; t0 = $time;
    @(negedge clk); valu_start = 0;
    while (!valu_done) @(negedge clk);
    while (port_busy[2]) @(negedge clk);
    cyc = ($time - t0) / 10;
    // compare every output with the definition
    bad = 0;
    for (int i = 0; i < PH; i++)
      for (int j = 0; j < PW; j++) begin
        automatic longint s = 0;
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++)
            for (int m = 0; m < K; m++)
              for (int n = 0; n < K; n++)
                s += px(2*i + a + m, 2*j + b + n) * ker[m][n];
        checks++;
        if (s16(u_mem.mem[OUT + i*PW + j]) != sat16((s >>> 2) >>> 8)) begin
          bad++; failures++;
          if (bad < 5) $display("FAIL out[%0d][%0d] = %0d, expected %0d", i, j,
                                s16(u_mem.mem[OUT + i*PW + j]), sat16((s >>> 2) >>> 8));
        end
      end
    bound = W*H + PW*PH;
    $display("%0dx%0d 7x7 conv + 2x2 subsampling -> %0dx%0d: %0d cycles (memory bound %0d)",
             W, H, PW, PH, cyc, bound);
    checks++;
    if (cyc > bound + bound / 100) begin failures++; $display("FAIL too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
