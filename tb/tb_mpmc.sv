// tb_mpmc: self-checking test of the multi-port memory controller.
// Six ports run at once against a 3-cycle-latency memory model: three read
// streams, three write streams of different lengths, consumers and producers
// with random stalls. Each read stream must deliver exactly the memory
// contents at base..base+len-1 in order; each written region must end up
// holding the words produced; busy must drop for every port. The test also
// counts cycles in which several ports request at once (arbitration) and in
// which a read FIFO is full (back-pressure), and fails if either never
// happened. Finally a single unloaded read stream must reach one word per
// cycle.
module tb_mpmc;
  import cnp_pkg::*;

  localparam int NP = 6;
  logic clk = 0, rst_n;
  initial begin rst_n = 1; #1 rst_n = 0; end   // reset edge before the first clock
  logic [NP-1:0] cfg_start = '0, cfg_write = '0, busy;
  logic [NP-1:0][23:0] cfg_base;
  logic [NP-1:0][21:0] cfg_len;
  logic [NP-1:0] rd_valid, rd_ready, wr_valid, wr_ready;
  logic [NP-1:0][DW-1:0] rd_data, wr_data;
  logic mem_req, mem_we, mem_rvalid;
  logic [23:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;

  int checks = 0, failures = 0, conflicts = 0, fullcyc = 0;
  int base [NP] = '{100, 5000, 9000, 2000, 12000, 7000};
  int len  [NP] = '{40, 100, 63, 33, 77, 9};
  bit wr   [NP] = '{0, 1, 0, 1, 0, 1};
  int rcnt [NP], wcnt [NP];

  mpmc #(.NPORTS(NP)) dut (.*);
  ext_mem_model #(.WORDS(1 << 16), .LAT(3)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pattern(int p, int i);
    return 16'(p * 4099 + i * 37 + 11);
  endfunction

  // stream sides: consumers check data, producers count words
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if ($countones(dut.req) > 1) conflicts++;
      for (int p = 0; p < NP; p++) begin
        if (!wr[p] && dut.f_full[p]) fullcyc++;
        if (rd_valid[p] && rd_ready[p]) begin
          checks++;
          if (rd_data[p] !== u_mem.mem[base[p] + rcnt[p]]) begin
            failures++;
            $display("FAIL port %0d word %0d: %h", p, rcnt[p], rd_data[p]);
          end
          rcnt[p] <= rcnt[p] + 1;
        end
        if (wr_valid[p] && wr_ready[p]) wcnt[p] <= wcnt[p] + 1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      wr_data[p] = pattern(p, wcnt[p]);
    end
  end

  always @(negedge clk) begin
    for (int p = 0; p < NP; p++) begin
      rd_ready[p] <= (p == 4) ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 2) != 0);
      wr_valid[p] <= wr[p] && wcnt[p] < len[p] && ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    int t0;
    for (int i = 0; i < (1 << 16); i++) u_mem.mem[i] = 16'(i * 13 + 7);
    for (int p = 0; p < NP; p++) begin rcnt[p] = 0; wcnt[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      cfg_base[p] = 24'(base[p]); cfg_len[p] = 22'(len[p]); cfg_write[p] = wr[p];
    end
    cfg_start = '1;
    @(negedge clk); cfg_start = '0;
    @(negedge clk);
    wait (busy == '0);
    repeat (3) @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (wr[p]) begin
        automatic int bad = 0;
        for (int i = 0; i < len[p]; i++) if (u_mem.mem[base[p] + i] !== pattern(p, i)) begin bad++; if (bad < 3) $display("p%0d i%0d mem %h exp %h", p, i, u_mem.mem[base[p] + i], pattern(p, i)); end
        if (bad != 0 || wcnt[p] != len[p]) begin failures++; $display("FAIL write port %0d: %0d bad", p, bad); end
      end else if (rcnt[p] != len[p]) begin
        failures++; $display("FAIL read port %0d delivered %0d of %0d", p, rcnt[p], len[p]);
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no arbitration conflict happened"); end
    checks++;
    if (fullcyc == 0) begin failures++; $display("FAIL no read FIFO filled up"); end
    $display("arbitration conflicts: %0d cycles, full read FIFO: %0d cycles", conflicts, fullcyc);
    // throughput: one stream alone, always ready
    for (int p = 0; p < NP; p++) begin rcnt[p] = 0; wcnt[p] = 0; end
    base[0] = 300; len[0] = 200; wr = '{0, 0, 0, 0, 0, 0}; len[1] = 0; len[2] = 0;
    force rd_ready = 6'b000001;
    cfg_base[0] = 24'(base[0]); cfg_len[0] = 22'(len[0]); cfg_write[0] = 0;
    cfg_start = 6'b000001;
    @(negedge clk); cfg_start = '0; t0 = $time;
    wait (busy == '0);
    @(negedge clk);
    release rd_ready;
    checks++;
    if (rcnt[0] != 200 || ($time - t0) / 10 > 200 + 8) begin
      failures++; $display("FAIL streaming rate: %0d words in %0d cycles", rcnt[0], ($time - t0) / 10);
    end
    $display("200-word read stream: %0d cycles", ($time - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
