// mpmc: multi-port stream memory controller for the external memory.
//
// Each of NPORTS ports moves one stream between the external memory and a
// unit of the chip. The CPU sets a port up with a base address, a length in
// words and a direction (cfg_start pulse); the port then runs on its own:
//   read  port: fetches words base, base+1, ... into its FIFO and offers them
//               on rd_valid/rd_data (rd_ready pops);
//   write port: accepts up to len words on wr_valid/wr_data (wr_ready) into
//               its FIFO and stores them at base, base+1, ...
// busy[p] stays high until the whole stream has been delivered (read) or
// written to memory (write). A read port asks for the memory only while its
// FIFO has room for the word, counting reads still in flight; a write port
// asks while its FIFO holds a word. The priority manager (prio_arbiter)
// grants one port per cycle. Read data comes back in request order; a tag
// FIFO records which port each outstanding read belongs to.
//
// External memory interface: one access per cycle, always accepted
// (mem_req, mem_we, mem_addr, mem_wdata); read data returns in order with
// mem_rvalid, at most TAGS reads outstanding.
//
// The CNP paper describes a multi-port controller that lets the units read
// and write memory streams asynchronously, with a hardware priority manager;
// the port protocol, FIFO sizes, memory protocol and fixed priority are this
// design's choices.
module mpmc
  import cnp_pkg::*;
#(
  parameter int unsigned NPORTS = 6,
  parameter int unsigned AW     = 24,
  parameter int unsigned FD     = 8,   // per-port FIFO depth
  parameter int unsigned TAGS   = 8    // reads outstanding
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // port set-up
  input  logic [NPORTS-1:0]      cfg_start,
  input  logic [NPORTS-1:0]      cfg_write,
  input  logic [NPORTS-1:0][AW-1:0] cfg_base,
  input  logic [NPORTS-1:0][21:0]   cfg_len,
  output logic [NPORTS-1:0]      busy,
  // read streams (memory -> unit)
  output logic [NPORTS-1:0]      rd_valid,
  output logic [NPORTS-1:0][DW-1:0] rd_data,
  input  logic [NPORTS-1:0]      rd_ready,
  // write streams (unit -> memory)
  input  logic [NPORTS-1:0]      wr_valid,
  input  logic [NPORTS-1:0][DW-1:0] wr_data,
  output logic [NPORTS-1:0]      wr_ready,
  // external memory
  output logic                   mem_req,
  output logic                   mem_we,
  output logic [AW-1:0]          mem_addr,
  output logic [DW-1:0]          mem_wdata,
  input  logic                   mem_rvalid,
  input  logic [DW-1:0]          mem_rdata
);

  localparam int unsigned PIW = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  localparam int unsigned FCW = $clog2(FD) + 1;

  logic [NPORTS-1:0]         is_wr;
  logic [NPORTS-1:0][AW-1:0] addr;
  logic [NPORTS-1:0][21:0]   issue_left;   // memory accesses still to make
  logic [NPORTS-1:0][21:0]   take_left;    // write words still to accept
  logic [NPORTS-1:0][FCW-1:0] infl;        // reads in flight per port
  logic [NPORTS-1:0]         req, gnt;
  logic [NPORTS-1:0]         f_push, f_pop, f_full, f_empty;
  logic [NPORTS-1:0][DW-1:0] f_wdata, f_rdata;
  logic [NPORTS-1:0][FCW-1:0] f_count;
  logic [PIW-1:0]            gidx, rtag;
  logic                      tag_full, tag_empty;
  logic [$clog2(TAGS):0]     tag_count;

  // ---- per-port FIFOs and requests ------------------------------------------
  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    sfifo #(.W(DW), .DEPTH(FD)) u_fifo (
      .clk, .rst_n,
      .clear (cfg_start[p]),
      .push  (f_push[p]),
      .wdata (f_wdata[p]),
      .pop   (f_pop[p]),
      .rdata (f_rdata[p]),
      .count (f_count[p]),
      .full  (f_full[p]),
      .empty (f_empty[p])
    );

    always_comb begin
      if (is_wr[p]) begin
        wr_ready[p] = (take_left[p] != '0) && !f_full[p];
        f_push[p]   = wr_valid[p] && wr_ready[p];
        f_wdata[p]  = wr_data[p];
        f_pop[p]    = gnt[p];
        rd_valid[p] = 1'b0;
        req[p]      = !f_empty[p];
      end else begin
        wr_ready[p] = 1'b0;
        f_push[p]   = mem_rvalid && (rtag == PIW'(p));
        f_wdata[p]  = mem_rdata;
        f_pop[p]    = rd_valid[p] && rd_ready[p];
        rd_valid[p] = !f_empty[p];
        req[p]      = (issue_left[p] != '0) && !tag_full
                      && ((f_count[p] + infl[p]) < FCW'(FD));
      end
      rd_data[p] = f_rdata[p];
      busy[p]    = (issue_left[p] != '0) || !f_empty[p] || (infl[p] != '0);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        is_wr[p] <= 1'b0; addr[p] <= '0; issue_left[p] <= '0;
        take_left[p] <= '0; infl[p] <= '0;
      end else if (cfg_start[p]) begin
        is_wr[p]      <= cfg_write[p];
        addr[p]       <= cfg_base[p];
        issue_left[p] <= cfg_len[p];
        take_left[p]  <= cfg_write[p] ? cfg_len[p] : '0;
        infl[p]       <= '0;
      end else begin
        if (gnt[p]) begin
          addr[p]       <= addr[p] + 1;
          issue_left[p] <= issue_left[p] - 1;
        end
        if (is_wr[p] && f_push[p]) take_left[p] <= take_left[p] - 1;
        if (!is_wr[p])
          infl[p] <= infl[p] + FCW'(gnt[p]) - FCW'(f_push[p]);
      end
    end
  end

  // ---- priority manager -------------------------------------------------------
  prio_arbiter #(.N(NPORTS)) u_prio (.req(req), .gnt(gnt));

  always_comb begin
    gidx = '0;
    for (int p = 0; p < NPORTS; p++) if (gnt[p]) gidx = PIW'(p);
  end

  assign mem_req   = |gnt;
  assign mem_we    = mem_req && is_wr[gidx];
  assign mem_addr  = addr[gidx];
  assign mem_wdata = f_rdata[gidx];

  // ---- tags of reads in flight -----------------------------------------------
  sfifo #(.W(PIW), .DEPTH(TAGS)) u_tags (
    .clk, .rst_n,
    .clear (1'b0),
    .push  (mem_req && !mem_we),
    .wdata (gidx),
    .pop   (mem_rvalid),
    .rdata (rtag),
    .count (tag_count),
    .full  (tag_full),
    .empty (tag_empty)
  );

  assert property (@(posedge clk) disable iff (!rst_n) mem_rvalid |-> !tag_empty)
    else $error("mpmc: read data without a read in flight");

endmodule
