// cnp_top: the hardware of the ConvNet processor (CNP) on one FPGA.
//
// A vector ALU (valu) computes the ConvNet operations on streams; a
// multi-port memory controller (mpmc) with a priority manager feeds it from,
// and returns its results to, one external memory. Memory-controller ports:
//   0  read   VALU input stream x
//   1  read   VALU input stream y
//   2  write  VALU output stream z
//   3  r/w    soft processor memory I/O       (brought out: p_*[0])
//   4  r/w    video manager, camera frames    (brought out: p_*[1])
//   5  r/w    display manager, screen frames  (brought out: p_*[2])
// The soft processor that sequences the network (the control unit is a
// program on it) is not part of this RTL: its VALU instruction and
// coefficient-load signals and the set-up of all six memory ports are inputs
// of this module. To run a VALU instruction the controller sets up ports 0
// (and 1) as reads of the operand planes and port 2 as a write of the result
// plane, then pulses valu_start; valu_done and port busy flags tell when the
// result is in memory. The block structure follows the CNP paper's
// architecture diagram; the port numbering and the signal-level interfaces
// are this design's.
module cnp_top
  import cnp_pkg::*;
#(
  parameter int unsigned K     = 7,
  parameter int unsigned W_MAX = 640,
  parameter int unsigned N_MAX = 16,
  parameter int unsigned NSEG  = 8,
  parameter int unsigned AW    = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  // VALU instruction (from the control unit)
  input  logic        valu_start,
  input  valu_op_e    valu_op,
  input  logic [9:0]  valu_width,
  input  logic [9:0]  valu_height,
  input  logic [1:0]  valu_plog2,
  input  logic        valu_use_y,
  input  logic [$clog2(N_MAX):0] valu_n,
  input  logic [21:0] valu_len,
  output logic        valu_busy,
  output logic        valu_done,
  // coefficient loads (kernel manager)
  input  logic        wr_en,
  input  wr_sel_e     wr_sel,
  input  logic [7:0]  wr_addr,
  input  logic [31:0] wr_data,
  // memory port set-up, ports 0..5
  input  logic [5:0]  port_start,
  input  logic [5:0]  port_write,
  input  logic [5:0][AW-1:0] port_base,
  input  logic [5:0][21:0]   port_len,
  output logic [5:0]  port_busy,
  // streams of ports 3..5
  output logic [2:0]  p_rd_valid,
  output logic [2:0][DW-1:0] p_rd_data,
  input  logic [2:0]  p_rd_ready,
  input  logic [2:0]  p_wr_valid,
  input  logic [2:0][DW-1:0] p_wr_data,
  output logic [2:0]  p_wr_ready,
  // external memory
  output logic        mem_req,
  output logic        mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic        mem_rvalid,
  input  logic [DW-1:0] mem_rdata
);

  logic [5:0]         rd_valid, rd_ready, wr_valid, wr_ready;
  logic [5:0][DW-1:0] rd_data, wr_data_m;
  logic               x_ready, y_ready, z_valid;
  sample_t            z_data;

  valu #(.K(K), .W_MAX(W_MAX), .N_MAX(N_MAX), .NSEG(NSEG)) u_valu (
    .clk, .rst_n,
    .start     (valu_start),
    .op        (valu_op),
    .cfg_width (valu_width),
    .cfg_height(valu_height),
    .cfg_plog2 (valu_plog2),
    .cfg_use_y (valu_use_y),
    .cfg_n     (valu_n),
    .cfg_len   (valu_len),
    .busy      (valu_busy),
    .done      (valu_done),
    .wr_en, .wr_sel, .wr_addr, .wr_data,
    .x_valid   (rd_valid[0]),
    .x_data    (rd_data[0]),
    .x_ready   (x_ready),
    .y_valid   (rd_valid[1]),
    .y_data    (rd_data[1]),
    .y_ready   (y_ready),
    .z_valid   (z_valid),
    .z_data    (z_data),
    .z_ready   (wr_ready[2])
  );

  always_comb begin
    rd_ready  = {p_rd_ready, 1'b0, y_ready, x_ready};
    wr_valid  = {p_wr_valid, z_valid, 2'b00};
    wr_data_m = {p_wr_data, z_data, {DW{1'b0}}, {DW{1'b0}}};
  end

  assign p_rd_valid = rd_valid[5:3];
  assign p_rd_data  = rd_data[5:3];
  assign p_wr_ready = wr_ready[5:3];

  mpmc #(.NPORTS(6), .AW(AW)) u_mpmc (
    .clk, .rst_n,
    .cfg_start (port_start),
    .cfg_write (port_write),
    .cfg_base  (port_base),
    .cfg_len   (port_len),
    .busy      (port_busy),
    .rd_valid, .rd_data, .rd_ready,
    .wr_valid, .wr_data (wr_data_m), .wr_ready,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata
  );

endmodule
