// pool2d: non-overlapping P x P average pooling (subsampling) of a stream.
//
// Input samples arrive in raster order with their coordinates (the output of
// the convolver). A horizontal accumulator sums P adjacent samples of a line;
// every completed horizontal sum is added into a one-line buffer indexed by
// output column. On the last line of a window row the buffer entry plus the
// new horizontal sum is the window total, which is emitted in the same cycle,
// divided by P*P with an arithmetic shift. Samples beyond the last complete
// window at the right or bottom edge are dropped (247x183 -> 123x91 for
// P = 2). No reset is needed: the first sample of every window overwrites
// the accumulators. P is 2**cfg_plog2; cfg_plog2 = 0 passes every sample through.
// The CNP paper applies pooling at the convolver output; the choice of an
// average, the power-of-two sizes and the interface are this design's.
//
// Timing: 'emit' and 'out_acc' are combinational from the presented sample
// (in_valid), so a caller can see whether a result will appear before it
// commits the sample with 'adv'; state is updated at the clock edge.
module pool2d
  import cnp_pkg::*;
#(
  parameter int unsigned W_MAX  = 640
) (
  input  logic       clk,
  input  logic [1:0] cfg_plog2,
  input  logic [9:0] cfg_ow,       // width of the incoming plane
  input  logic       in_valid,     // a sample is presented
  input  logic       adv,          // ... and is taken this cycle
  input  acc_t       in_acc,
  input  logic [9:0] in_row,
  input  logic [9:0] in_col,
  output logic       emit,
  output acc_t       out_acc
);

  localparam int unsigned NB = W_MAX / 2;
  localparam int unsigned BW = $clog2(NB);

  acc_t       hacc;
  acc_t       rowbuf [NB];
  acc_t       hsum, wsum;
  logic [9:0] pmask, ncols;
  logic [BW-1:0] bcol;
  logic       in_win, col_last, row_first, row_last;

  assign pmask     = (10'd1 << cfg_plog2) - 10'd1;
  assign ncols     = (cfg_ow >> cfg_plog2) << cfg_plog2;   // columns in whole windows
  assign bcol      = BW'(in_col >> cfg_plog2);
  assign in_win    = in_col < ncols;
  assign col_last  = (in_col & pmask) == pmask;
  assign row_first = (in_row & pmask) == 10'd0;
  assign row_last  = (in_row & pmask) == pmask;

  // horizontal sum including the current sample
  assign hsum = (((in_col & pmask) == 10'd0) ? acc_t'(0) : hacc) + in_acc;
  assign wsum = (row_first ? acc_t'(0) : rowbuf[bcol]) + hsum;

  always_comb begin
    if (cfg_plog2 == 2'd0) begin
      emit    = in_valid;
      out_acc = in_acc;
    end else begin
      emit    = in_valid && in_win && col_last && row_last;
      out_acc = wsum >>> (2 * cfg_plog2);
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && adv && in_win) begin
      hacc <= hsum;
      if (col_last) rowbuf[bcol] <= wsum;
    end
  end

endmodule
