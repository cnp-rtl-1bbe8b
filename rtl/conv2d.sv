// conv2d: streaming K x K two-dimensional convolver.
//
// The input plane arrives as a raster stream, one sample per 'step'. Every
// sample is broadcast to all K*K multipliers. Within kernel row m, the
// products are summed through a chain of one-cycle registers (a transposed
// FIR), so after K samples the chain holds a partial sum over K adjacent
// columns. That row result is delayed by a further W-K steps in a delay line
// (W = plane width) and fed into the first adder of row m+1, which lines it
// up with the samples of the next image line. Row 0 starts from zero. The
// value entering the last register of row K-1 is therefore
//     sum_{m,n} x[i+m][j+n] * ker[m][n]
// for the window whose bottom-right corner is the sample being accepted.
// This arrangement of multipliers, adders, unit delays and (W-K)-step line
// delays follows the convolver structure of the CNP paper; the run-time
// width, the number format and the interface are this design's choices.
//
// Interface and timing:
//   start         one-cycle pulse before a plane: clears the raster counters.
//   cfg_width/height  plane size, K <= width <= W_MAX, height >= K.
//   kw_*          kernel load, coefficient ker[m][n] at address m*K+n.
//   step, x       a sample is consumed in this cycle.
//   o_valid/o_acc/o_row/o_col  combinational, for the sample presented on x
//                 (whether or not 'step' takes it this cycle): the window
//                 ending at that sample is complete; o_acc
//                 is the Q16.16 sum of output pixel (o_row, o_col). The
//                 output plane is (height-K+1) x (width-K+1).
//   last_in       the current sample is the last of the plane.
// Smaller kernels are run by zero-padding them to K x K.
module conv2d
  import cnp_pkg::*;
#(
  parameter int unsigned K     = 7,
  parameter int unsigned W_MAX = 640
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [9:0]             cfg_width,
  input  logic [9:0]             cfg_height,
  input  logic                   kw_en,
  input  logic [$clog2(K*K)-1:0] kw_addr,
  input  sample_t                kw_data,
  input  logic                   step,
  input  sample_t                x,
  output logic                   o_valid,
  output acc_t                   o_acc,
  output logic [9:0]             o_row,
  output logic [9:0]             o_col,
  output logic                   last_in
);

  localparam int unsigned LD = (W_MAX > K) ? W_MAX - K : 1;   // delay-line depth
  localparam int unsigned PW = $clog2(LD);

  sample_t ker [K*K];
  acc_t    a   [K][K];          // partial-sum registers of each kernel row
  acc_t    a_nx[K][K];
  acc_t    row_in [K];          // value entering the first adder of a row
  acc_t    dl_rd  [K-1];        // (W-K)-step delay lines between rows
  acc_t    dl_out [K-1];
  logic [PW-1:0] dptr;
  logic [9:0]    r, c;
  logic [9:0]    dlen;

  assign dlen = cfg_width - 10'(K);

  // kernel registers, written by the CPU
  always_ff @(posedge clk) begin
    if (kw_en) ker[kw_addr] <= kw_data;
  end

  // delay lines: each returns the row result written dlen steps earlier;
  // a zero-length line passes the row result straight through
  for (genvar m = 0; m < K-1; m++) begin : g_line
    line_delay #(.W(ACC_W), .DEPTH(LD)) u_line (
      .clk,
      .en   (step),
      .ptr  (dptr),
      .din  (a[m][K-1]),
      .dout (dl_rd[m])
    );
  end

  always_comb begin
    for (int m = 0; m < K-1; m++)
      dl_out[m] = (dlen == 0) ? a[m][K-1] : dl_rd[m];
    row_in[0] = '0;
    for (int m = 1; m < K; m++) row_in[m] = dl_out[m-1];
  end

  // multiply-accumulate cells
  always_comb begin
    for (int m = 0; m < K; m++) begin
      for (int n = 0; n < K; n++) begin
        acc_t prod;
        prod = acc_t'(x) * acc_t'(ker[m*K+n]);
        a_nx[m][n] = ((n == 0) ? row_in[m] : a[m][n-1]) + prod;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (step) begin
      for (int m = 0; m < K; m++)
        for (int n = 0; n < K; n++) a[m][n] <= a_nx[m][n];
    end
  end

  // raster position of the incoming sample and delay-line pointer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; c <= '0; dptr <= '0;
    end else if (start) begin
      r <= '0; c <= '0; dptr <= '0;
    end else if (step) begin
      if (c == cfg_width - 1) begin
        c <= '0;
        r <= r + 1;
      end else begin
        c <= c + 1;
      end
      if (dlen <= 1 || 10'(dptr) == dlen - 1) dptr <= '0;  // cycle 0 .. dlen-1
      else                                     dptr <= dptr + 1;
    end
  end

  assign o_valid = (r >= 10'(K-1)) && (c >= 10'(K-1));
  assign o_acc   = a_nx[K-1][K-1];
  assign o_row   = r - 10'(K-1);
  assign o_col   = c - 10'(K-1);
  assign last_in = (r == cfg_height - 1) && (c == cfg_width - 1);

endmodule
