// valu_sqrt: point-wise square root of a Q8.8 sample.
//
// sqrt of a Q8.8 value v = X/256 in Q8.8 is isqrt(X * 256), computed here
// with the digit-by-digit (restoring) method, one result bit per loop step,
// fully combinational. The result is truncated; negative inputs give 0.
// The CNP paper lists the operation only; the algorithm is this design's.
module valu_sqrt
  import cnp_pkg::*;
(
  input  sample_t x,
  output sample_t y
);

  logic [23:0] rad;     // X * 256
  logic [25:0] rem, trial;
  logic [11:0] root;

  always_comb begin
    rad  = x[15] ? 24'd0 : {x[15:0], 8'd0};
    rem  = '0;
    root = '0;
    for (int i = 11; i >= 0; i--) begin
      rem   = {rem[23:0], rad[2*i+1 -: 2]};
      trial = {12'd0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[10:0], 1'b1};
      end else begin
        root = {root[10:0], 1'b0};
      end
    end
    y = {4'd0, root};
  end

endmodule
