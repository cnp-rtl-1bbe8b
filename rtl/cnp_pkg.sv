// cnp_pkg: types and constants shared by the ConvNet processor (CNP) RTL.
//
// Samples are 16-bit signed Q8.8 fixed point. Products are Q16.16 and are
// summed in 40-bit accumulators; results are brought back to Q8.8 with
// saturation by sat_q88(). The number format is this design's choice.
package cnp_pkg;

  localparam int unsigned DW    = 16;   // sample width (Q8.8)
  localparam int unsigned FRAC  = 8;    // fractional bits of a sample
  localparam int unsigned ACC_W = 40;   // accumulator width (Q.16 fraction)

  typedef logic signed [DW-1:0]    sample_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // VALU instructions
  typedef enum logic [2:0] {
    OP_CONV   = 3'd0,   // 2D convolution + y + pooling/subsampling
    OP_DOT    = 3'd1,   // dot product of n interleaved planes with a vector
    OP_NONLIN = 3'd2,   // piecewise-linear tanh approximation
    OP_SQRT   = 3'd3,   // point-wise square root
    OP_PROD   = 3'd4,   // point-wise product x*y
    OP_DIV    = 3'd5    // point-wise quotient x/y
  } valu_op_e;

  // Targets of the VALU coefficient write port
  typedef enum logic [1:0] {
    WR_KERNEL = 2'd0,   // conv kernel, address m*K+n
    WR_VECTOR = 2'd1,   // dot-product vector, address k
    WR_NONLIN = 2'd2    // non-linear segment table, address i
  } wr_sel_e;

  // Saturate a Q.16 accumulator (already shifted by 'shift' extra bits)
  // to a Q8.8 sample.
  function automatic sample_t sat_q88(acc_t a, int unsigned shift);
    acc_t s;
    s = a >>> (FRAC + shift);
    if (s > acc_t'(32767))       return sample_t'(16'sh7fff);
    else if (s < -acc_t'(32768)) return sample_t'(16'sh8000);
    else                         return sample_t'(s[DW-1:0]);
  endfunction

endpackage
