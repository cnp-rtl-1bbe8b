// nonlin: point-wise piecewise-linear squashing function.
//
// Approximates A*tanh(B*x) by NSEG line segments g(x) = a_i*x + b_i, where
// every slope is a sum of two powers of two, a_i = 2^-m_i + 2^-n_i, so the
// product is two arithmetic shifts and an add (no multiplier), as in the CNP
// paper with m, n in 0..5. Segment i applies for l_i <= x < l_(i+1);
// segment 0 extends to minus infinity and its breakpoint is ignored.
// Breakpoints must be ascending. As an addition of this design, a shift code
// of 6 or 7 drops that term, so flat tails (slope 0) can be expressed.
//
// Table word (tw_data, loaded by the CPU at address i):
//   [31:16] l_i (Q8.8)   [15:13] m_i   [12:10] n_i   [9:0] b_i (signed,
//   Q2.8, i.e. offsets in -2.0 .. +1.996)
// The output is combinational from x and saturated to Q8.8.
module nonlin
  import cnp_pkg::*;
#(
  parameter int unsigned NSEG = 8
) (
  input  logic                    clk,
  input  logic                    tw_en,
  input  logic [$clog2(NSEG)-1:0] tw_addr,
  input  logic [31:0]             tw_data,
  input  sample_t                 x,
  output sample_t                 y
);

  logic [31:0] tab [NSEG];
  localparam int unsigned SW = $clog2(NSEG);
  logic [SW-1:0] seg;
  logic [15:0]   e;
  logic signed [19:0] t_m, t_n, b, s;

  always_ff @(posedge clk) begin
    if (tw_en) tab[tw_addr] <= tw_data;
  end

  // segment select: the last breakpoint not above x
  always_comb begin
    seg = '0;
    for (int unsigned i = 1; i < NSEG; i++)
      if (x >= $signed(tab[i][31:16])) seg = SW'(i);
  end

  always_comb begin
    e   = tab[seg][15:0];
    t_m = (e[15:13] > 3'd5) ? 20'sd0 : (20'(x) >>> e[15:13]);
    t_n = (e[12:10] > 3'd5) ? 20'sd0 : (20'(x) >>> e[12:10]);
    b   = 20'($signed(e[9:0]));
    s   = t_m + t_n + b;
    if (s > 20'sd32767)       y = 16'sh7fff;
    else if (s < -20'sd32768) y = 16'sh8000;
    else                      y = s[15:0];
  end

endmodule
