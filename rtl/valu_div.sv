// valu_div: point-wise quotient of two Q8.8 samples, q = a/b.
//
// Computes (a * 256) / b as a truncating signed division of a 24-bit
// dividend by a 16-bit divisor, then saturates to Q8.8. A zero divisor
// gives the largest value with the sign of a (0x7fff for a >= 0, 0x8000
// otherwise). Combinational. The CNP paper lists the operation only; the
// algorithm and the zero-divisor rule are this design's.
module valu_div
  import cnp_pkg::*;
(
  input  sample_t a,
  input  sample_t b,
  output sample_t q
);

  logic signed [25:0] num, den, quo;

  always_comb begin
    num = 26'(a) <<< FRAC;
    den = 26'(b);
    quo = (b == '0) ? 26'sd0 : num / den;
    if (b == '0)              q = a[15] ? 16'sh8000 : 16'sh7fff;
    else if (quo > 26'sd32767)  q = 16'sh7fff;
    else if (quo < -26'sd32768) q = 16'sh8000;
    else                        q = quo[15:0];
  end

endmodule
