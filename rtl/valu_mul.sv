// valu_mul: point-wise product of two Q8.8 samples, p = a*b.
//
// The 32-bit Q16.16 product is shifted back to Q8.8 (arithmetic shift,
// rounding toward minus infinity) and saturated. Combinational. The CNP
// paper lists the product of vectors/matrices; the element-wise reading and
// the format are this design's.
module valu_mul
  import cnp_pkg::*;
(
  input  sample_t a,
  input  sample_t b,
  output sample_t p
);

  assign p = sat_q88(acc_t'(a) * acc_t'(b), 0);

endmodule
