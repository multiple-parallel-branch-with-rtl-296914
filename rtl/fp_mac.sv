// fp_mac: the arithmetic unit of a folded branch, r = (a * b) + c in IEEE-754
// single precision (combinational).
//
// The original architecture builds each branch around one multiplier and one adder that
// are used once per clock tick; this module is that pair. The product is
// rounded before the addition (two roundings, not a fused multiply-add), as
// with a separate floating-point multiplier and adder; that, and the number
// handling inherited from fp_mul/fp_add (flush-to-zero, round to nearest
// even), is this design's choice.
// Interface: a, b, c in, r out, no clock; the branch registers r.
module fp_mac
  import fxlms_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t c,
  output fp32_t r
);

  fp32_t p;

  fp_mul u_mul (.a(a), .b(b), .p(p));
  fp_add u_add (.a(p), .b(c), .s(r));

endmodule
