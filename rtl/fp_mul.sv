// fp_mul: IEEE-754 single-precision multiplier (combinational).
//
// This is the multiplier half of the arithmetic unit of a folded branch. The
// design calls for single-precision floating point; the number handling is
// this design's own choice, kept simple for an FPGA datapath:
//   - subnormal inputs are read as zero, and results that would be subnormal
//     are flushed to a signed zero (flush-to-zero);
//   - rounding is round-to-nearest-even on the 48-bit significand product;
//   - overflow gives a signed infinity; any NaN, or 0*inf, gives the quiet NaN
//     7FC00000.
// Interface: a, b in, p = a*b out, no clock; timing is one combinational path.
module fp_mul
  import fxlms_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p
);

  logic        sa, sb, sp;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        rnd, stk, inc;
  logic [24:0] mant_r;
  logic signed [10:0] exp_pre, exp_fin;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sp = sa ^ sb;
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (fa == 23'd0);
    ib = (eb == 8'hFF) && (fb == 23'd0);
    na = (ea == 8'hFF) && (fa != 23'd0);
    nb = (eb == 8'hFF) && (fb != 23'd0);

    prod    = {1'b1, fa} * {1'b1, fb};
    exp_pre = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      mant    = prod[47:24];
      rnd     = prod[23];
      stk     = |prod[22:0];
      exp_pre = exp_pre + 11'sd1;
    end else begin
      mant = prod[46:23];
      rnd  = prod[22];
      stk  = |prod[21:0];
    end
    inc     = rnd & (stk | mant[0]);
    mant_r  = {1'b0, mant} + {24'd0, inc};
    exp_fin = exp_pre;
    if (mant_r[24]) begin
      exp_fin = exp_pre + 11'sd1;
    end

    if (na || nb || (ia && zb) || (ib && za)) begin
      p = FP32_QNAN;
    end else if (ia || ib) begin
      p = {sp, 8'hFF, 23'd0};
    end else if (za || zb) begin
      p = {sp, 31'd0};
    end else if (exp_fin >= 11'sd255) begin
      p = {sp, 8'hFF, 23'd0};
    end else if (exp_fin <= 11'sd0) begin
      p = {sp, 31'd0};
    end else if (mant_r[24]) begin
      p = {sp, exp_fin[7:0], mant_r[23:1]};
    end else begin
      p = {sp, exp_fin[7:0], mant_r[22:0]};
    end
  end

endmodule
