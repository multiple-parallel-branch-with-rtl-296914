// fp_add: IEEE-754 single-precision adder (combinational).
//
// The adder half of the arithmetic unit of a folded branch. The operand with
// the larger magnitude is kept, the other is shifted right into a 27-bit
// field (hidden bit, 23 fraction bits, guard, round and sticky bits), the two
// are added or subtracted, the result is normalised with a leading-zero count
// and rounded to nearest even. Number handling is this design's choice, the
// same as fp_mul: subnormal inputs read as zero, subnormal results flush to a
// signed zero, overflow gives infinity, NaN or inf-inf gives 7FC00000. An
// exact zero difference is +0; (-0)+(-0) is -0.
// Interface: a, b in, s = a+b out, no clock; one combinational path.
module fp_add
  import fxlms_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t s
);

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [22:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic        swap, sub;
  logic [7:0]  d;
  logic [26:0] mx, my, my_sh;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic        found;
  logic signed [10:0] exp_n, exp_fin;
  logic        rnd, stk, inc;
  logic [24:0] mant_r;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (fa == 23'd0);
    ib = (eb == 8'hFF) && (fb == 23'd0);
    na = (ea == 8'hFF) && (fa != 23'd0);
    nb = (eb == 8'hFF) && (fb != 23'd0);

    // x: larger magnitude operand, y: smaller one
    swap = {eb, fb} > {ea, fa};
    if (swap) begin
      sx = sb; ex = eb; mx = {1'b1, fb, 3'b000};
      sy = sa; ey = ea; my = za ? 27'd0 : {1'b1, fa, 3'b000};
    end else begin
      sx = sa; ex = ea; mx = {1'b1, fa, 3'b000};
      sy = sb; ey = eb; my = zb ? 27'd0 : {1'b1, fb, 3'b000};
    end
    sub = sx ^ sy;
    d   = ex - ey;

    // align with sticky
    if (d >= 8'd27) begin
      my_sh = {26'd0, (my != 27'd0)};
    end else begin
      my_sh = my >> d;
      if ((my & ((27'd1 << d) - 27'd1)) != 27'd0) begin
        my_sh[0] = 1'b1;
      end
    end

    if (sub) begin
      sum = {1'b0, mx} - {1'b0, my_sh};
    end else begin
      sum = {1'b0, mx} + {1'b0, my_sh};
    end

    exp_n = 11'(signed'({3'b000, ex}));
    lz    = 5'd0;
    found = 1'b0;
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_n = exp_n + 11'sd1;
    end else begin
      for (int k = 26; k >= 0; k--) begin
        if (!found && sum[k]) begin
          found = 1'b1;
          lz    = 5'(26 - k);
        end
      end
      norm  = sum[26:0] << lz;
      exp_n = exp_n - 11'(signed'({6'd0, lz}));
    end

    rnd     = norm[2];
    stk     = norm[1] | norm[0];
    inc     = rnd & (stk | norm[3]);
    mant_r  = {1'b0, norm[26:3]} + {24'd0, inc};
    exp_fin = mant_r[24] ? exp_n + 11'sd1 : exp_n;

    if (na || nb || (ia && ib && (sa != sb))) begin
      s = FP32_QNAN;
    end else if (ia) begin
      s = {sa, 8'hFF, 23'd0};
    end else if (ib) begin
      s = {sb, 8'hFF, 23'd0};
    end else if (za && zb) begin
      s = {sa & sb, 31'd0};
    end else if (za) begin
      s = b;
    end else if (zb) begin
      s = a;
    end else if (sum == 28'd0) begin
      s = FP32_ZERO;
    end else if (exp_fin >= 11'sd255) begin
      s = {sx, 8'hFF, 23'd0};
    end else if (exp_fin <= 11'sd0) begin
      s = {sx, 31'd0};
    end else if (mant_r[24]) begin
      s = {sx, exp_fin[7:0], mant_r[23:1]};
    end else begin
      s = {sx, exp_fin[7:0], mant_r[22:0]};
    end
  end

endmodule
