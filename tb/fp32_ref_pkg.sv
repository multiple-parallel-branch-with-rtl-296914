// fp32_ref_pkg: testbench reference for single-precision arithmetic, worked
// out in double precision ("real") independently of the RTL.
//
// A product or sum of two fp32 values is exact in double precision, so the
// reference computes it there and rounds it once to fp32 with
// round-to-nearest-even on 24 significant bits. The number conventions match
// the ones the RTL promises: subnormal inputs read as zero, results below
// the smallest normal flush to a signed zero, overflow gives infinity and any
// NaN result is 7FC00000.
package fp32_ref_pkg;

  function automatic real fp_to_real(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'hFF) begin
      d = (x[22:0] != 0) ? 64'h7FF8_0000_0000_0000 : {x[31], 11'h7FF, 52'd0};
    end else if (x[30:23] == 8'd0) begin
      d = {x[31], 63'd0};
    end else begin
      d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_fp(input real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [24:0] mant;
    logic        rb, sb;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) begin
      return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    end
    if (d[62:52] == 11'd0) begin
      return {s, 31'd0};
    end
    e    = int'(d[62:52]) - 1023 + 127;
    mant = {2'b01, d[51:29]};
    rb   = d[28];
    sb   = (d[27:0] != 0);
    if (rb && (sb || mant[0])) begin
      mant = mant + 25'd1;
    end
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), mant[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp(fp_to_real(a) * fp_to_real(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return real_to_fp(fp_to_real(a) + fp_to_real(b));
  endfunction

  function automatic logic [31:0] ref_mac(input logic [31:0] a, input logic [31:0] b,
                                          input logic [31:0] c);
    return ref_add(ref_mul(a, b), c);
  endfunction

  // random fp32 value: mostly normal numbers with exponents near 127 +- spread,
  // sometimes zeros, subnormals, infinities, NaNs or extreme exponents
  function automatic logic [31:0] rand_fp(input int spread);
    int unsigned k;
    int          e;
    k = $urandom_range(0, 99);
    if (k < 2)  return {1'($urandom), 31'd0};
    if (k < 3)  return {1'($urandom), 8'd0, 23'($urandom)};
    if (k < 4)  return {1'($urandom), 8'hFF, 23'd0};
    if (k < 5)  return {1'($urandom), 8'hFF, 23'($urandom) | 23'd1};
    if (k < 15) return {1'($urandom), 8'($urandom_range(1, 254)), 23'($urandom)};
    e = 127 + int'($urandom_range(0, 2 * spread)) - spread;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
