// fxlms_pkg: types and constants shared by the folded multichannel FxLMS engine.
//
// All arithmetic is IEEE-754 single precision (fp32_t). The folding schedule
// splits every tap iteration of a branch into S = 2(M+1) clock ticks; each
// tick carries one of four operations of the arithmetic unit (phase_e):
//   PH_SPATH  transposed secondary-path filter step  x''_jm(l) = s_mj(l)*x_j(n) + x''_jm(l+1)
//   PH_GRAD   error/filtered-reference accumulation g = sum_m e_m(n)*x'_jm(n-l)
//   PH_WUPD   weight update                          w_jl = mu*g + w_jl
//   PH_YOUT   control filter step                    y' = w_jl*x_j(n-l) + y'
// The operation split follows the original architecture; the encoding is this design's choice.
package fxlms_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_QNAN = 32'h7FC0_0000;

  typedef enum logic [1:0] {
    PH_SPATH = 2'd0,
    PH_GRAD  = 2'd1,
    PH_WUPD  = 2'd2,
    PH_YOUT  = 2'd3
  } phase_e;

endpackage
