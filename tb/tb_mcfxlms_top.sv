// tb_mcfxlms_top: end-to-end testbench of the multichannel FxLMS engine at a
// reduced size (J = 2 branches, M = 2 error microphones, L = 16 taps).
//
// Phase 1, open loop: random secondary-path estimates and random samples are
// offered with sample_valid held high, so samples are taken back to back and
// the source stalls while the engine is busy; every y_j(n) is compared bit
// for bit with FxlmsModel, and the accept-to-y_valid latency must be S*L+2.
// Coefficient writes during the memory clear must be ignored.
// Phase 2 and 3, closed loop: the engine is reset and controls AcousticPlant,
// first with a tonal primary noise at 1/24 of the sampling rate (1 kHz at
// 24 kHz), then with band-limited noise (about 400 to 1500 Hz at 24 kHz). The
// error signals fed back are computed from the engine's own outputs; outputs
// are still compared bit for bit with the model, and over the last quarter of
// the run the error power must be well below the power of the primary noise
// alone at the error microphones (the noise reduction of the controller).
// Each mechanism (clear, coefficient load, stall, back-to-back sample,
// delay-line wrap, weight adaptation, noise reduction) is counted and must
// have happened at least once.
module tb_mcfxlms_top;
  import fxlms_pkg::*;
  import fp32_ref_pkg::*;
  import fxlms_model_pkg::*;
  localparam int J  = 2;
  localparam int M  = 2;
  localparam int L  = 16;
  localparam int NOPEN = 3 * L;
  localparam int NTONE = 3000;
  localparam int NBAND = 4000;
  localparam real MU_TONE = 0.004;
  localparam real MU_BAND = 0.002;
  localparam real TONE_DB = 10.0;
  localparam real BAND_DB = 5.0;
`include "tb_mcfxlms_body.svh"

  mcfxlms_top #(.J(J), .M(M), .L(L)) dut (.*);

endmodule
