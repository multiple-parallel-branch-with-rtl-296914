// tb_mcfxlms_full: end-to-end testbench of mcfxlms_top at its default size,
// the 4 x 4 x 4 system with L = 200 taps (S = 10 ticks per tap, 2000 ticks
// per sample).
//
// Same three phases as tb_mcfxlms_top: an open-loop phase with back-to-back
// samples and stalls, then closed-loop noise control of the AcousticPlant
// model with a 1 kHz tone and with 400-1500 Hz band-limited noise at a
// 24 kHz sampling rate. All outputs are compared bit for bit with the golden
// model, the accept-to-y_valid latency must be 2002 cycles, and the error
// power at the end of each run must be well below that of the primary noise
// alone.
module tb_mcfxlms_full;
  import fxlms_pkg::*;
  import fp32_ref_pkg::*;
  import fxlms_model_pkg::*;
  localparam int J  = 4;
  localparam int M  = 4;
  localparam int L  = 200;
  localparam int NOPEN = L + 10;
  localparam int NTONE = 5000;
  localparam int NBAND = 8000;
  localparam real MU_TONE = 0.002;
  localparam real MU_BAND = 0.001;
  localparam real TONE_DB = 10.0;
  localparam real BAND_DB = 5.0;
`include "tb_mcfxlms_body.svh"

  mcfxlms_top dut (.*);

endmodule
