// mcfxlms_top: J x J x M multichannel filtered-x LMS engine built as
// "multiple parallel branches with folding".
//
// Reference channel j drives only control filter j, which drives secondary
// source j; the M error microphones are shared. The engine is split into J
// identical branches (fxlms_branch), one per reference/source pair, that run
// in parallel; each branch folds all of its multiplications and additions onto
// one floating-point multiplier and one adder, used once per clock tick.
// A single controller (fold_sched) steps every branch through the same
// schedule of S = 2(M+1) ticks per tap and S*L ticks per sample, so the whole
// engine has J arithmetic units. With the default 4 x 4 x 4 system and
// L = 200 taps one sample takes S*L = 2000 ticks; at a 50 MHz clock that
// allows a sampling rate of up to about 25 kHz. All of this follows the
// original architecture.
//
// This design's own choices: the valid/ready sample handshake, registering
// e_m(n) and mu with the sample, the clear of all memories after reset, the
// coefficient port, and IEEE-754 single-precision details (see fp_mul).
//
// Interface and timing:
//   - After reset the memories are cleared for M*L cycles; sample_ready is low
//     meanwhile and coefficient writes are ignored.
//   - coef_we writes secondary-path estimate s_{coef_m, coef_branch}(coef_l)
//     (path from source coef_branch to microphone coef_m), while idle.
//   - A sample (x_in[j] = x_j(n), e_in[m] = e_m(n), mu) is taken in a cycle
//     with sample_valid && sample_ready. y_out[j] = y_j(n) is valid when
//     y_valid pulses, S*L+2 cycles later, and is held until the next one.
//     A new sample can be taken every S*L+1 cycles. An assertion flags
//     coefficient writes made while a sample is being processed.
module mcfxlms_top
  import fxlms_pkg::*;
#(
  parameter int unsigned J  = 4,
  parameter int unsigned M  = 4,
  parameter int unsigned L  = 200,
  localparam int unsigned JW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned AW = (M * L > 1) ? $clog2(M * L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // samples
  input  logic          sample_valid,
  output logic          sample_ready,
  input  fp32_t         x_in [J],
  input  fp32_t         e_in [M],
  input  fp32_t         mu,
  output fp32_t         y_out [J],
  output logic          y_valid,
  // secondary-path estimates
  input  logic          coef_we,
  input  logic [JW-1:0] coef_branch,
  input  logic [MW-1:0] coef_m,
  input  logic [LW-1:0] coef_l,
  input  fp32_t         coef_data
);

  logic          accept, clr_we;
  logic [AW-1:0] clr_addr;
  logic          iss_valid, iss_first, iss_last;
  phase_e        iss_phase;
  logic [MW-1:0] iss_m;
  logic [LW-1:0] iss_l, ptr;

  fold_sched #(.M(M), .L(L)) u_sched (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_valid(sample_valid),
    .sample_ready(sample_ready),
    .accept      (accept),
    .y_valid     (y_valid),
    .clr_we      (clr_we),
    .clr_addr    (clr_addr),
    .iss_valid   (iss_valid),
    .iss_phase   (iss_phase),
    .iss_m       (iss_m),
    .iss_l       (iss_l),
    .iss_first   (iss_first),
    .iss_last    (iss_last),
    .ptr         (ptr)
  );

  // error samples and step size, shared by all branches
  fp32_t e_q [M];
  fp32_t mu_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < int'(M); m++) begin
        e_q[m] <= FP32_ZERO;
      end
      mu_q <= FP32_ZERO;
    end else if (accept) begin
      e_q  <= e_in;
      mu_q <= mu;
    end
  end

  // estimates may be loaded only while no sample is being processed
  a_coef_while_idle: assert property (@(posedge clk)
    coef_we |-> !iss_valid);

  for (genvar j = 0; j < int'(J); j++) begin : g_branch
    fxlms_branch #(.M(M), .L(L)) u_branch (
      .clk      (clk),
      .rst_n    (rst_n),
      .clr_we   (clr_we),
      .clr_addr (clr_addr),
      .accept   (accept),
      .iss_valid(iss_valid),
      .iss_phase(iss_phase),
      .iss_m    (iss_m),
      .iss_l    (iss_l),
      .iss_first(iss_first),
      .iss_last (iss_last),
      .ptr      (ptr),
      .x_in     (x_in[j]),
      .e        (e_q),
      .mu       (mu_q),
      .y        (y_out[j]),
      .coef_we  (coef_we && !clr_we && (coef_branch == JW'(j))),
      .coef_m   (coef_m),
      .coef_l   (coef_l),
      .coef_data(coef_data)
    );
  end

endmodule
