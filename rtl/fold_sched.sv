// fold_sched: time-schedule controller of the folded multichannel FxLMS.
//
// The original architecture folds each of the L tap iterations of a branch onto one
// arithmetic unit over S = 2(M+1) clock ticks, numbering ticks from zero so
// that tick T = S*l + t belongs to tap l. This controller counts t and l for
// all J branches at once (they run in lock step) and decodes t into the
// operation of the tick:
//   t = 0 .. M-1      PH_SPATH, path m = t     (secondary-path step, original mux ports c2, d3)
//   t = M .. 2M-1     PH_GRAD,  path m = t-M   (error accumulation, original mux port c3)
//   t = 2M            PH_WUPD                  (mu times gradient plus weight, original mux port c4)
//   t = 2M+1          PH_YOUT                  (control filter step; the final one,
//                                               T = S(L-1)+2M+1, gives y_j(n), original mux port a2)
// It also owns the sample handshake, the circular pointer ptr of the
// reference delay lines (slot of x(n); x(n-l) is at (ptr-l) mod L), and a
// memory clear of M*L cycles after reset, during which sample_ready is low.
//
// Timing: a sample is accepted in the cycle sample_valid && sample_ready; the
// S*L ticks are issued in the next S*L cycles; sample_ready rises again the
// cycle after the last tick is issued (one sample per S*L+1 cycles) and
// y_valid pulses for one cycle S*L+2 cycles after the accept. The handshake,
// the clear and the pointer are this design's choices.
module fold_sched
  import fxlms_pkg::*;
#(
  parameter int unsigned M  = 4,
  parameter int unsigned L  = 200,
  localparam int unsigned S  = 2 * (M + 1),
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned TW = $clog2(S),
  localparam int unsigned AW = (M * L > 1) ? $clog2(M * L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // sample handshake
  input  logic          sample_valid,
  output logic          sample_ready,
  output logic          accept,
  output logic          y_valid,
  // memory clear after reset
  output logic          clr_we,
  output logic [AW-1:0] clr_addr,
  // issued tick
  output logic          iss_valid,
  output phase_e        iss_phase,
  output logic [MW-1:0] iss_m,
  output logic [LW-1:0] iss_l,
  output logic          iss_first,
  output logic          iss_last,
  output logic [LW-1:0] ptr
);

  typedef enum logic [1:0] {ST_CLEAR, ST_IDLE, ST_RUN} state_e;

  state_e        state;
  logic [TW-1:0] t;
  logic [LW-1:0] l;
  logic          last_tick, last_q;

  assign sample_ready = (state == ST_IDLE);
  assign accept       = sample_valid && sample_ready;
  assign clr_we       = (state == ST_CLEAR);
  assign iss_valid    = (state == ST_RUN);
  assign iss_l        = l;
  assign iss_first    = (l == '0);
  assign iss_last     = (l == LW'(L - 1));
  assign last_tick    = iss_valid && (t == TW'(S - 1)) && iss_last;

  always_comb begin
    iss_m = '0;
    if (t < TW'(M)) begin
      iss_phase = PH_SPATH;
      iss_m     = MW'(t);
    end else if (t < TW'(2 * M)) begin
      iss_phase = PH_GRAD;
      iss_m     = MW'(t - TW'(M));
    end else if (t == TW'(2 * M)) begin
      iss_phase = PH_WUPD;
    end else begin
      iss_phase = PH_YOUT;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_CLEAR;
      clr_addr <= '0;
      t        <= '0;
      l        <= '0;
      ptr      <= '0;
      last_q   <= 1'b0;
      y_valid  <= 1'b0;
    end else begin
      last_q  <= last_tick;
      y_valid <= last_q;
      unique case (state)
        ST_CLEAR: begin
          if (clr_addr == AW'(M * L - 1)) begin
            state <= ST_IDLE;
          end else begin
            clr_addr <= clr_addr + 1'b1;
          end
        end
        ST_IDLE: begin
          if (accept) begin
            state <= ST_RUN;
            t     <= '0;
            l     <= '0;
          end
        end
        ST_RUN: begin
          if (t == TW'(S - 1)) begin
            t <= '0;
            if (iss_last) begin
              l     <= '0;
              state <= ST_IDLE;
              ptr   <= (ptr == LW'(L - 1)) ? '0 : ptr + 1'b1;
            end else begin
              l <= l + 1'b1;
            end
          end else begin
            t <= t + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // handshake rules
  a_accept_only_idle: assert property (@(posedge clk)
    accept |-> (state == ST_IDLE));
  a_y_valid_pulse: assert property (@(posedge clk)
    y_valid |=> !y_valid);
  a_no_issue_in_clear: assert property (@(posedge clk)
    clr_we |-> !iss_valid);

endmodule
