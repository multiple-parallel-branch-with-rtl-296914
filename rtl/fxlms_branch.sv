// fxlms_branch: the j-th branch of the folded multichannel FxLMS.
//
// Per input sample the branch carries out, on a single arithmetic unit
// (fp_mac, r = c*d + b), the three parts of one FxLMS iteration that the
// original architecture groups into a branch:
//   secondary-path model, transposed form:
//       x''_m(l) = s_m(l) * x_j(n) + x''_m(l+1),  x''_m(L) = 0,  x'_jm(n) = x''_m(0)
//   weight update:
//       w_l(n+1) = w_l(n) + mu * sum_m e_m(n) * x'_jm(n-l)
//   control filter:
//       y_j(n) = sum_l w_l(n) * x_j(n-l)
// Tap l takes S = 2(M+1) ticks, in the order given by fold_sched: M
// secondary-path steps, M gradient steps, one weight update, one control
// filter step. Taps run l = 0 .. L-1, so x'_jm(n) exists (tap 0) before it
// is needed, x''_m(l+1) is read before tap l+1 overwrites it, and y_j(n)
// uses the weights from before their update.
//
// Operand selection follows the multiplexer letters of the original folded
// branch: mux c and mux d feed the multiplier, mux b the adder, mux a picks
// the output register. The delay lines are five delay_ram memories:
//   xref  L   words  x_j(n-l), circular, slot ptr holds x_j(n)
//   wmem  L   words  w_l
//   shat  M*L words  s_m(l), loaded through the coef port
//   xpp   M*L words  transposed partial sums x''_m(l)
//   xf    M*L words  filtered reference x'_jm(n-l), circular like xref
// Memory-based delay lines in place of flip-flop chains follow the
// original FPGA build; their layout and addressing are this design's.
//
// Timing: two stages. In the issue cycle the addresses of the tick go to the
// memories; in the next (execute) cycle the read words pass through the
// multiplexers and fp_mac, and the result is written to a memory or to one of
// the registers acc_q (gradient), yacc_q (output partial sum) or y (final
// output). accept latches x_in and writes it to xref[ptr]. clr_we zeroes all
// memories at clr_addr. coef_we writes s_{coef_m}(coef_l); use it only while
// the engine is idle.
module fxlms_branch
  import fxlms_pkg::*;
#(
  parameter int unsigned M  = 4,
  parameter int unsigned L  = 200,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned AW = (M * L > 1) ? $clog2(M * L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // controller
  input  logic          clr_we,
  input  logic [AW-1:0] clr_addr,
  input  logic          accept,
  input  logic          iss_valid,
  input  phase_e        iss_phase,
  input  logic [MW-1:0] iss_m,
  input  logic [LW-1:0] iss_l,
  input  logic          iss_first,
  input  logic          iss_last,
  input  logic [LW-1:0] ptr,
  // sample data
  input  fp32_t         x_in,
  input  fp32_t         e [M],
  input  fp32_t         mu,
  output fp32_t         y,
  // secondary-path estimate loading
  input  logic          coef_we,
  input  logic [MW-1:0] coef_m,
  input  logic [LW-1:0] coef_l,
  input  fp32_t         coef_data
);

  // ---------------------------------------------------------------- issue
  function automatic logic [AW-1:0] bank_addr(input logic [MW-1:0] m, input logic [LW-1:0] l);
    return AW'(int'(m) * int'(L) + int'(l));
  endfunction

  logic [LW-1:0] age_addr;    // (ptr - l) mod L: slot of x(n-l)
  logic [LW-1:0] next_l;

  always_comb begin
    if (ptr >= iss_l) begin
      age_addr = ptr - iss_l;
    end else begin
      age_addr = LW'(int'(ptr) + int'(L) - int'(iss_l));
    end
    next_l = iss_last ? iss_l : iss_l + 1'b1;
  end

  // ---------------------------------------------------------------- execute stage registers
  logic          ex_valid;
  phase_e        ex_phase;
  logic [MW-1:0] ex_m;
  logic [LW-1:0] ex_l;
  logic          ex_first, ex_last;
  logic [AW-1:0] ex_xpp_wa, ex_xf_wa;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid  <= 1'b0;
      ex_phase  <= PH_SPATH;
      ex_m      <= '0;
      ex_l      <= '0;
      ex_first  <= 1'b0;
      ex_last   <= 1'b0;
      ex_xpp_wa <= '0;
      ex_xf_wa  <= '0;
    end else begin
      ex_valid  <= iss_valid;
      ex_phase  <= iss_phase;
      ex_m      <= iss_m;
      ex_l      <= iss_l;
      ex_first  <= iss_first;
      ex_last   <= iss_last;
      ex_xpp_wa <= bank_addr(iss_m, iss_l);
      ex_xf_wa  <= bank_addr(iss_m, ptr);
    end
  end

  // ---------------------------------------------------------------- memories
  fp32_t shat_rd, xpp_rd, xf_rd, w_rd, xref_rd;
  fp32_t r;
  logic  ex_spath, ex_wupd;

  assign ex_spath = ex_valid && (ex_phase == PH_SPATH);
  assign ex_wupd  = ex_valid && (ex_phase == PH_WUPD);

  delay_ram #(.DEPTH(M * L), .WIDTH(32)) u_shat (
    .clk  (clk),
    .we   (clr_we || coef_we),
    .waddr(clr_we ? clr_addr : bank_addr(coef_m, coef_l)),
    .wdata(clr_we ? FP32_ZERO : coef_data),
    .raddr(bank_addr(iss_m, iss_l)),
    .rdata(shat_rd)
  );

  delay_ram #(.DEPTH(M * L), .WIDTH(32)) u_xpp (
    .clk  (clk),
    .we   (clr_we || ex_spath),
    .waddr(clr_we ? clr_addr : ex_xpp_wa),
    .wdata(clr_we ? FP32_ZERO : r),
    .raddr(bank_addr(iss_m, next_l)),
    .rdata(xpp_rd)
  );

  delay_ram #(.DEPTH(M * L), .WIDTH(32)) u_xf (
    .clk  (clk),
    .we   (clr_we || (ex_spath && ex_first)),
    .waddr(clr_we ? clr_addr : ex_xf_wa),
    .wdata(clr_we ? FP32_ZERO : r),
    .raddr(bank_addr(iss_m, age_addr)),
    .rdata(xf_rd)
  );

  logic clr_short;   // clear address inside the L-word memories
  assign clr_short = clr_we && (clr_addr < AW'(L));

  delay_ram #(.DEPTH(L), .WIDTH(32)) u_w (
    .clk  (clk),
    .we   (clr_short || ex_wupd),
    .waddr(clr_we ? LW'(clr_addr) : ex_l),
    .wdata(clr_we ? FP32_ZERO : r),
    .raddr(iss_l),
    .rdata(w_rd)
  );

  delay_ram #(.DEPTH(L), .WIDTH(32)) u_xref (
    .clk  (clk),
    .we   (clr_short || accept),
    .waddr(clr_we ? LW'(clr_addr) : ptr),
    .wdata(clr_we ? FP32_ZERO : x_in),
    .raddr(age_addr),
    .rdata(xref_rd)
  );

  // ---------------------------------------------------------------- multiplexers and arithmetic unit
  fp32_t x_q, acc_q, yacc_q, w_old_q;
  fp32_t mul_c, mul_d, add_b;

  always_comb begin
    unique case (ex_phase)
      PH_SPATH: begin
        mul_c = shat_rd;
        mul_d = x_q;
        add_b = ex_last ? FP32_ZERO : xpp_rd;
      end
      PH_GRAD: begin
        mul_c = e[ex_m];
        mul_d = xf_rd;
        add_b = (ex_m == '0) ? FP32_ZERO : acc_q;
      end
      PH_WUPD: begin
        mul_c = mu;
        mul_d = acc_q;
        add_b = w_rd;
      end
      default: begin  // PH_YOUT
        mul_c = w_old_q;
        mul_d = xref_rd;
        add_b = ex_first ? FP32_ZERO : yacc_q;
      end
    endcase
  end

  fp_mac u_mac (.a(mul_c), .b(mul_d), .c(add_b), .r(r));

  // mux a: where the result goes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= FP32_ZERO;
      acc_q   <= FP32_ZERO;
      yacc_q  <= FP32_ZERO;
      w_old_q <= FP32_ZERO;
      y       <= FP32_ZERO;
    end else begin
      if (accept) begin
        x_q <= x_in;
      end
      if (ex_valid) begin
        unique case (ex_phase)
          PH_GRAD: acc_q <= r;
          PH_WUPD: w_old_q <= w_rd;
          PH_YOUT: begin
            yacc_q <= r;
            if (ex_last) begin
              y <= r;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
