// tb_fxlms_branch: self-checking testbench for one folded branch.
//
// The branch is driven by the schedule controller at a small, deliberately
// non-power-of-two size (M = 3 error channels, L = 7 taps, S = 8 ticks per
// tap). Random secondary-path estimates are loaded through the coefficient
// port, then 4L random samples (x_j(n), e_m(n)) are fed in with a fixed step
// size; every output y_j(n) is compared bit for bit with the golden model
// FxlmsModel (J = 1), which is written from the FxLMS equations. Running 4L
// samples wraps the circular delay lines several times. The latency from
// accept to y_valid must be S*L+2 cycles.
module tb_fxlms_branch;
  import fxlms_pkg::*;
  import fp32_ref_pkg::*;
  import fxlms_model_pkg::*;
  localparam int M  = 3;
  localparam int L  = 7;
  localparam int S  = 2 * (M + 1);
  localparam int MW = $clog2(M);
  localparam int LW = $clog2(L);
  localparam int AW = $clog2(M * L);
  localparam int NSAMP = 4 * L;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          sample_valid, sample_ready, accept, y_valid;
  logic          clr_we;
  logic [AW-1:0] clr_addr;
  logic          iss_valid, iss_first, iss_last;
  phase_e        iss_phase;
  logic [MW-1:0] iss_m;
  logic [LW-1:0] iss_l, ptr;
  fp32_t         x_in, mu, y, coef_data;
  fp32_t         e [M];
  logic          coef_we;
  logic [MW-1:0] coef_m;
  logic [LW-1:0] coef_l;

  int checks = 0, failures = 0;

  fold_sched #(.M(M), .L(L)) u_sched (.*);

  fxlms_branch #(.M(M), .L(L)) dut (
    .clk(clk), .rst_n(rst_n), .clr_we(clr_we), .clr_addr(clr_addr), .accept(accept),
    .iss_valid(iss_valid), .iss_phase(iss_phase), .iss_m(iss_m), .iss_l(iss_l),
    .iss_first(iss_first), .iss_last(iss_last), .ptr(ptr),
    .x_in(x_in), .e(e), .mu(mu), .y(y),
    .coef_we(coef_we), .coef_m(coef_m), .coef_l(coef_l), .coef_data(coef_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * (S * L + 10) + M * L + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t rnd_small(input real scale);
    return real_to_fp(scale * (real'($urandom_range(0, 20000)) / 10000.0 - 1.0));
  endfunction

  initial begin
    FxlmsModel   model;
    logic [31:0] xv [], ev [], yv [];
    int          lat;
    model = new(1, M, L);
    xv = new[1]; ev = new[M]; yv = new[1];
    sample_valid = 1'b0; coef_we = 1'b0; coef_m = '0; coef_l = '0; coef_data = '0;
    x_in = '0; mu = real_to_fp(0.02);
    for (int m = 0; m < M; m++) e[m] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!sample_ready) @(negedge clk);
    // load secondary-path estimates
    for (int m = 0; m < M; m++)
      for (int l = 0; l < L; l++) begin
        coef_we = 1'b1; coef_m = MW'(m); coef_l = LW'(l);
        coef_data = rnd_small(0.5);
        model.shat[0][m][l] = coef_data;
        @(negedge clk);
      end
    coef_we = 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      xv[0] = rnd_small(1.0);
      for (int m = 0; m < M; m++) begin ev[m] = rnd_small(1.0); e[m] = ev[m]; end
      x_in = xv[0];
      sample_valid = 1'b1;
      #1;
      checks++;
      if (!accept) begin failures++; $display("sample %0d not accepted", n); end
      @(negedge clk);
      sample_valid = 1'b0;
      x_in = '0;   // latched by the branch; e and mu are held by the caller
      lat = 1;
      while (!y_valid) begin @(negedge clk); lat++; end
      model.step(xv, ev, mu, yv);
      checks++;
      if (y !== yv[0]) begin
        failures++;
        if (failures <= 10) $display("sample %0d: y %08h expected %08h", n, y, yv[0]);
      end
      checks++;
      if (lat != S * L + 2) begin
        failures++;
        $display("sample %0d: latency %0d, expected %0d", n, lat, S * L + 2);
      end
    end
    $display("last y = %f (model %f)", fp_to_real(y), fp_to_real(yv[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
