// Body shared by the end-to-end testbenches of mcfxlms_top; the including
// module defines J, M, L, the run lengths NOPEN, NTONE, NBAND, the step sizes
// MU_TONE, MU_BAND and the required noise reductions TONE_DB, BAND_DB.
  localparam int S  = 2 * (M + 1);
  localparam int JW = (J > 1) ? $clog2(J) : 1;
  localparam int MW = (M > 1) ? $clog2(M) : 1;
  localparam int LW = (L > 1) ? $clog2(L) : 1;
  localparam int LP = 8;   // primary path taps of the plant
  localparam int LS = 4;   // secondary path taps of the plant (first one zero)

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          sample_valid, sample_ready, y_valid;
  fp32_t         x_in [J];
  fp32_t         e_in [M];
  fp32_t         y_out [J];
  fp32_t         mu, coef_data;
  logic          coef_we;
  logic [JW-1:0] coef_branch;
  logic [MW-1:0] coef_m;
  logic [LW-1:0] coef_l;

  int checks = 0, failures = 0;
  int n_clear = 0, n_coef = 0, n_stall = 0, n_b2b = 0, n_wrap = 0, n_adapt = 0;
  int n_reduce = 0, n_ignored = 0, n_samples = 0;

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat ((NOPEN + NTONE + NBAND + 10) * (S * L + 8) + 3 * (M * L + J * M * L + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (sample_valid && !sample_ready && rst_n) n_stall++;

  int          cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  logic [31:0] xs [NOPEN][J];
  logic [31:0] es [NOPEN][M];
  int          acc_cyc [NOPEN];

  function automatic fp32_t rnd_small(input real scale);
    return real_to_fp(scale * (real'($urandom_range(0, 20000)) / 10000.0 - 1.0));
  endfunction

  // reset, clear, load the estimates held in model.shat
  task automatic restart(input FxlmsModel model, input bit write_during_clear);
    int cyc;
    sample_valid = 1'b0;
    coef_we = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!sample_ready) begin
      // a write during the clear must be ignored
      if (write_during_clear && cyc == 5) begin
        coef_we = 1'b1; coef_branch = '0; coef_m = '0; coef_l = LW'(L - 1);
        coef_data = 32'h3F80_0000;
        n_ignored++;
      end else begin
        coef_we = 1'b0;
      end
      @(negedge clk);
      cyc++;
    end
    coef_we = 1'b0;
    chk(cyc == M * L, $sformatf("clear took %0d cycles", cyc));
    n_clear++;
    for (int j = 0; j < J; j++)
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++)
          if (!(write_during_clear && j == 0 && m == 0 && l == L - 1)) begin
            coef_we = 1'b1; coef_branch = JW'(j); coef_m = MW'(m); coef_l = LW'(l);
            coef_data = model.shat[j][m][l];
            n_coef++;
            @(negedge clk);
          end
    coef_we = 1'b0;
  endtask

  task automatic compare(input FxlmsModel model, input logic [31:0] xv [], input logic [31:0] ev [],
                         input logic [31:0] muv, ref logic [31:0] yv [], input int n);
    model.step(xv, ev, muv, yv);
    for (int j = 0; j < J; j++) begin
      chk(y_out[j] === yv[j], $sformatf("sample %0d branch %0d: y %08h expected %08h",
                                        n, j, y_out[j], yv[j]));
      if (y_out[j] != 32'h0) n_adapt++;
    end
    n_samples++;
    if (n > 0 && n % L == 0) n_wrap++;
  endtask

  // closed-loop run against the acoustic plant; returns reduction in dB
  task automatic anc_run(input bit band, input int nsamp, input real mu_r, output real red_db);
    FxlmsModel    model;
    AcousticPlant plant;
    logic [31:0]  xv [], ev [], yv [];
    real          xr [], er [], dr [], yr [];
    real          p_first, p_last, u, w1, w2, wn;
    int           nfirst, nlast;
    model = new(J, M, L);
    plant = new(J, M, LP, LS);
    xv = new[J]; ev = new[M]; yv = new[J]; xr = new[J]; er = new[M]; dr = new[M]; yr = new[J];
    for (int j = 0; j < J; j++)
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++)
          model.shat[j][m][l] = (l < LS) ? real_to_fp(plant.s[m][j][l]) : 32'h0;
    restart(model, 1'b0);
    mu = real_to_fp(mu_r);
    p_first = 0.0; p_last = 0.0; nfirst = 0; nlast = 0;
    w1 = 0.0; w2 = 0.0;
    for (int n = 0; n < nsamp; n++) begin
      if (band) begin
        // white noise through a two-pole resonator centred near 950 Hz at 24 kHz
        wn = real'($urandom_range(0, 20000)) / 10000.0 - 1.0;
        u  = 0.35 * wn + 2.0 * 0.93 * $cos(2.0 * 3.14159265 * 950.0 / 24000.0) * w1 - 0.93 * 0.93 * w2;
        w2 = w1; w1 = u;
      end else begin
        u = $sin(2.0 * 3.14159265 * 1000.0 / 24000.0 * n);
      end
      plant.sample(u, xr, er, dr);
      for (int j = 0; j < J; j++) begin xv[j] = real_to_fp(xr[j]); x_in[j] = xv[j]; end
      for (int m = 0; m < M; m++) begin ev[m] = real_to_fp(er[m]); e_in[m] = ev[m]; end
      for (int m = 0; m < M; m++) begin
        // noise reduction: residual error against the primary noise alone
        // (control switched off) over the last quarter of the run
        if (n >= nsamp - nsamp / 4) begin
          p_first += dr[m] * dr[m]; nfirst++;
          p_last  += er[m] * er[m]; nlast++;
        end
      end
      sample_valid = 1'b1;
      @(negedge clk);
      while (!y_valid) begin
        sample_valid = 1'b0;
        @(negedge clk);
      end
      compare(model, xv, ev, mu, yv, n);
      for (int j = 0; j < J; j++) yr[j] = fp_to_real(y_out[j]);
      plant.push_y(yr);
    end
    p_first = p_first / nfirst;
    p_last  = p_last / nlast;
    red_db  = 10.0 * $log10(p_first / (p_last + 1.0e-30));
  endtask

  initial begin
    FxlmsModel   model;
    logic [31:0] xv [], ev [], yv [];
    real         red;
    xv = new[J]; ev = new[M]; yv = new[J];
    sample_valid = 1'b0; coef_we = 1'b0; coef_branch = '0; coef_m = '0; coef_l = '0;
    coef_data = '0; mu = '0;
    for (int j = 0; j < J; j++) x_in[j] = '0;
    for (int m = 0; m < M; m++) e_in[m] = '0;

    // ---------------- phase 1: open loop, back to back, stalls
    model = new(J, M, L);
    for (int j = 0; j < J; j++)
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++)
          model.shat[j][m][l] = (j == 0 && m == 0 && l == L - 1) ? 32'h0 : rnd_small(0.5);
    restart(model, 1'b1);
    mu = real_to_fp(0.01);
    fork
      // driver: sample_valid stays high, new data right after each accept
      begin
        for (int n = 0; n < NOPEN; n++) begin
          for (int j = 0; j < J; j++) begin xs[n][j] = rnd_small(1.0); x_in[j] = xs[n][j]; end
          for (int m = 0; m < M; m++) begin es[n][m] = rnd_small(1.0); e_in[m] = es[n][m]; end
          sample_valid = 1'b1;
          #1;
          while (!sample_ready) begin @(negedge clk); #1; end
          acc_cyc[n] = cycle;
          if (n > 0 && acc_cyc[n] == acc_cyc[n-1] + S * L + 1) n_b2b++;
          @(negedge clk);
        end
        sample_valid = 1'b0;
      end
      // monitor: each y_valid belongs to the oldest sample not yet checked
      begin
        for (int n = 0; n < NOPEN; n++) begin
          @(negedge clk);
          while (!y_valid) @(negedge clk);
          for (int j = 0; j < J; j++) xv[j] = xs[n][j];
          for (int m = 0; m < M; m++) ev[m] = es[n][m];
          chk(cycle - acc_cyc[n] == S * L + 2,
              $sformatf("latency %0d, expected %0d", cycle - acc_cyc[n], S * L + 2));
          compare(model, xv, ev, mu, yv, n);
        end
      end
    join
    sample_valid = 1'b0;

    // ---------------- phase 2: tonal noise
    anc_run(1'b0, NTONE, MU_TONE, red);
    $display("tonal primary noise: error power reduced by %0.1f dB", red);
    chk(red > TONE_DB, $sformatf("tonal reduction %0.1f dB, want > %0.1f", red, TONE_DB));
    if (red > TONE_DB) n_reduce++;

    // ---------------- phase 3: band-limited noise
    anc_run(1'b1, NBAND, MU_BAND, red);
    $display("band-limited primary noise: error power reduced by %0.1f dB", red);
    chk(red > BAND_DB, $sformatf("band reduction %0.1f dB, want > %0.1f", red, BAND_DB));
    if (red > BAND_DB) n_reduce++;

    $display("clears %0d, coefficient writes %0d, ignored writes during clear %0d, stall cycles %0d,",
             n_clear, n_coef, n_ignored, n_stall);
    $display("back-to-back samples %0d, delay-line wraps %0d, adapted outputs %0d, samples %0d, reductions %0d",
             n_b2b, n_wrap, n_adapt, n_samples, n_reduce);
    chk(n_clear > 0 && n_coef > 0 && n_ignored > 0 && n_stall > 0 && n_b2b > 0 &&
        n_wrap > 0 && n_adapt > 0 && n_reduce == 2, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
