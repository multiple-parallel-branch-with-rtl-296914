// tb_fold_sched: self-checking testbench for fold_sched at its default size
// (M = 4 error channels, L = 200 taps, S = 10 ticks per tap).
//
// Checks, cycle by cycle: the memory clear after reset (M*L cycles, addresses
// 0..M*L-1, sample_ready low); for every sample the S*L issued ticks, their
// phase, path index, tap index and first/last flags against the tick table
// worked out here from T = S*l + t; the return of sample_ready S*L+1 cycles
// after the accept; the y_valid pulse exactly S*L+2 cycles after it; and the
// delay-line pointer, which must count samples modulo L (L+3 samples are run
// so it wraps). Samples are offered back to back, after idle gaps and while
// the engine is busy (stalls); each case is counted.
module tb_fold_sched;
  import fxlms_pkg::*;
  localparam int M  = 4;
  localparam int L  = 200;
  localparam int S  = 2 * (M + 1);
  localparam int MW = $clog2(M);
  localparam int LW = $clog2(L);
  localparam int AW = $clog2(M * L);
  localparam int NSAMP = L + 3;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          sample_valid, sample_ready, accept, y_valid;
  logic          clr_we;
  logic [AW-1:0] clr_addr;
  logic          iss_valid, iss_first, iss_last;
  phase_e        iss_phase;
  logic [MW-1:0] iss_m;
  logic [LW-1:0] iss_l, ptr;

  int checks = 0, failures = 0;
  int stalls = 0, back_to_back = 0, gaps = 0, wraps = 0;

  fold_sched #(.M(M), .L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (NSAMP * (S * L + 20) + M * L + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int since;
    phase_e ph;
    int     m;
    sample_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // clear sequence
    for (int i = 0; i < M * L; i++) begin
      chk(clr_we && clr_addr == AW'(i) && !sample_ready && !iss_valid, "clear sequence");
      @(negedge clk);
    end
    chk(!clr_we && sample_ready, "ready after clear");

    for (int n = 0; n < NSAMP; n++) begin
      // offer the sample: after a gap, or straight away
      if (n % 4 == 2) begin
        repeat (3) @(negedge clk);
        gaps++;
      end
      sample_valid = 1'b1;
      #1;
      while (!sample_ready) begin
        stalls++;
        @(negedge clk);
        #1;
      end
      if (n > 0 && n % 4 != 2) back_to_back++;
      chk(accept, "accept with valid and ready");
      chk(ptr == LW'(n % L), $sformatf("pointer %0d for sample %0d", ptr, n));
      if (n > 0 && n % L == 0) wraps++;
      // keep valid high for part of the run: must not be taken while busy
      for (int T = 0; T < S * L; T++) begin
        @(negedge clk);
        if (T == 5) sample_valid = (n % 2 == 0);
        if (T > 5 && sample_valid) stalls++;
        if (T == S * L - 1) sample_valid = 1'b0;
        m  = T % S;
        if (m < M) ph = PH_SPATH;
        else if (m < 2 * M) begin ph = PH_GRAD; m = m - M; end
        else if (m == 2 * M) begin ph = PH_WUPD; m = 0; end
        else begin ph = PH_YOUT; m = 0; end
        chk(iss_valid && !sample_ready && !accept, "busy during run");
        chk(iss_phase == ph && int'(iss_m) == m && int'(iss_l) == T / S,
            $sformatf("tick %0d: phase %0d m %0d l %0d", T, iss_phase, iss_m, iss_l));
        chk(iss_first == (T / S == 0) && iss_last == (T / S == L - 1), "first/last flags");
        chk(!y_valid, "no y_valid during run");
      end
      // S*L+1 cycles after accept: ready again; S*L+2: y_valid
      @(negedge clk);
      chk(!iss_valid && sample_ready, "ready S*L+1 cycles after accept");
      chk(!y_valid, "y_valid not early");
      if (n % 4 == 0 && n + 1 < NSAMP) begin
        // next sample back to back: offer it now, y_valid still follows
        sample_valid = 1'b1;
        #1;
        chk(accept, "back-to-back accept");
        @(negedge clk);
        chk(y_valid, "y_valid S*L+2 cycles after accept");
        since = 1;
        // continue with the run of the next sample (already accepted)
        n++;
        back_to_back++;
        chk(ptr == LW'(n % L), "pointer after back-to-back accept");
        for (int T = since - 1; T < S * L; T++) begin
          if (T > since - 1) @(negedge clk);
          if (T == 0) sample_valid = 1'b0;
          m = T % S;
          if (m < M) ph = PH_SPATH;
          else if (m < 2 * M) begin ph = PH_GRAD; m = m - M; end
          else if (m == 2 * M) begin ph = PH_WUPD; m = 0; end
          else begin ph = PH_YOUT; m = 0; end
          chk(iss_valid && iss_phase == ph && int'(iss_m) == m && int'(iss_l) == T / S,
              "tick table after back-to-back accept");
        end
        @(negedge clk);
        chk(sample_ready, "ready after back-to-back sample");
        @(negedge clk);
        chk(y_valid, "y_valid after back-to-back sample");
      end else begin
        @(negedge clk);
        chk(y_valid, "y_valid S*L+2 cycles after accept");
        @(negedge clk);
        chk(!y_valid, "y_valid is one cycle");
      end
    end
    $display("stall cycles %0d, back-to-back samples %0d, gaps %0d, pointer wraps %0d",
             stalls, back_to_back, gaps, wraps);
    chk(stalls > 0, "stalls exercised");
    chk(back_to_back > 0, "back-to-back exercised");
    chk(wraps > 0, "pointer wrap exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
