// fxlms_model_pkg: testbench models for the multichannel FxLMS engine.
//
// FxlmsModel is a golden model of the J x J x M filtered-x LMS written
// directly from the equations, in fp32 through fp32_ref_pkg, in the operation
// order the engine promises:
//   for each branch j and tap l = 0..L-1:
//     x''_m(l) = s_mj(l)*x_j(n) + x''_m(l+1)   (x''_m(L) = 0), x'_jm(n) = x''_m(0)
//     g        = sum over m = 0..M-1 of e_m(n)*x'_jm(n-l), accumulated in order
//     w_jl     = mu*g + w_jl   (y uses the value before this update)
//     y_j     += w_jl(old)*x_j(n-l)
// Every multiply-add is rounded as a product then a sum. It keeps its own
// shift-register histories rather than the engine's circular memories.
//
// AcousticPlant models what the engine controls: one primary noise signal u,
// picked up by J reference microphones through gains, reaching M error
// microphones through primary paths p_m and, from the J secondary sources,
// through secondary paths s_mj whose first tap is zero (a source output is
// heard one sample later at the earliest). It is plain double precision.
package fxlms_model_pkg;
  import fp32_ref_pkg::*;

  class FxlmsModel;
    int J, M, L;
    logic [31:0] shat [][][];   // [j][m][l]
    logic [31:0] w    [][];     // [j][l]
    logic [31:0] xh   [][];     // [j][l]   x_j(n-l)
    logic [31:0] xpp  [][][];   // [j][m][l]
    logic [31:0] xfh  [][][];   // [j][m][l] x'_jm(n-l)

    function new(int j_n, int m_n, int l_n);
      J = j_n; M = m_n; L = l_n;
      shat = new[J]; w = new[J]; xh = new[J]; xpp = new[J]; xfh = new[J];
      for (int j = 0; j < J; j++) begin
        w[j] = new[L]; xh[j] = new[L];
        shat[j] = new[M]; xpp[j] = new[M]; xfh[j] = new[M];
        for (int l = 0; l < L; l++) begin w[j][l] = 0; xh[j][l] = 0; end
        for (int m = 0; m < M; m++) begin
          shat[j][m] = new[L]; xpp[j][m] = new[L]; xfh[j][m] = new[L];
          for (int l = 0; l < L; l++) begin
            shat[j][m][l] = 0; xpp[j][m][l] = 0; xfh[j][m][l] = 0;
          end
        end
      end
    endfunction

    function void step(input logic [31:0] x [], input logic [31:0] e [],
                       input logic [31:0] mu, ref logic [31:0] y []);
      logic [31:0] g, wold, yacc, tail;
      for (int j = 0; j < J; j++) begin
        for (int l = L - 1; l > 0; l--) xh[j][l] = xh[j][l-1];
        xh[j][0] = x[j];
        for (int m = 0; m < M; m++)
          for (int l = L - 1; l > 0; l--) xfh[j][m][l] = xfh[j][m][l-1];
        yacc = 0;
        for (int l = 0; l < L; l++) begin
          for (int m = 0; m < M; m++) begin
            tail = (l == L - 1) ? 32'h0 : xpp[j][m][l+1];
            xpp[j][m][l] = ref_mac(shat[j][m][l], x[j], tail);
            if (l == 0) xfh[j][m][0] = xpp[j][m][0];
          end
          g = 0;
          for (int m = 0; m < M; m++) g = ref_mac(e[m], xfh[j][m][l], (m == 0) ? 32'h0 : g);
          wold = w[j][l];
          w[j][l] = ref_mac(mu, g, w[j][l]);
          yacc = ref_mac(wold, xh[j][l], (l == 0) ? 32'h0 : yacc);
        end
        y[j] = yacc;
      end
    endfunction
  endclass

  class AcousticPlant;
    int J, M, LP, LS;
    real p [][];        // [m][k]   primary path
    real s [][][];      // [m][j][k] secondary path, s[m][j][0] = 0
    real gain [];       // [j]      reference pickup
    real uh [];         // u(n-k)
    real yh [][];       // [j][k]   y_j(n-k)

    function new(int j_n, int m_n, int lp, int ls);
      J = j_n; M = m_n; LP = lp; LS = ls;
      p = new[M]; s = new[M]; gain = new[J]; yh = new[J]; uh = new[LP];
      for (int k = 0; k < LP; k++) uh[k] = 0.0;
      for (int j = 0; j < J; j++) begin
        gain[j] = 1.0 - 0.1 * j;
        yh[j] = new[LS];
        for (int k = 0; k < LS; k++) yh[j][k] = 0.0;
      end
      for (int m = 0; m < M; m++) begin
        p[m] = new[LP];
        for (int k = 0; k < LP; k++)
          p[m][k] = (k == 2 + m) ? 0.9 : ((k == 3 + m) ? 0.3 : 0.05 * $sin(0.9 * k + m));
        s[m] = new[J];
        for (int j = 0; j < J; j++) begin
          s[m][j] = new[LS];
          for (int k = 0; k < LS; k++)
            s[m][j][k] = (k == 0) ? 0.0 :
                         ((k == 1) ? 0.6 / J : 0.25 / J * $cos(1.3 * k + 0.7 * m - 0.4 * j) / k);
        end
      end
    endfunction

    // new primary sample u(n): returns reference signals x_j(n) and errors e_m(n),
    // the errors including the secondary sources' outputs up to y(n-1)
    function void sample(input real u, ref real x [], ref real e [], ref real d []);
      for (int k = LP - 1; k > 0; k--) uh[k] = uh[k-1];
      uh[0] = u;
      for (int j = 0; j < J; j++) x[j] = gain[j] * u;
      for (int m = 0; m < M; m++) begin
        real dm, ym;
        dm = 0.0; ym = 0.0;
        for (int k = 0; k < LP; k++) dm += p[m][k] * uh[k];
        for (int j = 0; j < J; j++)
          for (int k = 1; k < LS; k++) ym += s[m][j][k] * yh[j][k-1];
        d[m] = dm;
        e[m] = dm - ym;
      end
    endfunction

    // record the outputs y_j(n) the controller produced for this sample
    function void push_y(input real y []);
      for (int j = 0; j < J; j++) begin
        for (int k = LS - 1; k > 0; k--) yh[j][k] = yh[j][k-1];
        yh[j][0] = y[j];
      end
    endfunction
  endclass

endpackage
