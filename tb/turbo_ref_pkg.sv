// turbo_ref_pkg: reference models for the testbenches, written from the
// code definition rather than from the RTL structure.
//
// - pi(i, R): square block interleaver, computed with div/mod.
// - encode(): turbo encoder built from the RSC recursion p_k = u_k ^ p_{k-1}
//   with a zero-termination tail (tail input = register).
// - siso(): MAP decoding over an explicitly enumerated trellis with
//   unnormalised integer metrics; the Log-MAP correction is evaluated with
//   real arithmetic as round(4*ln(1 + exp(-d/4))).
// - turbo(): the iterative schedule (SISO1 natural order, SISO2 interleaved,
//   zero a-priori in the first half-iteration, decision after the last SISO2).
package turbo_ref_pkg;

  localparam int NEG = -1000000;

  function automatic int pi(int i, int R);
    return (i % R) * R + (i / R);
  endfunction

  function automatic int mstar(int a, int b, bit logmap);
    int mx, d;
    mx = (a > b) ? a : b;
    d  = (a > b) ? a - b : b - a;
    if (logmap && d < 100000)
      mx += $rtoi($floor(4.0 * $ln(1.0 + $exp(-real'(d) / 4.0)) + 0.5));
    return mx;
  endfunction

  function automatic int sat(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1;
    lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // msg[0..K-1] -> sys, p1, p2 (K entries each) and tail {x1, z1, x2, z2}
  task automatic encode(input bit msg[], input int R,
                        output bit sys[], output bit p1[], output bit p2[], output bit tail[4]);
    int K;
    bit r1, r2, u;
    K = msg.size();
    sys = new[K]; p1 = new[K]; p2 = new[K];
    r1 = 0; r2 = 0;
    for (int k = 0; k < K; k++) begin
      sys[k] = msg[k];
      r1 = msg[k] ^ r1;           p1[k] = r1;
      r2 = msg[pi(k, R)] ^ r2;    p2[k] = r2;
    end
    // tail: input equals the register, so the register and parity go to 0
    tail[0] = r1; tail[1] = r1 ^ r1;
    tail[2] = r2; tail[3] = r2 ^ r2;
  endtask

  // One SISO pass over K+1 items (item K is the tail, la[K] = 0).
  // Returns saturated (10-bit) extrinsic and a-posteriori LLRs for 0..K-1.
  task automatic siso(input int la[], input int ls[], input int lp[], input bit logmap,
                      output int ext[], output int llr[]);
    int N;
    int alpha[][2];
    int beta[][2];
    N = la.size();              // K + 1
    alpha = new[N + 1];
    beta  = new[N + 1];
    ext = new[N - 1];
    llr = new[N - 1];
    alpha[0][0] = 0; alpha[0][1] = NEG;
    for (int k = 0; k < N; k++) begin
      int nx[2];
      bit seen[2];
      seen = '{0, 0};
      for (int s = 0; s < 2; s++)
        for (int u = 0; u < 2; u++) begin
          int ns, p, g, m;
          ns = u ^ s; p = ns;
          g = ((u == 0) ? la[k] + ls[k] : 0) + ((p == 0) ? lp[k] : 0);
          m = alpha[k][s] + g;
          nx[ns] = seen[ns] ? mstar(nx[ns], m, logmap) : m;
          seen[ns] = 1;
        end
      alpha[k + 1][0] = nx[0]; alpha[k + 1][1] = nx[1];
    end
    beta[N][0] = 0; beta[N][1] = NEG;
    for (int k = N - 1; k >= 0; k--) begin
      int acc[2];       // per u
      bit seen_u[2];
      seen_u = '{0, 0};
      for (int s = 0; s < 2; s++) begin
        int m0, m1;
        for (int u = 0; u < 2; u++) begin
          int ns, p, g, m;
          ns = u ^ s; p = ns;
          g = ((u == 0) ? la[k] + ls[k] : 0) + ((p == 0) ? lp[k] : 0);
          m = beta[k + 1][ns] + g;
          if (u == 0) m0 = m; else m1 = m;
          m = alpha[k][s] + g + beta[k + 1][ns];
          acc[u] = seen_u[u] ? mstar(acc[u], m, logmap) : m;
          seen_u[u] = 1;
        end
        beta[k][s] = mstar(m0, m1, logmap);
      end
      if (k < N - 1) begin
        llr[k] = sat(acc[0] - acc[1], 10);
        ext[k] = sat(acc[0] - acc[1] - la[k] - ls[k], 10);
      end
    end
  endtask

  // Full iterative decoding. chan: sys, p1, p2 LLRs (K each), tl: tail LLRs
  // {x1, z1, x2, z2}. Returns decided bits in natural order.
  task automatic turbo(input int sys[], input int p1[], input int p2[], input int tl[4],
                       input int R, input int iters, input bit logmap1, input bit logmap2,
                       output bit dec[]);
    int K;
    int le12[], le21[], la[], ls[], lp[], ext[], llr[];
    K = sys.size();
    le12 = new[K]; le21 = new[K]; dec = new[K];
    la = new[K + 1]; ls = new[K + 1]; lp = new[K + 1];
    foreach (le21[i]) le21[i] = 0;
    if (iters < 1) iters = 1;
    for (int it = 0; it < iters; it++) begin
      for (int k = 0; k < K; k++) begin
        la[k] = le21[k]; ls[k] = sys[k]; lp[k] = p1[k];
      end
      la[K] = 0; ls[K] = tl[0]; lp[K] = tl[1];
      siso(la, ls, lp, logmap1, ext, llr);
      foreach (le12[i]) le12[i] = ext[i];
      for (int j = 0; j < K; j++) begin
        la[j] = le12[pi(j, R)]; ls[j] = sys[pi(j, R)]; lp[j] = p2[j];
      end
      la[K] = 0; ls[K] = tl[2]; lp[K] = tl[3];
      siso(la, ls, lp, logmap2, ext, llr);
      for (int j = 0; j < K; j++) begin
        le21[pi(j, R)] = ext[j];
        dec[pi(j, R)]  = (llr[j] < 0);
      end
    end
  endtask

endpackage
