// tb_ref_pkg: integer reference model of the decoder arithmetic, written
// directly from the equations with plain 32-bit integers (no wrap-around, no
// normalisation) and used by the testbenches to predict the RTL.
//   gamma(u,p)  = floor((+-s +- yp) / 2), built from gamma(1,1), gamma(1,0)
//   max*(a,b)   = max(a,b) + round(4 ln(1 + e^-|a-b|/4))
//   L(x)        = ln(e^x - 1) on the 0.25 grid: x for x >= 8, table for 4..7,
//                 0 below
//   trellis     : W-CDMA RSC, feedback 1+D^2+D^3, parity 1+D+D^3
package tb_ref_pkg;

  function automatic int iabs(int x);
    return x < 0 ? -x : x;
  endfunction

  function automatic int corr(int d);
    real v;
    v = 4.0 * $ln(1.0 + $exp(-real'(d) / 4.0));
    return int'($floor(v + 0.5));
  endfunction

  function automatic int mstar(int a, int b);
    return (a > b ? a : b) + corr(iabs(a - b));
  endfunction

  function automatic int lnem1(int x);
    real v;
    if (x >= 8) return x;
    if (x < 3) x = 3;
    v = 4.0 * $ln($exp(real'(x) / 4.0) - 1.0);
    return int'($floor(v + 0.5));
  endfunction

  function automatic int floor2(int x);        // floor(x / 2)
    return (x >= 0) ? x / 2 : -((-x + 1) / 2);
  endfunction

  // branch metric of input bit u and parity bit p
  function automatic int gam(int s, int yp, int u, int p);
    int g11, g10;
    g11 = floor2(s + yp);
    g10 = floor2(s - yp);
    if (u == 1 && p == 1) return g11;
    if (u == 1 && p == 0) return g10;
    if (u == 0 && p == 1) return -g10;
    return -g11;
  endfunction

  // encoder registers r1 (newest) .. r3 (oldest), state = 4*r3 + 2*r2 + r1
  function automatic int nxt(int st, int u);
    int r1, r2, r3, a;
    r1 = st & 1; r2 = (st >> 1) & 1; r3 = (st >> 2) & 1;
    a  = u ^ r2 ^ r3;
    return ((st << 1) & 6) | a;
  endfunction

  function automatic int par(int st, int u);
    int r1, r2, r3, a;
    r1 = st & 1; r2 = (st >> 1) & 1; r3 = (st >> 2) & 1;
    a  = u ^ r2 ^ r3;
    return a ^ r1 ^ r3;
  endfunction

  // wrap an integer to a signed value of w bits
  function automatic int wrap(int x, int w);
    int m;
    m = x & ((1 << w) - 1);
    return (m >= (1 << (w - 1))) ? m - (1 << w) : m;
  endfunction

  // forward step
  function automatic void astep(input int a[8], input int s, input int yp,
                                output int an[8]);
    for (int nn = 0; nn < 8; nn++) begin
      int pa[2], c;
      c = 0;
      for (int st = 0; st < 8; st++)
        for (int u = 0; u < 2; u++)
          if (nxt(st, u) == nn) begin
            pa[c] = a[st] + gam(s, yp, u, par(st, u));
            c++;
          end
      an[nn] = mstar(pa[0], pa[1]);
    end
  endfunction

  // LLR of one symbol: max* trees over states 0..7 for u = 1 and u = 0
  function automatic int ref_llr(int a[8], int b1[8], int s, int yp);
    int m[2][8], l1[4], l2[2], mx[2];
    for (int u = 0; u < 2; u++) begin
      for (int st = 0; st < 8; st++)
        m[u][st] = wrap(a[st] - a[0], 9) + wrap(b1[nxt(st, u)] - b1[0], 9)
                 + gam(s, yp, u, par(st, u));
      for (int i = 0; i < 4; i++) l1[i] = mstar(m[u][2*i], m[u][2*i+1]);
      for (int i = 0; i < 2; i++) l2[i] = mstar(l1[2*i], l1[2*i+1]);
      mx[u] = mstar(l2[0], l2[1]);
    end
    return mx[1] - mx[0];
  endfunction

  // reverse calculation of beta_{k+1}(nn) from beta_k; ok = approximable
  function automatic int ref_rev(int b[8], int s, int yp, int nn, output int ok);
    int j, x, y, g;
    j = nn >> 1;
    g = (nxt(j, 0) == nn) ? gam(s, yp, 0, par(j, 0)) : gam(s, yp, 1, par(j, 1));
    x = b[j] + g;
    y = b[j + 4] - g;
    ok = (iabs(x - y) >= 3 && iabs(4 * g) >= 3) ? 1 : 0;
    return (x < y ? x : y) + lnem1(iabs(x - y)) + 2 * iabs(g) - lnem1(iabs(4 * g));
  endfunction

  // Counters returned by ref_siso in stats[]
  localparam int ST_WR  = 0;   // bank words written (= read) in the metric memory
  localparam int ST_REV = 1;   // metrics taken from the reverse calculation
  localparam int ST_LUT = 2;   // reverse calculations that used the small table
  localparam int ST_LIN = 3;   // reverse calculations that used L(x) = x only
  localparam int ST_MEM = 4;   // metrics read from the metric memory

  function automatic void bstep(input int b1[8], input int s, input int yp,
                                output int b0[8]);
    for (int st = 0; st < 8; st++)
      b0[st] = mstar(b1[nxt(st, 0)] + gam(s, yp, 0, par(st, 0)),
                     b1[nxt(st, 1)] + gam(s, yp, 1, par(st, 1)));
  endfunction

  // Sliding-window log-MAP with selective beta storage and approximate
  // reverse calculation; schedule identical to the hardware (training pass
  // of one window, backward pass, forward pass).
  function automatic void ref_siso(input int n, input int w, input int nb,
                                  input int s[], input int yp[],
                                  output int llr[], output int ext[],
                                  output int stats[5]);
    int alpha[8], an[8], beta[8], bk[8], b1[8];
    int mem[][8];
    int flg[][8];
    int spb;
    spb = 8 / nb;
    llr = new[n];
    ext = new[n];
    stats = '{default: 0};
    mem = new[w];
    flg = new[w];
    for (int st = 0; st < 8; st++) alpha[st] = (st == 0) ? 0 : -64;
    for (int base = 0; base < n; base += w) begin
      int wend;
      wend = (base + w < n) ? base + w : n;
      for (int st = 0; st < 8; st++) beta[st] = 0;
      if (wend < n)
        for (int k = ((wend + w < n) ? wend + w : n) - 1; k >= wend; k--) begin
          bstep(beta, s[k], yp[k], bk);
          beta = bk;
        end
      for (int k = wend - 1; k >= base; k--) begin
        int ok[8];
        bstep(beta, s[k], yp[k], bk);
        for (int nn = 0; nn < 8; nn++) begin
          int j, x, y, g;
          j = nn >> 1;
          g = (nxt(j, 0) == nn) ? gam(s[k], yp[k], 0, par(j, 0))
                                : gam(s[k], yp[k], 1, par(j, 1));
          x = bk[j] + g;
          y = bk[j + 4] - g;
          ok[nn] = (iabs(x - y) >= 3 && iabs(4 * g) >= 3) ? 1 : 0;
        end
        for (int b = 0; b < nb; b++) begin
          int all;
          all = 1;
          for (int i = 0; i < spb; i++) all &= ok[b * spb + i];
          for (int i = 0; i < spb; i++) flg[k - base][b * spb + i] = all;
          if (all == 0) stats[ST_WR]++;
        end
        for (int st = 0; st < 8; st++) mem[k - base][st] = beta[st];
        beta = bk;
      end
      for (int k = base; k < wend; k++) begin
        int m1[8], m0[8], l1[4], l2[2], mx1, mx0, e;
        for (int nn = 0; nn < 8; nn++) begin
          if (flg[k - base][nn]) begin
            int j, x, y, g;
            j = nn >> 1;
            g = (nxt(j, 0) == nn) ? gam(s[k], yp[k], 0, par(j, 0))
                                  : gam(s[k], yp[k], 1, par(j, 1));
            x = beta[j] + g;
            y = beta[j + 4] - g;
            b1[nn] = (x < y ? x : y) + lnem1(iabs(x - y)) + 2 * iabs(g)
                   - lnem1(iabs(4 * g));
            stats[ST_REV]++;
            if (iabs(x - y) < 8 || iabs(4 * g) < 8) stats[ST_LUT]++;
            else stats[ST_LIN]++;
          end else begin
            b1[nn] = mem[k - base][nn];
            stats[ST_MEM]++;
          end
        end
        for (int st = 0; st < 8; st++) begin
          m1[st] = wrap(alpha[st] - alpha[0], 9) + wrap(b1[nxt(st, 1)] - b1[0], 9)
                 + gam(s[k], yp[k], 1, par(st, 1));
          m0[st] = wrap(alpha[st] - alpha[0], 9) + wrap(b1[nxt(st, 0)] - b1[0], 9)
                 + gam(s[k], yp[k], 0, par(st, 0));
        end
        for (int i = 0; i < 4; i++) l1[i] = mstar(m1[2*i], m1[2*i+1]);
        for (int i = 0; i < 2; i++) l2[i] = mstar(l1[2*i], l1[2*i+1]);
        mx1 = mstar(l2[0], l2[1]);
        for (int i = 0; i < 4; i++) l1[i] = mstar(m0[2*i], m0[2*i+1]);
        for (int i = 0; i < 2; i++) l2[i] = mstar(l1[2*i], l1[2*i+1]);
        mx0 = mstar(l2[0], l2[1]);
        llr[k] = mx1 - mx0;
        e = llr[k] - s[k];
        ext[k] = (e > 31) ? 31 : (e < -32) ? -32 : e;
        for (int st = 0; st < 8; st++) an[st] = 0;
        for (int nn = 0; nn < 8; nn++) begin
          int pa[2], pg[2], c;
          c = 0;
          for (int st = 0; st < 8; st++)
            for (int u = 0; u < 2; u++)
              if (nxt(st, u) == nn) begin
                pa[c] = alpha[st];
                pg[c] = gam(s[k], yp[k], u, par(st, u));
                c++;
              end
          an[nn] = mstar(pa[0] + pg[0], pa[1] + pg[1]);
        end
        alpha = an;
        beta = b1;
      end
    end
  endfunction

endpackage
