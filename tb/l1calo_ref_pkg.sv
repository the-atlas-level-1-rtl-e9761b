// l1calo_ref_pkg: behavioural reference models used by the testbenches.
// They restate the trigger algorithms in plain procedural form, written
// separately from the RTL, so that the testbenches can compare against
// values worked out independently of the blocks under test.
package l1calo_ref_pkg;
  import l1calo_pkg::*;

  localparam int NS = 400;   // length of sample streams used by the tests

  // ---- PreProcessor BCID ----
  typedef int sarr_t [NS];

  function automatic int s_at(sarr_t s, int n);
    return (n < 0 || n >= NS) ? 0 : s[n];
  endfunction

  function automatic int fir_at(sarr_t s, int n, int c [5]);
    int f;
    f = 0;
    for (int k = 0; k < 5; k++) f += c[k] * s_at(s, n - 2 + k);
    return f;
  endfunction

  // FIR peak at n (0 if none), as 10-bit value after dropping `drop` bits
  function automatic bit ref_fir_peak(sarr_t s, int n, int c [5]);
    bit sat;
    sat = 0;
    for (int k = -2; k <= 2; k++) if (s_at(s, n + k) == 1023) sat = 1;
    return !sat && fir_at(s, n, c) > fir_at(s, n - 1, c) &&
           fir_at(s, n, c) >= fir_at(s, n + 1, c);
  endfunction

  function automatic int fir10(sarr_t s, int n, int c [5], int drop);
    int v;
    v = fir_at(s, n, c) >> drop;
    return v > 1023 ? 1023 : v;
  endfunction

  function automatic bit ref_sat_peak(sarr_t s, int n, int lo, int hi);
    // first saturated sample at t: peak is t when s[t-1] > hi and s[t-2] > lo, else t+1
    for (int t = n - 1; t <= n; t++)
      if (s_at(s, t) == 1023 && s_at(s, t - 1) != 1023) begin
        bit fast;
        fast = s_at(s, t - 1) > hi && s_at(s, t - 2) > lo;
        if (t == n && fast) return 1;
        if (t == n - 1 && !fast) return 1;
      end
    return 0;
  endfunction

  // ---- Cluster Processor window (4x4 towers, [phi][eta]) ----
  function automatic bit [15:0] cp_window(int em [4][4], int had [4][4], cp_thr_t thr [16]);
    int pairs [4];
    int hc, emr, hdr, emax, tmax, r2 [3][3];
    bit lm;
    bit [15:0] h;
    pairs[0] = em[1][1] + em[2][1];
    pairs[1] = em[1][2] + em[2][2];
    pairs[2] = em[1][1] + em[1][2];
    pairs[3] = em[2][1] + em[2][2];
    hc = had[1][1] + had[1][2] + had[2][1] + had[2][2];
    emax = 0; tmax = 0;
    foreach (pairs[p]) begin
      int e, t;
      e = pairs[p] > 255 ? 255 : pairs[p];
      t = pairs[p] + hc > 255 ? 255 : pairs[p] + hc;
      if (e > emax) emax = e;
      if (t > tmax) tmax = t;
    end
    emr = 0; hdr = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (r == 0 || r == 3 || c == 0 || c == 3) begin
          emr += em[r][c];
          hdr += had[r][c];
        end
    if (emr > 63) emr = 63;
    if (hdr > 63) hdr = 63;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        r2[a][b] = em[a][b] + em[a+1][b] + em[a][b+1] + em[a+1][b+1] +
                   had[a][b] + had[a+1][b] + had[a][b+1] + had[a+1][b+1];
    // strict towards +eta (b = 2) and +phi (a = 2, b = 1)
    lm = 1;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        if (!(a == 1 && b == 1)) begin
          if (b == 2 || (a == 2 && b == 1)) lm &= r2[1][1] > r2[a][b];
          else                              lm &= r2[1][1] >= r2[a][b];
        end
    for (int s = 0; s < 16; s++) begin
      bit tau, ok;
      int hv;
      hv = hc > 63 ? 63 : hc;
      tau = s >= 8 && thr[s].is_tau;
      ok = emr <= thr[s].em_iso && hdr <= thr[s].had_iso;
      if (tau) ok &= tmax > thr[s].cluster;
      else     ok &= emax > thr[s].cluster && hv <= thr[s].had_veto;
      h[s] = lm && ok;
    end
    return h;
  endfunction

  // ---- Jet algorithm on an 11 x 7 element environment ----
  function automatic bit [23:0] jet_ref(int je [11][7], jet_thr_t thr [8]);
    int cnt [8];
    bit [23:0] w;
    foreach (cnt[i]) cnt[i] = 0;
    for (int q = 0; q < 8; q++) begin
      bit done;
      done = 0;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++) begin
          int r, c, R;
          bit lm;
          r = 1 + 2 * (q % 4) + a;
          c = 1 + 2 * (q / 4) + b;
          R = sumw(je, r, c, 2);
          lm = R > sumw(je, r, c+1, 2) && R > sumw(je, r+1, c+1, 2) &&
               R > sumw(je, r-1, c+1, 2) && R > sumw(je, r+1, c, 2) &&
               R >= sumw(je, r-1, c, 2) && R >= sumw(je, r-1, c-1, 2) &&
               R >= sumw(je, r, c-1, 2) && R >= sumw(je, r+1, c-1, 2);
          if (lm && !done) begin
            int b3, s3r, s3c;
            done = 1;
            b3 = -1;
            for (int u = 0; u < 2; u++)
              for (int v = 0; v < 2; v++)
                if (sumw(je, r-1+u, c-1+v, 3) > b3) begin
                  b3 = sumw(je, r-1+u, c-1+v, 3); s3r = r-1+u; s3c = c-1+v;
                end
            for (int s = 0; s < 8; s++) begin
              int v, sr, sc, n;
              case (thr[s].win)
                WIN_2X2: begin sr = r;   sc = c;   n = 2; end
                WIN_3X3: begin sr = s3r; sc = s3c; n = 3; end
                default: begin sr = r-1; sc = c-1; n = 4; end
              endcase
              v = sumw(je, sr, sc, n);
              if (satw(je, sr, sc, n) ? thr[s].thr != 1023 : (v > 1023 ? 1023 : v) > thr[s].thr)
                cnt[s]++;
            end
          end
        end
    end
    for (int s = 0; s < 8; s++) w[3*s +: 3] = cnt[s] > 7 ? 3'd7 : 3'(cnt[s]);
    return w;
  endfunction

  function automatic int sumw(int je [11][7], int r, int c, int n);
    int t;
    t = 0;
    for (int a = 0; a < n; a++) for (int b = 0; b < n; b++) t += je[r+a][c+b];
    return t;
  endfunction

  function automatic bit satw(int je [11][7], int r, int c, int n);
    for (int a = 0; a < n; a++) for (int b = 0; b < n; b++) if (je[r+a][c+b] == 1023) return 1;
    return 0;
  endfunction

  // ---- JEM energy sums over the 8 x 4 core ----
  function automatic bit [23:0] esum_ref(int je [8][4], int exy_thr, int et_thr, bit odd,
                                         output int ex, output int ey, output int et);
    real ang;
    int qx, qy, cc, ss;
    bit sat, ovx, ovy, ovt;
    qx = 0; qy = 0; et = 0; sat = 0;
    for (int r = 0; r < 8; r++) begin
      ang = (r + 0.5) * 3.14159265358979 / 16.0;
      cc = int'($floor(256.0 * $cos(ang) + 0.5));
      ss = int'($floor(256.0 * $sin(ang) + 0.5));
      if (cc > 255) cc = 255;
      if (ss > 255) ss = 255;
      if (odd) begin int t; t = cc; cc = ss; ss = t; end
      for (int c = 0; c < 4; c++) begin
        if (je[r][c] > exy_thr) begin
          qx += (je[r][c] * cc) / 64;
          qy += (je[r][c] * ss) / 64;
        end
        if (je[r][c] > et_thr) et += je[r][c];
        if (je[r][c] == 1023) sat = 1;
      end
    end
    ex = (qx + 2) / 4;
    ey = (qy + 2) / 4;
    ovx = ex > 4095; ovy = ey > 4095; ovt = et > 4095;
    if (ovx) ex = 4095;
    if (ovy) ey = 4095;
    if (ovt) et = 4095;
    return {ql_ref(et, ovt || sat), ql_ref(ey, ovy || sat), ql_ref(ex, ovx || sat)};
  endfunction

  function automatic bit [7:0] ql_ref(int v, bit sat);
    if (sat) return 8'hFF;
    for (int e = 0; e < 4; e++)
      if ((v >> (2 * e)) < 64) return {2'(e), 6'(v >> (2 * e))};
    return {2'd3, 6'(v >> 6)};
  endfunction

endpackage
