// tb_l1calo_top: end-to-end test of one trigger slice at its default size.
//
// Every EM and hadronic trigger tower gets its own stream of ADC samples:
// a pedestal with a little noise, isolated pulses, clusters spread over
// neighbouring towers, saturating pulses and pairs of pulses arranged to
// use both BC-mux orders. The hadronic samples arrive one crossing later
// than the EM samples and are realigned by a smaller synchronisation
// delay. From the samples alone the testbench works out, with the
// reference models, the ET of every tower in every crossing, and from
// those the expected
//   * tower values decoded in the Cluster Processor Module,
//   * CP multiplicities for the Central Trigger Processor (e/gamma and tau
//     threshold sets, added to fixed words from the other modules),
//   * jet multiplicities, jet-ET estimate and its threshold bits,
//   * total-ET and missing-ET threshold bits (missing-ET table loaded with
//     the quadrature results),
//   * per-tower rate counts,
//   * the readout fragments for a series of Level-1 Accepts (zero
//     suppression on), with the output held off for a while so that the
//     Readout Driver raises BUSY and later drops it.
// Each stream is compared at a fixed latency; on a mismatch the latency
// that would fit best is printed to help diagnosis. Counts of each
// mechanism seen are printed and required to be non-zero.
module tb_l1calo_top;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;

  localparam int NK = NS + 40;     // steps driven after set-up
  // latencies in steps from a crossing's EM samples to the outputs, as seen
  // at the falling edge of the step (one more than in clock edges)
  localparam int L_TOWER = 13, L_CP = 17, L_JET = 15, L_ETJ = 16, L_EN = 16;

  logic clk = 0, rst_n = 0;
  logic [9:0]  adc_em [22][14], adc_had [22][14];
  logic        disc_em [22][14], disc_had [22][14];
  ppr_cfg_t    cfg_em, cfg_had;
  logic        lut_wr_em, lut_wr_had, pb_wr_em, pb_wr_had, rate_clear;
  logic [9:0]  lut_waddr, pb_wdata;
  logic [7:0]  lut_wdata, pb_waddr;
  logic [15:0] rate_em [22][14], rate_had [22][14];
  cp_thr_t     cp_thr [16];
  logic [24:0] cpm_other [13][2], cp_remote [3][2];
  jet_thr_t    jet_thr [8];
  logic [9:0]  exy_thr, et_thr;
  logic        quad_odd, flip_ex, flip_ey;
  logic [24:0] jem_other_jet [15], jem_other_energy [15], jet_remote;
  crate_esum_t energy_remote;
  logic [8:0]  sum_et_thr [4];
  logic        met_lut_wr;
  logic [13:0] met_lut_waddr;
  logic [7:0]  met_lut_wdata;
  logic [9:0]  etj_weight [8];
  logic [15:0] etj_thr [4];
  logic [24:0] ctp_cp_em, ctp_cp_tau, ctp_jet;
  logic [3:0]  ctp_etj, ctp_et;
  logic [7:0]  ctp_met;
  logic [15:0] jet_et_sum;
  logic [24:0] cp_crate_word [2], jet_crate_word;
  crate_esum_t energy_crate_sum, energy_roi;
  logic [15:0] cp_roi_hits [8][2];
  logic [7:0]  cp_roi_sat, jet_roi_found;
  logic [1:0]  jet_roi_pos [8];
  logic [7:0]  jet_roi_hits [8];
  logic        link_par_err;
  logic        l1a;
  logic [23:0] l1id;
  logic [11:0] bcn;
  logic [7:0]  ttype, ro_offset;
  logic [2:0]  ro_nslices;
  logic [17:0] rod_enable;
  logic        rod_zero_sup;
  logic [8:0]  rod_busy_thr;
  logic [13:0] rod_ext_valid, rod_ext_ready, rod_ext_hdr, rod_ext_par;
  logic [23:0] rod_ext_data [14];
  logic        slink_valid, slink_ready, rod_busy, ro_overflow;
  logic [31:0] slink_data;

  l1calo_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c5 [5] = '{2, 6, 12, 8, 3};
  int lut [1024];
  int met_thr [8] = '{10, 25, 40, 60, 90, 150, 250, 400};
  sarr_t s_em [22][14], s_had [22][14];
  byte unsigned tet [2][NS][22][14];           // reference tower ET [layer][crossing]
  // observations per step
  bit [24:0]  o_cpem [NK], o_cptau [NK], o_jet [NK];
  bit [19:0]  o_etj [NK];             // {jet-ET bits of step k+1, jet-ET value}
  bit [3:0]   o_et [NK];
  bit [7:0]   o_met [NK];
  byte unsigned o_tw [NK][2][20][7];
  bit [23:0]  ro_hist [4][NK];
  bit [31:0]  expq [$];
  bit         busy_prev = 0, stall = 1;
  int n_fir = 0, n_satb = 0, n_same = 0, n_follow = 0, n_em = 0, n_tau = 0, n_lmsup = 0;
  int n_jwin [3] = '{0, 0, 0};
  int n_jsat = 0, n_et = 0, n_met = 0, n_etj = 0, n_ev = 0, n_zs = 0, n_rise = 0, n_fall = 0;
  int n_rate = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [24:0] pw(input bit [23:0] m);
    return {~(^m), m};
  endfunction

  function automatic int dec(input bit [7:0] c);
    return int'(c[5:0]) << (2 * c[7:6]);
  endfunction

  function automatic bit [7:0] met_entry(input int r, input int x, input int y);
    real q;
    bit [7:0] b;
    q = $sqrt(real'((x << r) * (x << r) + (y << r) * (y << r)));
    foreach (b[k]) b[k] = q > real'(met_thr[k]);
    return b;
  endfunction

  function automatic bit [23:0] addm(input bit [23:0] a, input bit [23:0] b);
    bit [23:0] r;
    for (int s = 0; s < 8; s++) begin
      int v;
      v = a[3*s +: 3] + b[3*s +: 3];
      r[3*s +: 3] = 3'(v > 7 ? 7 : v);
    end
    return r;
  endfunction

  // ---------------- stimulus ----------------
  task automatic pulse(ref sarr_t s, input int t0, input int amp);
    int shp [5] = '{12, 65, 100, 60, 25};
    for (int k = 0; k < 5; k++)
      if (t0 - 2 + k >= 0 && t0 - 2 + k < NS) begin
        int v;
        v = s[t0 - 2 + k] + amp * shp[k] / 100;
        s[t0 - 2 + k] = v > 1023 ? 1023 : v;
      end
  endtask

  task automatic make_samples();
    foreach (s_em[r, c]) foreach (s_em[r][c][n]) begin
      s_em[r][c][n]  = 31 + $urandom % 3;
      s_had[r][c][n] = 31 + $urandom % 3;
    end
    for (int n = 12; n < NS - 60; n += 3 + $urandom % 4) begin
      int r, c, kind;
      r = $urandom % 22; c = $urandom % 14;
      kind = $urandom % 10;
      case (kind)
        0, 1, 2: pulse(s_em[r][c], n, 5 + $urandom % 60);                  // isolated EM
        3: begin                                                            // EM + hadronic cluster
          pulse(s_em[r][c], n, 10 + $urandom % 80);
          if (r < 21) pulse(s_em[r+1][c], n, 5 + $urandom % 40);
          if (c < 13) pulse(s_had[r][c+1], n, 5 + $urandom % 40);
          pulse(s_had[r][c], n, 10 + $urandom % 60);
        end
        4: begin                                                            // broad jet
          for (int a = -1; a <= 2; a++) for (int b = -1; b <= 2; b++)
            if (r + a >= 0 && r + a < 22 && c + b >= 0 && c + b < 14) begin
              pulse(s_em[r+a][c+b], n, 3 + $urandom % 30);
              pulse(s_had[r+a][c+b], n, 3 + $urandom % 40);
            end
        end
        5: pulse(s_em[r][c], n, 1500 + $urandom % 1500);                    // saturating
        6: begin                                                            // BC-mux pair, same crossing
          int p;
          p = r & ~1;
          pulse(s_em[p][c], n, 10 + $urandom % 50);
          pulse(s_em[p+1][c], n, 10 + $urandom % 50);
        end
        7: begin                                                            // BC-mux pair, following crossing
          int p;
          p = r & ~1;
          pulse(s_had[p][c], n, 10 + $urandom % 50);
          pulse(s_had[p+1][c], n + 1, 10 + $urandom % 50);
        end
        8: begin                                                            // two equal neighbours in phi
          pulse(s_em[r][c], n, 40);
          if (r < 21) pulse(s_em[r+1][c], n, 40);
        end
        default: pulse(s_had[r][c], n, 5 + $urandom % 200);                 // hadronic
      endcase
    end
  endtask

  function automatic int want_et(input sarr_t s, input int n);
    if (ref_sat_peak(s, n, 100, 500)) return 255;
    if (ref_fir_peak(s, n, c5)) return lut[fir10(s, n, c5, 4)];
    return 0;
  endfunction

  // ---------------- reference chain for one crossing ----------------
  function automatic void expect_crossing(input int n, output bit [24:0] w_em, output bit [24:0] w_tau,
                                          output bit [24:0] w_jet, output bit [19:0] w_etj,
                                          output bit [3:0] w_et, output bit [7:0] w_met);
    int em4 [4][4], had4 [4][4], je [11][7], core [8][4], ejs, hjs, rx, ry, rt;
    bit [15:0] cnt_bits;
    int cnt [16];
    bit [23:0] m, jm, ew;
    cp_thr_t open [16];
    int xa, xb, ya, yb, t, ex, ey, sx, sy, st, ax, ay, mx, r;
    bit ovf;
    int etj;
    foreach (cnt[s]) cnt[s] = 0;
    foreach (open[s]) open[s] = '{is_tau: 1'b0, cluster: 8'd0, em_iso: 6'd63, had_iso: 6'd63, had_veto: 6'd63};
    // Cluster Processor: 8 chips x 2 halves, each the OR of 2 x 2 windows
    for (int k = 0; k < 8; k++)
      for (int h = 0; h < 2; h++) begin
        bit [15:0] orh;
        orh = '0;
        for (int wr = 0; wr < 2; wr++)
          for (int wc = 2 * h; wc < 2 * h + 2; wc++) begin
            bit [15:0] hw;
            int emcore;
            for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin
              em4[a][b]  = tet[0][n][2*k+1+wr+a][wc+b];
              had4[a][b] = tet[1][n][2*k+1+wr+a][wc+b];
            end
            hw = cp_window(em4, had4, cp_thr);
            orh |= hw;
            emcore = em4[1][1] + em4[1][2] + em4[2][1] + em4[2][2];
            if (emcore > 0 && cp_window(em4, had4, open) == '0) n_lmsup++;
          end
        for (int s = 0; s < 16; s++) cnt[s] += orh[s];
        if (orh[7:0] != 0) n_em++;
        for (int s = 8; s < 16; s++) if (orh[s] && cp_thr[s].is_tau) n_tau++;
      end
    for (int s = 0; s < 16; s++) cnt_bits[s] = 1'b0;
    foreach (m[i]) m[i] = 1'b0;
    for (int s = 0; s < 8; s++) m[3*s +: 3] = 3'(cnt[s] > 7 ? 7 : cnt[s]);
    for (int i = 0; i < 13; i++) m = addm(m, cpm_other[i][0][23:0]);
    for (int i = 0; i < 3; i++) m = addm(m, cp_remote[i][0][23:0]);
    w_em = pw(m);
    for (int s = 0; s < 8; s++) m[3*s +: 3] = 3'(cnt[8+s] > 7 ? 7 : cnt[8+s]);
    for (int i = 0; i < 13; i++) m = addm(m, cpm_other[i][1][23:0]);
    for (int i = 0; i < 3; i++) m = addm(m, cp_remote[i][1][23:0]);
    w_tau = pw(m);
    // jet elements
    for (int p = 0; p < 11; p++)
      for (int q = 0; q < 7; q++) begin
        bit es, hs;
        ejs = 0; hjs = 0; es = 0; hs = 0;
        for (int a = 0; a < 2; a++) for (int b = 0; b < 2; b++) begin
          ejs += tet[0][n][2*p+a][2*q+b];
          hjs += tet[1][n][2*p+a][2*q+b];
          if (tet[0][n][2*p+a][2*q+b] == 255) es = 1;
          if (tet[1][n][2*p+a][2*q+b] == 255) hs = 1;
        end
        if (es || ejs > 511) ejs = 511;
        if (hs || hjs > 511) hjs = 511;
        je[p][q] = (ejs == 511 || hjs == 511) ? 1023 : ejs + hjs;
      end
    jm = jet_ref(je, jet_thr);
    for (int s = 0; s < 8; s++) if (jm[3*s +: 3] != 0) n_jwin[int'(jet_thr[s].win)]++;
    if (jm != 0) foreach (je[p, q]) if (je[p][q] == 1023) begin n_jsat++; break; end
    m = jm;
    for (int i = 0; i < 15; i++) m = addm(m, jem_other_jet[i][23:0]);
    m = addm(m, jet_remote[23:0]);
    w_jet = pw(m);
    etj = 0;
    for (int s = 0; s < 8; s++) etj += int'(m[3*s +: 3]) * int'(etj_weight[s]);
    for (int k = 0; k < 4; k++) w_etj[16+k] = etj > int'(etj_thr[k]);
    w_etj[15:0] = 16'(etj);
    // energy
    foreach (core[a, b]) core[a][b] = je[a+1][b+1];
    ew = esum_ref(core, int'(exy_thr), int'(et_thr), quad_odd, rx, ry, rt);
    xa = dec(ew[7:0]); ya = dec(ew[15:8]); xb = 0; yb = 0; t = dec(ew[23:16]);
    ovf = ew[7:0] == 8'hFF || ew[15:8] == 8'hFF || ew[23:16] == 8'hFF;
    for (int i = 0; i < 15; i++) begin
      bit [24:0] w;
      w = jem_other_energy[i];
      if (w[7:0] == 8'hFF || w[15:8] == 8'hFF || w[23:16] == 8'hFF) ovf = 1;
      if (i + 1 < 8) begin xa += dec(w[7:0]); ya += dec(w[15:8]); end
      else           begin xb += dec(w[7:0]); yb += dec(w[15:8]); end
      t += dec(w[23:16]);
    end
    ex = flip_ex ? xb - xa : xa - xb;
    ey = flip_ey ? yb - ya : ya - yb;
    sx = ex + int'(energy_remote.ex);
    sy = ey + int'(energy_remote.ey);
    st = t + int'(energy_remote.et);
    ovf = ovf || energy_remote.ovf;
    ax = sx < 0 ? -sx : sx;
    ay = sy < 0 ? -sy : sy;
    mx = ax > ay ? ax : ay;
    r = mx < 64 ? 0 : mx < 128 ? 1 : mx < 256 ? 2 : 3;
    foreach (w_et[k]) w_et[k] = ovf || st > 4 * int'(sum_et_thr[k]);
    w_met = (ovf || mx >= 512) ? 8'hFF : met_entry(r, (ax >> r) & 63, (ay >> r) & 63);
  endfunction

  // compare one observed stream with its expectation at latency L
  task automatic compare(input string name, input bit [31:0] e [NS], input bit [31:0] o [NK], input int L);
    int bad, best, bestbad;
    bad = 0;
    for (int n = 0; n < NS; n++) begin
      checks++;
      if (e[n] != o[n + L]) begin
        bad++;
        if (bad <= 3) $display("%s crossing %0d: got %h want %h", name, n, o[n + L], e[n]);
      end
    end
    failures += bad;
    if (bad != 0) begin
      best = 0; bestbad = NS + 1;
      for (int l = 0; l < 40; l++) begin
        int b;
        b = 0;
        for (int n = 0; n < NS; n++) if (e[n] != o[n + l]) b++;
        if (b < bestbad) begin bestbad = b; best = l; end
      end
      $display("%s: %0d mismatches at latency %0d; best latency %0d with %0d", name, bad, L, best, bestbad);
    end
  endtask

  // ---------------- output stream checking ----------------
  always @(posedge clk) if (rst_n && slink_valid && slink_ready) begin
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected fragment word %h", slink_data);
    end else begin
      bit [31:0] w;
      w = expq.pop_front();
      if (slink_data !== w) begin
        failures++;
        if (failures < 10) $display("fragment word %h want %h", slink_data, w);
      end
    end
  end

  // ---------------- main ----------------
  initial begin
    bit [31:0] e_cpem [NS], e_cptau [NS], e_jet [NS], e_etj [NS], e_et [NS], e_met [NS];
    bit [31:0] v_cpem [NK], v_cptau [NK], v_jet [NK], v_etj [NK], v_et [NK], v_met [NK];
    int tw_bad;

    // settings
    foreach (lut[a]) begin
      int v;
      v = a - 62;
      lut[a] = v <= 2 ? 0 : (v > 255 ? 255 : v);
    end
    cfg_em = '0;
    {cfg_em.coef0, cfg_em.coef1, cfg_em.coef2, cfg_em.coef3, cfg_em.coef4} =
      {4'(c5[0]), 4'(c5[1]), 4'(c5[2]), 4'(c5[3]), 4'(c5[4])};
    cfg_em.drop = 3'd4; cfg_em.sat_low = 10'd100; cfg_em.sat_high = 10'd500;
    cfg_em.ext_delay = 4'd2; cfg_em.rate_thr = 8'd20;
    cfg_had = cfg_em;
    cfg_em.sync_delay = 4'd3;
    cfg_had.sync_delay = 4'd2;
    foreach (adc_em[r, c]) begin
      adc_em[r][c] = 0; adc_had[r][c] = 0; disc_em[r][c] = 0; disc_had[r][c] = 0;
    end
    lut_wr_em = 0; lut_wr_had = 0; pb_wr_em = 0; pb_wr_had = 0; rate_clear = 0;
    lut_waddr = 0; lut_wdata = 0; pb_waddr = 0; pb_wdata = 0;
    for (int s = 0; s < 16; s++) begin
      cp_thr[s].is_tau   = (s >= 8) && (s % 2 == 0);
      cp_thr[s].cluster  = 8'(4 + 9 * (s % 8));
      cp_thr[s].em_iso   = (s % 4 == 3) ? 6'd6 : 6'd63;
      cp_thr[s].had_iso  = (s % 4 == 3) ? 6'd6 : 6'd63;
      cp_thr[s].had_veto = (s % 4 == 1) ? 6'd4 : 6'd63;
    end
    foreach (cpm_other[i, g]) cpm_other[i][g] = pw('0);
    cpm_other[4][0] = pw(24'd1 << 6);
    foreach (cp_remote[i, g]) cp_remote[i][g] = pw('0);
    for (int s = 0; s < 8; s++) begin
      int th [8] = '{10, 20, 40, 60, 80, 120, 180, 250};
      jet_thr[s].win = jet_win_t'(s % 3);
      jet_thr[s].thr = 10'(th[s]);
    end
    exy_thr = 2; et_thr = 2; quad_odd = 0; flip_ex = 0; flip_ey = 1;
    foreach (jem_other_jet[i]) jem_other_jet[i] = pw('0);
    jem_other_jet[3] = pw(24'd1);
    jet_remote = pw(24'd2 << 3);
    foreach (jem_other_energy[i]) jem_other_energy[i] = pw('0);
    jem_other_energy[2] = pw({8'd20, 8'd0, 2'b01, 6'd12});
    jem_other_energy[9] = pw({8'd30, 8'd5, 8'd10});
    energy_remote = '{ovf: 1'b0, ex: -17'sd30, ey: 17'sd40, et: 17'd100};
    sum_et_thr = '{9'd20, 9'd50, 9'd100, 9'd200};
    met_lut_wr = 0; met_lut_waddr = 0; met_lut_wdata = 0;
    etj_weight = '{10'd10, 10'd5, 10'd10, 10'd10, 10'd20, 10'd20, 10'd30, 10'd40};
    etj_thr = '{16'd20, 16'd60, 16'd150, 16'd400};
    l1a = 0; l1id = 0; bcn = 0; ttype = 0; ro_offset = 8'd10; ro_nslices = 3'd5;
    rod_enable = 18'h0000F; rod_zero_sup = 1; rod_busy_thr = 9'd8;
    rod_ext_valid = '0; rod_ext_hdr = '0; rod_ext_par = '0;
    foreach (rod_ext_data[i]) rod_ext_data[i] = '0;
    slink_ready = 0;

    make_samples();
    for (int n = 0; n < NS; n++)
      foreach (s_em[r, c]) begin
        tet[0][n][r][c] = 8'(want_et(s_em[r][c], n));
        tet[1][n][r][c] = 8'(want_et(s_had[r][c], n));
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    // look-up tables
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      lut_wr_em = 1; lut_wr_had = 1; lut_waddr = 10'(a); lut_wdata = 8'(lut[a]);
    end
    for (int a = 0; a < (1 << 14); a++) begin
      @(negedge clk);
      lut_wr_em = 0; lut_wr_had = 0;
      met_lut_wr = 1; met_lut_waddr = 14'(a);
      met_lut_wdata = met_entry(a >> 12, (a >> 6) & 63, a & 63);
    end
    @(negedge clk);
    met_lut_wr = 0; rate_clear = 1;
    @(negedge clk);
    rate_clear = 0;

    // run: step k presents EM samples of crossing k and hadronic of k-1
    for (int k = 0; k < NK; k++) begin
      @(negedge clk);
      o_cpem[k] = ctp_cp_em; o_cptau[k] = ctp_cp_tau; o_jet[k] = ctp_jet;
      o_etj[k][15:0] = jet_et_sum;
      if (k > 0) o_etj[k-1][19:16] = ctp_etj;
      o_et[k] = ctp_et; o_met[k] = ctp_met;
      for (int r = 0; r < 20; r++) for (int c = 0; c < 7; c++) begin
        o_tw[k][0][r][c] = dut.u_cpm.em_t[r][c];
        o_tw[k][1][r][c] = dut.u_cpm.had_t[r][c];
      end
      ro_hist[0][k] = ctp_cp_em[23:0];
      ro_hist[1][k] = ctp_cp_tau[23:0];
      ro_hist[2][k] = ctp_jet[23:0];
      ro_hist[3][k] = {8'd0, ctp_etj, ctp_et, ctp_met};
      if (busy_prev != rod_busy) begin
        if (rod_busy) n_rise++; else n_fall++;
        busy_prev = rod_busy;
      end
      foreach (adc_em[r, c]) begin
        adc_em[r][c]  = 10'(s_at(s_em[r][c], k));
        adc_had[r][c] = 10'(s_at(s_had[r][c], k - 1));
      end
      bcn = 12'(k + 7);
      if (k == 150) stall = 0;
      slink_ready = !stall && ($urandom % 4 != 0);
      l1a = (k >= 40 && k < NK - 20 && k % 25 == 15);
      if (l1a) begin
        int nw;
        nw = 0;
        l1id = 24'(n_ev); ttype = 8'($urandom);
        expq.push_back(32'hEE1234EE);
        expq.push_back({8'd0, l1id});
        expq.push_back({20'd0, bcn});
        expq.push_back({24'd0, ttype});
        for (int ch = 0; ch < 4; ch++)
          for (int s = 0; s < 5; s++) begin
            bit [23:0] d;
            d = ro_hist[ch][k - 10 - 2 + s];
            if (d == 0) n_zs++;
            else begin
              expq.push_back({5'(ch), 3'(s), d});
              nw++;
            end
          end
        expq.push_back(32'd0);
        expq.push_back({16'd0, 16'(nw)});
        n_ev++;
      end
    end
    @(negedge clk);
    l1a = 0;
    slink_ready = 1;
    repeat (2000) @(negedge clk);
    if (busy_prev && !rod_busy) n_fall++;

    // ---------- comparisons ----------
    for (int n = 0; n < NS; n++) begin
      bit [24:0] a, b, c;
      bit [19:0] d;
      bit [3:0] e;
      bit [7:0] f;
      expect_crossing(n, a, b, c, d, e, f);
      e_cpem[n] = 32'(a); e_cptau[n] = 32'(b); e_jet[n] = 32'(c); e_etj[n] = 32'(d);
      e_et[n] = 32'(e); e_met[n] = 32'(f);
      if (e != 0 && e != 4'hF) n_et++;
      if (f != 0 && f != 8'hFF) n_met++;
      if (d[19:16] != 0 && d[19:16] != 4'hF) n_etj++;
    end
    for (int k = 0; k < NK; k++) begin
      v_cpem[k] = 32'(o_cpem[k]); v_cptau[k] = 32'(o_cptau[k]); v_jet[k] = 32'(o_jet[k]);
      v_etj[k] = 32'(o_etj[k]); v_et[k] = 32'(o_et[k]); v_met[k] = 32'(o_met[k]);
    end
    compare("CP e/gamma multiplicities", e_cpem, v_cpem, L_CP);
    compare("CP second-group multiplicities", e_cptau, v_cptau, L_CP);
    compare("jet multiplicities", e_jet, v_jet, L_JET);
    compare("jet-ET", e_etj, v_etj, L_ETJ);
    compare("total-ET bits", e_et, v_et, L_EN);
    compare("missing-ET bits", e_met, v_met, L_EN);

    // decoded towers in the CPM
    tw_bad = 0;
    for (int n = 0; n < NS; n++)
      for (int l = 0; l < 2; l++)
        for (int r = 1; r < 20; r++) for (int c = 0; c < 7; c++) begin
          checks++;
          if (o_tw[n + L_TOWER][l][r][c] != tet[l][n][r][c]) begin
            tw_bad++;
            if (tw_bad <= 3) $display("tower l%0d [%0d][%0d] crossing %0d: %0d want %0d", l, r, c, n,
                                      o_tw[n + L_TOWER][l][r][c], tet[l][n][r][c]);
          end
        end
    failures += tw_bad;

    // BCID and BC-mux cases, rate counters
    foreach (s_em[r, c]) for (int l = 0; l < 2; l++) begin
      int cnt;
      cnt = 0;
      for (int n = 0; n < NS; n++) begin
        int v;
        v = tet[l][n][r][c];
        if (v > 20) cnt++;
        if (v == 255) n_satb++;
        else if (v > 0) n_fir++;
        if (r % 2 == 0 && n + 1 < NS) begin
          if (v != 0 && tet[l][n][r+1][c] != 0) n_same++;
          if ((v != 0 && tet[l][n+1][r+1][c] != 0 && tet[l][n][r+1][c] == 0) ||
              (tet[l][n][r+1][c] != 0 && tet[l][n+1][r][c] != 0 && v == 0)) n_follow++;
        end
      end
      checks++;
      if (int'((l == 0) ? rate_em[r][c] : rate_had[r][c]) != cnt) begin
        failures++;
        if (failures < 10) $display("rate l%0d [%0d][%0d] %0d want %0d", l, r, c,
                                    (l == 0) ? rate_em[r][c] : rate_had[r][c], cnt);
      end
      n_rate += cnt;
    end

    checks += 3;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d fragment words not seen", expq.size());
    end
    if (link_par_err) failures++;
    if (ro_overflow) failures++;

    $display("FIR peaks %0d, saturated BCID %0d, BC-mux same/following crossing %0d/%0d",
             n_fir, n_satb, n_same, n_follow);
    $display("e/gamma RoIs %0d, tau RoIs %0d, windows vetoed by local maximum %0d",
             n_em, n_tau, n_lmsup);
    $display("jet hits 2x2/3x3/4x4 %0d/%0d/%0d, jets with saturated elements %0d",
             n_jwin[0], n_jwin[1], n_jwin[2], n_jsat);
    $display("partial ET/missing-ET/jet-ET bits %0d/%0d/%0d, rate counts %0d",
             n_et, n_met, n_etj, n_rate);
    $display("events read out %0d, suppressed zero words %0d, BUSY rise/fall %0d/%0d",
             n_ev, n_zs, n_rise, n_fall);
    if (n_fir == 0 || n_satb == 0 || n_same == 0 || n_follow == 0 || n_em == 0 || n_tau == 0 ||
        n_lmsup == 0 || n_jwin[0] == 0 || n_jwin[1] == 0 || n_jwin[2] == 0 || n_jsat == 0 ||
        n_et == 0 || n_met == 0 || n_etj == 0 || n_ev == 0 || n_zs == 0 || n_rise == 0 ||
        n_fall == 0 || n_rate == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
