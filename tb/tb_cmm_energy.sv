// tb_cmm_energy: loads the missing-ET table with the quadrature-sum
// results for eight thresholds, then drives random JEM energy words
// (random quad-linear codes, now and then 0xFF or a bad parity bit),
// random remote-crate sums and both quadrant orders. Crate and system sums,
// the total-ET bits and the missing-ET bits are compared with values
// computed here; the codes are decoded independently of the design.
module tb_cmm_energy;
  import l1calo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [24:0] mod_word [16];
  logic flip_ex, flip_ey;
  crate_esum_t remote_sum, crate_sum, system_sum;
  logic [8:0] et_thr [4];
  logic lut_wr;
  logic [13:0] lut_waddr;
  logic [7:0] lut_wdata;
  logic [3:0] et_hits;
  logic [7:0] met_hits;
  int checks = 0, failures = 0, n_ovf = 0, n_met = 0, n_et = 0, n_rng [4] = '{0, 0, 0, 0};
  int met_thr [8] = '{10, 25, 40, 60, 90, 150, 250, 400};

  cmm_energy dut (.*);
  always #5 clk = ~clk;

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

  function automatic bit [7:0] rnd_code();
    int e;
    e = $urandom % 4;
    // lower exponents more often, so that all missing-ET ranges are used
    if ($urandom % 2) e = 0;
    return {2'(e), 6'($urandom % 64)};
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mod_word[m]) mod_word[m] = 25'h1000000;
    flip_ex = 0; flip_ey = 0; remote_sum = '0;
    foreach (et_thr[k]) et_thr[k] = 9'(40 + 100 * k);
    lut_wr = 0; lut_waddr = 0; lut_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << 14); a++) begin
      @(negedge clk);
      lut_wr = 1; lut_waddr = 14'(a);
      lut_wdata = met_entry(a >> 12, (a >> 6) & 63, a & 63);
    end
    @(negedge clk);
    lut_wr = 0;
    for (int it = 0; it < 3000; it++) begin
      int xa, xb, ya, yb, t, ex, ey, sx, sy, st, ax, ay, mx, r;
      bit ovf, sovf;
      bit [3:0] eh;
      bit [7:0] mh;
      int nact;
      xa = 0; xb = 0; ya = 0; yb = 0; t = 0; ovf = 0;
      nact = $urandom % 17;
      @(negedge clk);
      flip_ex = $urandom % 2; flip_ey = $urandom % 2;
      for (int m = 0; m < 16; m++) begin
        bit [23:0] v;
        bit bad;
        if ($urandom % 16 < nact) v = {rnd_code(), rnd_code(), rnd_code()};
        else v = '0;
        if ($urandom % 150 == 0) v[8 * ($urandom % 3) +: 8] = 8'hFF;
        bad = ($urandom % 150 == 0);
        mod_word[m] = {~(^v) ^ bad, v};
        if (bad || v[7:0] == 8'hFF || v[15:8] == 8'hFF || v[23:16] == 8'hFF) ovf = 1;
        if (!bad) begin
          if (m < 8) begin xa += dec(v[7:0]); ya += dec(v[15:8]); end
          else       begin xb += dec(v[7:0]); yb += dec(v[15:8]); end
          t += dec(v[23:16]);
        end
      end
      ex = flip_ex ? xb - xa : xa - xb;
      ey = flip_ey ? yb - ya : ya - yb;
      remote_sum.ovf = ($urandom % 100 == 0);
      remote_sum.ex = 17'($signed(int'($urandom % 4001) - 2000) >>> ($urandom % 6));
      remote_sum.ey = 17'($signed(int'($urandom % 4001) - 2000) >>> ($urandom % 6));
      remote_sum.et = 17'($urandom % 2 ? $urandom % 300 : $urandom % 20000);
      sx = ex + int'(remote_sum.ex);
      sy = ey + int'(remote_sum.ey);
      st = t + int'(remote_sum.et);
      sovf = ovf || remote_sum.ovf;
      ax = sx < 0 ? -sx : sx;
      ay = sy < 0 ? -sy : sy;
      mx = ax > ay ? ax : ay;
      r = mx < 64 ? 0 : mx < 128 ? 1 : mx < 256 ? 2 : 3;
      foreach (eh[k]) eh[k] = sovf || st > 4 * int'(et_thr[k]);
      mh = (sovf || mx >= 512) ? 8'hFF : met_entry(r, (ax >> r) & 63, (ay >> r) & 63);
      repeat (3) @(posedge clk);
      #1;
      checks += 4;
      if (crate_sum.ovf !== ovf || int'(crate_sum.ex) !== ex || int'(crate_sum.ey) !== ey ||
          int'(crate_sum.et) !== t) begin
        failures++;
        if (failures < 6) $display("it %0d crate %b %0d %0d %0d want %b %0d %0d %0d", it,
          crate_sum.ovf, crate_sum.ex, crate_sum.ey, crate_sum.et, ovf, ex, ey, t);
      end
      if (system_sum.ovf !== sovf || int'(system_sum.ex) !== sx || int'(system_sum.ey) !== sy ||
          int'(system_sum.et) !== st) failures++;
      if (et_hits !== eh) begin
        failures++;
        if (failures < 6) $display("it %0d et_hits %b want %b", it, et_hits, eh);
      end
      if (met_hits !== mh) begin
        failures++;
        if (failures < 6) $display("it %0d met_hits %b want %b (%0d,%0d)", it, met_hits, mh, sx, sy);
      end
      if (sovf) n_ovf++;
      if (!sovf && mh != 0 && mh != 8'hFF) n_met++;
      if (!sovf && eh != 0 && eh != 4'hF) n_et++;
      if (!sovf && mx < 512) n_rng[r]++;
    end
    if (n_ovf < 50 || n_met < 200 || n_et < 100 || n_rng[0] < 20 || n_rng[1] < 20 ||
        n_rng[2] < 20 || n_rng[3] < 20) failures++;
    $display("overflows %0d, partial missing-ET %0d, partial total-ET %0d, ranges %0d/%0d/%0d/%0d",
             n_ovf, n_met, n_et, n_rng[0], n_rng[1], n_rng[2], n_rng[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
