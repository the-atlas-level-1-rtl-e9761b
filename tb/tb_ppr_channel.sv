// tb_ppr_channel: one PreProcessor channel end to end. The look-up table
// is loaded with pedestal subtraction (32), unit gain and a noise cut at
// 1 GeV; a pulse stream is run with a coarse delay of 5 crossings and the
// output ET is checked against the reference BCID model plus the same
// table, at the latency sync_delay + 6. The rate counter is compared with
// the number of crossings above its threshold. Then the stream is loaded
// into the playback memory and replayed with delay 0: the output must
// repeat.
module tb_ppr_channel;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  ppr_cfg_t cfg;
  logic [9:0] adc, lut_waddr, pb_wdata;
  logic disc, lut_wr, pb_wr, rate_clear;
  logic [7:0] lut_wdata, pb_waddr, et;
  logic [9:0] adc_aligned;
  logic sat_bcid, ext_bcid;
  logic [15:0] rate_count;
  int checks = 0, failures = 0, n_peaks = 0, n_sat = 0, n_rate = 0;
  sarr_t s;
  int c [5] = '{2, 6, 12, 8, 3};
  int lut [1024];

  ppr_channel #(.PB_DEPTH(256), .RATE_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int want(int n);
    if (n < 0) return 0;
    if (ref_sat_peak(s, n, 100, 500)) return 255;
    if (ref_fir_peak(s, n, c)) return lut[fir10(s, n, c, 4)];
    return 0;
  endfunction

  task automatic pulse(int t0, int amp);
    int shp [5] = '{12, 65, 100, 60, 25};
    for (int k = 0; k < 5; k++) begin
      int v;
      v = s[t0 + k] + amp * shp[k] / 100;
      s[t0 + k] = v > 1023 ? 1023 : v;
    end
  endtask

  task automatic run(int d, bit pb, int len);
    for (int i = 0; i < len + d + 10; i++) begin
      @(negedge clk);
      if (i - d - 7 >= 8 && i - d - 7 < len) begin
        int wv;
        wv = want(i - d - 7);
        checks++;
        if (et !== 8'(wv)) begin
          failures++;
          if (failures < 8) $display("pb=%0d n=%0d et %0d want %0d", pb, i-d-7, et, wv);
        end
        if (wv != 0) n_peaks++;
        if (wv == 255) n_sat++;
        if (!pb && wv > 20) n_rate++;
      end
      adc = (i < len) ? 10'(s[i]) : 10'd32;
      if (pb && i == 0) cfg.playback = 1;
    end
  endtask

  initial begin
    foreach (s[i]) s[i] = 32;
    for (int t = 10; t < 240; t += 11 + $urandom % 5)
      pulse(t, ($urandom % 5 == 0) ? 3000 : 10 + $urandom % 700);
    foreach (lut[a]) begin
      int v;
      v = a - 32;
      lut[a] = v <= 1 ? 0 : (v > 255 ? 255 : v);
    end
    cfg = '0;
    {cfg.coef0, cfg.coef1, cfg.coef2, cfg.coef3, cfg.coef4} = {4'(c[0]), 4'(c[1]), 4'(c[2]), 4'(c[3]), 4'(c[4])};
    cfg.drop = 3'd4; cfg.sat_low = 10'd100; cfg.sat_high = 10'd500; cfg.ext_delay = 4'd2;
    cfg.rate_thr = 8'd20; cfg.sync_delay = 4'd5;
    adc = 10'd32; disc = 0; lut_wr = 0; pb_wr = 0; rate_clear = 0;
    lut_waddr = 0; lut_wdata = 0; pb_waddr = 0; pb_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      lut_wr = 1; lut_waddr = 10'(a); lut_wdata = 8'(lut[a]);
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      lut_wr = 0; pb_wr = 1; pb_waddr = 8'(a); pb_wdata = 10'(s[a]);
    end
    @(negedge clk);
    pb_wr = 0; rate_clear = 1;
    repeat (30) @(negedge clk);
    rate_clear = 0;
    run(5, 0, 256);
    checks++;
    if (rate_count != 16'(n_rate)) begin
      failures++;
      $display("rate count %0d want %0d", rate_count, n_rate);
    end
    // playback
    cfg.sync_delay = 4'd0;
    repeat (30) @(negedge clk);
    run(0, 1, 256);
    if (n_peaks < 20 || n_sat < 4) failures++;
    $display("peaks %0d (saturated %0d), rate %0d", n_peaks, n_sat, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
