// tb_ppr_mcm: four channels of one multi-chip module. Pulses, some
// simultaneous in all four towers so that the 2x2 sum overflows, some
// saturated, are checked at three outputs: each channel's ET against the
// reference model, the 9-bit jet-link word (sum, 511 on overflow or
// saturation, odd parity) and the two BC-mux links, decoded again.
module tb_ppr_mcm;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  ppr_cfg_t cfg [4];
  logic [9:0] adc [4];
  logic [3:0] disc, lut_wr, pb_wr;
  logic [9:0] lut_waddr, pb_wdata;
  logic [7:0] lut_wdata, pb_waddr;
  logic rate_clear;
  bcmux_word_t cp_link [2];
  jet_word_t jet_link;
  logic [7:0] et [4];
  logic [9:0] adc_aligned [4];
  logic [15:0] rate_count [4];
  logic [7:0] da [2], db [2];
  logic pe [2];
  int checks = 0, failures = 0, n_ovf = 0, n_sat = 0, n_sum = 0;
  sarr_t s [4];
  int c [5] = '{1, 4, 8, 5, 2};

  ppr_mcm #(.PB_DEPTH(256)) dut (.*);
  for (genvar l = 0; l < 2; l++) begin : g_dec
    cp_bcmux_dec u_dec (.clk, .rst_n, .word(cp_link[l]), .tower_a(da[l]), .tower_b(db[l]),
                        .par_err(pe[l]));
  end
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int want(int ch, int n);
    if (n < 0) return 0;
    if (ref_sat_peak(s[ch], n, 100, 500)) return 255;
    if (ref_fir_peak(s[ch], n, c)) begin
      int v;
      v = fir10(s[ch], n, c, 3) - 20;   // table: pedestal 20, unit gain
      return v <= 0 ? 0 : (v > 255 ? 255 : v);
    end
    return 0;
  endfunction

  task automatic pulse(int ch, int t0, int amp);
    int shp [5] = '{12, 65, 100, 60, 25};
    for (int k = 0; k < 5; k++) begin
      int v;
      v = s[ch][t0 + k] + amp * shp[k] / 100;
      s[ch][t0 + k] = v > 1023 ? 1023 : v;
    end
  endtask

  initial begin
    foreach (s[ch, i]) s[ch][i] = 20;
    for (int t = 10; t < NS - 30; t += 13 + $urandom % 5) begin
      case ($urandom % 3)
        0: for (int ch = 0; ch < 4; ch++) pulse(ch, t, 75 + $urandom % 45);  // overflow
        1: pulse($urandom % 4, t, 3000);                                       // saturated
        default: for (int ch = 0; ch < 4; ch++) if ($urandom % 2) pulse(ch, t + $urandom % 2, 5 + $urandom % 120);
      endcase
    end
    foreach (cfg[ch]) begin
      cfg[ch] = '0;
      {cfg[ch].coef0, cfg[ch].coef1, cfg[ch].coef2, cfg[ch].coef3, cfg[ch].coef4} =
        {4'(c[0]), 4'(c[1]), 4'(c[2]), 4'(c[3]), 4'(c[4])};
      cfg[ch].drop = 3'd3; cfg[ch].sat_low = 10'd100; cfg[ch].sat_high = 10'd500;
      cfg[ch].sync_delay = 4'd2; cfg[ch].rate_thr = 8'd255;
    end
    foreach (adc[ch]) adc[ch] = 10'd20;
    disc = 0; lut_wr = 0; pb_wr = 0; rate_clear = 0; lut_waddr = 0; lut_wdata = 0;
    pb_waddr = 0; pb_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      int v;
      @(negedge clk);
      v = a - 20;
      lut_wr = 4'hF; lut_waddr = 10'(a); lut_wdata = 8'(v <= 0 ? 0 : (v > 255 ? 255 : v));
    end
    @(negedge clk);
    lut_wr = 0;
    repeat (30) @(negedge clk);
    for (int i = 0; i < NS + 20; i++) begin
      @(negedge clk);
      // channel ET of crossing i-9 (delay 2); link words of i-10; decoded towers of i-12
      if (i - 9 >= 8 && i - 9 < NS) begin
        for (int ch = 0; ch < 4; ch++) begin
          checks++;
          if (et[ch] !== 8'(want(ch, i - 9))) begin
            failures++;
            if (failures < 8) $display("ch%0d n=%0d et %0d want %0d", ch, i-9, et[ch], want(ch, i-9));
          end
        end
      end
      if (i - 10 >= 8 && i - 10 < NS) begin
        int sum, js;
        bit sat;
        sum = 0; sat = 0;
        for (int ch = 0; ch < 4; ch++) begin
          sum += want(ch, i - 10);
          if (want(ch, i - 10) == 255) sat = 1;
        end
        js = (sum > 511 || sat) ? 511 : sum;
        if (sum > 511 && !sat) n_ovf++;
        if (sat) n_sat++;
        if (js > 0) n_sum++;
        checks++;
        if (jet_link.et !== 9'(js) || ^{jet_link.parity, jet_link.et} !== 1'b1) begin
          failures++;
          if (failures < 8) $display("n=%0d jet %0d want %0d", i-10, jet_link.et, js);
        end
      end
      if (i - 12 >= 8 && i - 12 < NS) begin
        checks++;
        if (da[0] !== 8'(want(0, i-12)) || db[0] !== 8'(want(1, i-12)) ||
            da[1] !== 8'(want(2, i-12)) || db[1] !== 8'(want(3, i-12)) || pe[0] || pe[1]) begin
          failures++;
          if (failures < 8) $display("n=%0d bcmux mismatch", i-12);
        end
      end
      for (int ch = 0; ch < 4; ch++) adc[ch] = (i < NS) ? 10'(s[ch][i]) : 10'd20;
    end
    if (n_ovf < 3 || n_sat < 3 || n_sum < 20) failures++;
    $display("sums %0d, overflowed %0d, saturated %0d", n_sum, n_ovf, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
