// tb_cpm: a full Cluster Processor Module. Random 20 x 7 EM and hadronic
// tower maps are BC-mux encoded (maps only on even crossings, so that
// every non-zero value is followed by zero) and sent to the module; the
// two 25-bit result words are compared with multiplicities worked out
// from the reference window model over the 16 half-chips, saturating at 7.
// The test checks that multiplicities reach saturation and that the
// second word carries odd parity.
module tb_cpm;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] em_t [20][7], had_t [20][7];
  bcmux_word_t em_link [10][7], had_link [10][7];
  cp_thr_t thr [16];
  logic [24:0] cmm_word [2];
  logic [15:0] roi_hits [8][2];
  logic [7:0] roi_sat;
  logic par_err;
  int checks = 0, failures = 0, n_hits = 0, n_sat7 = 0;
  bit [24:0] want [16][2];

  for (genvar p = 0; p < 10; p++) begin : g_p
    for (genvar c = 0; c < 7; c++) begin : g_c
      ppr_bcmux_enc ue (.clk, .rst_n, .tower_a(em_t[2*p][c]), .tower_b(em_t[2*p+1][c]), .word(em_link[p][c]));
      ppr_bcmux_enc uh (.clk, .rst_n, .tower_a(had_t[2*p][c]), .tower_b(had_t[2*p+1][c]), .word(had_link[p][c]));
    end
  end
  cpm #(.N_CHIPS(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (em_t[r, c]) begin em_t[r][c] = 0; had_t[r][c] = 0; end
    foreach (thr[s]) begin
      thr[s].is_tau   = s >= 12;
      thr[s].cluster  = 8'(2 * s);
      thr[s].em_iso   = 6'(s < 4 ? 63 : 20 + s);
      thr[s].had_iso  = 6'(s < 4 ? 63 : 10 + s);
      thr[s].had_veto = 6'(s < 4 ? 63 : 8);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int e [20][7], h [20][7];
      @(negedge clk);
      if (it >= 5) begin
        checks += 2;
        if (cmm_word[0] !== want[(it - 5) % 16][0] || cmm_word[1] !== want[(it - 5) % 16][1]) begin
          failures++;
          if (failures < 6) $display("it %0d got %h %h want %h %h", it, cmm_word[0], cmm_word[1],
                                     want[(it-5)%16][0], want[(it-5)%16][1]);
        end
      end
      foreach (e[r, c]) begin
        bit on;
        on = (it % 2 == 0) && ($urandom % 4 == 0);
        e[r][c] = on ? $urandom % 120 : 0;
        h[r][c] = (on && $urandom % 2) ? $urandom % 20 : 0;
        em_t[r][c] = 8'(e[r][c]);
        had_t[r][c] = 8'(h[r][c]);
      end
      // reference: chip k uses tower rows 2k+1 .. 2k+5
      for (int g = 0; g < 2; g++) begin
        bit [23:0] m;
        for (int s = 0; s < 8; s++) begin
          int cnt;
          cnt = 0;
          for (int k = 0; k < 8; k++)
            for (int hh = 0; hh < 2; hh++) begin
              bit any;
              any = 0;
              for (int i = 0; i < 2; i++)
                for (int j = 2 * hh; j < 2 * hh + 2; j++) begin
                  int we [4][4], wh [4][4];
                  bit [15:0] hv;
                  for (int r = 0; r < 4; r++)
                    for (int c = 0; c < 4; c++) begin
                      we[r][c] = e[2*k+1+i+r][j+c];
                      wh[r][c] = h[2*k+1+i+r][j+c];
                    end
                  hv = cp_window(we, wh, thr);
                  any |= hv[8*g+s];
                end
              cnt += int'(any);
            end
          n_hits += cnt;
          if (cnt >= 7) n_sat7++;
          m[3*s +: 3] = cnt > 7 ? 3'd7 : 3'(cnt);
        end
        want[it % 16][g] = {~(^m), m};
      end
    end
    checks++;
    if (par_err) failures++;
    if (n_hits < 100 || n_sat7 < 5) failures++;
    $display("hits %0d, saturated counts %0d", n_hits, n_sat7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
