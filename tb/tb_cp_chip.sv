// tb_cp_chip: random EM and hadronic tower patterns over the 5 x 7 input
// of one CP chip, with random threshold sets (half of the programmable
// sets switched to tau), compared window by window with the reference
// model one clock later; also the per-half OR of the hit words and the
// saturation flag. Counts e/gamma and tau hits and windows that pass the
// thresholds but lose the local-maximum test.
module tb_cp_chip;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] em [5][7], had [5][7];
  cp_thr_t thr [16];
  logic [15:0] win_hits [2][4], half_hits [2];
  logic saturated;
  int checks = 0, failures = 0, n_eg = 0, n_tau = 0, n_notmax = 0, n_sat = 0;

  cp_chip #(.ROWS(2), .COLS(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd_tower();
    case ($urandom % 8)
      0, 1, 2: return 0;
      3, 4:    return $urandom % 6;
      5, 6:    return $urandom % 60;
      default: return ($urandom % 10 == 0) ? 255 : $urandom % 256;
    endcase
  endfunction

  initial begin
    foreach (em[r, c]) begin em[r][c] = 0; had[r][c] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int e [5][7], h [5][7];
      bit [15:0] want [2][4];
      bit [15:0] hw [2];
      bit sw;
      if (it % 50 == 0)
        foreach (thr[s]) begin
          thr[s].is_tau   = $urandom % 2;
          thr[s].cluster  = 8'($urandom % 4 == 0 ? 255 : $urandom % 120);
          thr[s].em_iso   = 6'($urandom % 3 == 0 ? 63 : $urandom % 64);
          thr[s].had_iso  = 6'($urandom % 3 == 0 ? 63 : $urandom % 64);
          thr[s].had_veto = 6'($urandom % 3 == 0 ? 63 : $urandom % 64);
        end
      foreach (e[r, c]) begin
        e[r][c] = rnd_tower();
        h[r][c] = ($urandom % 2) ? 0 : rnd_tower() / 4;
      end
      @(negedge clk);
      foreach (em[r, c]) begin em[r][c] = 8'(e[r][c]); had[r][c] = 8'(h[r][c]); end
      hw = '{default: 0};
      sw = 0;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 4; j++) begin
          int we [4][4], wh [4][4];
          cp_thr_t nolm [16];
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++) begin
              we[r][c] = e[i+r][j+c]; wh[r][c] = h[i+r][j+c];
            end
          want[i][j] = cp_window(we, wh, thr);
          hw[j / 2] |= want[i][j];
          for (int r = 1; r < 3; r++) for (int c = 1; c < 3; c++)
            if (we[r][c] == 255 || wh[r][c] == 255) sw = 1;
          for (int s = 0; s < 16; s++)
            if (want[i][j][s]) begin
              if (s >= 8 && thr[s].is_tau) n_tau++; else n_eg++;
            end
        end
      @(posedge clk);
      #1;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (win_hits[i][j] !== want[i][j]) begin
            failures++;
            if (failures < 6) $display("it %0d win %0d,%0d got %h want %h", it, i, j,
                                       win_hits[i][j], want[i][j]);
          end
        end
      checks += 3;
      if (half_hits[0] !== hw[0] || half_hits[1] !== hw[1] || saturated !== sw) failures++;
      if (sw) n_sat++;
    end
    // a pattern that passes every threshold but is not a local maximum:
    // two equal towers side by side in eta,
    // seen whole by two windows that are phi neighbours
    @(negedge clk);
    foreach (em[r, c]) begin em[r][c] = 0; had[r][c] = 0; end
    foreach (thr[s]) thr[s] = '{is_tau: 0, cluster: 8'd10, em_iso: 6'd63, had_iso: 6'd63, had_veto: 6'd63};
    em[2][3] = 8'd50;
    em[2][4] = 8'd50;
    @(posedge clk);
    #1;
    checks++;
    // windows (1,2) and (0,2) both hold the pair in their cores: equal
    // sums, neighbours in phi; only (1,2), the one towards +phi, may fire
    if (win_hits[1][2] !== 16'hFFFF || win_hits[0][2] !== 16'h0000 || win_hits[1][1] !== 16'h0000) failures++;
    else n_notmax++;
    if (n_eg < 50 || n_tau < 20) failures++;
    $display("e/gamma hits %0d, tau hits %0d, saturated %0d, tie resolved %0d", n_eg, n_tau, n_sat, n_notmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
