// tb_jet_processor: random 11 x 7 jet-element maps (a few jets on a low
// background, occasionally a saturated element) with random threshold
// sets of all three window sizes; the multiplicity word is compared with
// the reference jet model one clock later. Counts hits per window size,
// saturated windows and subregions with a maximum.
module tb_jet_processor;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] je [11][7];
  jet_thr_t thr [8];
  logic [24:0] cmm_word;
  logic [7:0] roi_found;
  logic [1:0] roi_pos [8];
  logic [7:0] roi_hits [8];
  int checks = 0, failures = 0, n_found = 0, n_sat = 0;
  int n_win [3] = '{0, 0, 0};

  jet_processor dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (je[r, c]) je[r][c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int e [11][7];
      bit [23:0] m;
      bit sat;
      if (it % 40 == 0)
        foreach (thr[s]) begin
          thr[s].win = jet_win_t'($urandom % 3);
          thr[s].thr = 10'($urandom % 8 == 0 ? 1023 : $urandom % 300);
        end
      sat = 0;
      foreach (e[r, c]) e[r][c] = $urandom % 6;
      for (int j = 0; j < 1 + $urandom % 5; j++) begin
        int r, c;
        r = $urandom % 11; c = $urandom % 7;
        e[r][c] += 20 + $urandom % 200;
        if (r < 10) e[r+1][c] += $urandom % 60;
        if (c < 6)  e[r][c+1] += $urandom % 60;
      end
      if ($urandom % 20 == 0) begin e[1 + $urandom % 8][1 + $urandom % 4] = 1023; sat = 1; end
      foreach (e[r, c]) if (e[r][c] > 1023) e[r][c] = 1023;
      m = jet_ref(e, thr);
      @(negedge clk);
      foreach (je[r, c]) je[r][c] = 10'(e[r][c]);
      @(posedge clk);
      #1;
      checks++;
      if (cmm_word !== {~(^m), m}) begin
        failures++;
        if (failures < 6) $display("it %0d got %h want %h", it, cmm_word[23:0], m);
      end
      n_found += $countones(roi_found);
      if (sat && m != 0) n_sat++;
      for (int s = 0; s < 8; s++) if (m[3*s +: 3] != 0) n_win[int'(thr[s].win)]++;
    end
    if (n_found < 100 || n_sat < 20 || n_win[0] < 50 || n_win[1] < 50 || n_win[2] < 50) failures++;
    $display("maxima %0d, saturated events with hits %0d, set hits 2x2/3x3/4x4 %0d/%0d/%0d",
             n_found, n_sat, n_win[0], n_win[1], n_win[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
