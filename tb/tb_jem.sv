// tb_jem: a whole Jet/Energy Module. Random EM and hadronic 0.2 x 0.2
// link words (with full-scale values and, now and then, a bad parity bit)
// go in every crossing; two crossings later the jet multiplicity word and
// the energy-sum word must match the reference models applied to the jet
// elements the testbench builds itself.
module tb_jem;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  jet_word_t em_link [11][7], had_link [11][7];
  jet_thr_t jet_thr [N_JET_SETS];
  logic [9:0] exy_thr, et_thr;
  logic quad_odd;
  logic [24:0] jet_word, energy_word;
  logic [7:0] roi_found;
  logic [1:0] roi_pos [8];
  logic [7:0] roi_hits [8];
  logic [11:0] ex, ey, et;
  logic par_err;
  int checks = 0, failures = 0, n_jet = 0, n_perr = 0;
  bit [24:0] want_jet [$], want_en [$];
  bit want_perr [$];

  jem dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (em_link[r, c]) begin
      em_link[r][c] = '{parity: 1'b1, et: '0};
      had_link[r][c] = '{parity: 1'b1, et: '0};
    end
    foreach (jet_thr[s]) begin
      jet_thr[s].win = jet_win_t'(s % 3);
      jet_thr[s].thr = 10'(20 + 40 * s);
    end
    exy_thr = 2; et_thr = 1; quad_odd = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 800; it++) begin
      int e [11][7], core [8][4], rx, ry, rt;
      bit [23:0] m, w;
      bit perr;
      perr = 0;
      @(negedge clk);
      foreach (e[r, c]) begin
        int a, b;
        a = $urandom % 4; b = $urandom % 4;
        if ($urandom % 12 == 0) a += $urandom % 200;
        if ($urandom % 12 == 0) b += $urandom % 200;
        if ($urandom % 400 == 0) a = 511;
        em_link[r][c]  = '{parity: ~^9'(a), et: 9'(a)};
        had_link[r][c] = '{parity: ~^9'(b), et: 9'(b)};
        if ($urandom % 500 == 0) begin
          em_link[r][c].parity = ~em_link[r][c].parity;
          a = 0; perr = 1;
        end
        e[r][c] = (a == 511 || b == 511) ? 1023 : a + b;
      end
      foreach (core[r, c]) core[r][c] = e[r+1][c+1];
      m = jet_ref(e, jet_thr);
      w = esum_ref(core, int'(exy_thr), int'(et_thr), quad_odd, rx, ry, rt);
      want_jet.push_back({~(^m), m});
      want_en.push_back({~(^w), w});
      want_perr.push_back(perr);
      @(posedge clk);
      #1;
      if (it >= 1) begin
        bit [24:0] wj, we;
        wj = want_jet.pop_front(); we = want_en.pop_front();
        checks += 2;
        if (jet_word !== wj || energy_word !== we) begin
          failures++;
          if (failures < 6) $display("it %0d jet %h/%h energy %h/%h", it, jet_word, wj, energy_word, we);
        end
        if (wj[23:0] != 0) n_jet++;
      end
      // parity errors flag one clock after the words
      if (it >= 0) begin
        bit p;
        p = want_perr[0];
        if (it >= 0) begin
          checks++;
          if (par_err !== p) begin
            failures++;
            if (failures < 6) $display("it %0d par_err %b want %b", it, par_err, p);
          end
          if (p) n_perr++;
        end
        void'(want_perr.pop_front());
      end
    end
    if (n_jet < 200 || n_perr < 5) failures++;
    $display("events with jets %0d, parity errors %0d", n_jet, n_perr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
