// tb_jem_energy_sum: random 8 x 4 core maps, from quiet to overflowing,
// with random noise thresholds and both quadrant parities; Ex, Ey, ET and
// the quad-linear word are compared with a reference that takes its
// cosines from real arithmetic. Counts overflow and saturation cases.
module tb_jem_energy_sum;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] je [8][4];
  logic [9:0] exy_thr, et_thr;
  logic quad_odd;
  logic [24:0] cmm_word;
  logic [11:0] ex, ey, et;
  logic sat;
  int checks = 0, failures = 0, n_ovf = 0, n_sat = 0, n_big = 0;

  jem_energy_sum dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (je[r, c]) je[r][c] = 0;
    exy_thr = 0; et_thr = 0; quad_odd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int e [8][4], rx, ry, rt, scale;
      bit [23:0] w;
      scale = 1 << ($urandom % 10);
      foreach (e[r, c]) e[r][c] = ($urandom % 3 == 0) ? 0 : $urandom % (scale + 1);
      if ($urandom % 25 == 0) e[$urandom % 8][$urandom % 4] = 1023;
      foreach (e[r, c]) if (e[r][c] > 1023) e[r][c] = 1023;
      @(negedge clk);
      exy_thr = 10'($urandom % 4); et_thr = 10'($urandom % 4); quad_odd = $urandom % 2;
      foreach (je[r, c]) je[r][c] = 10'(e[r][c]);
      w = esum_ref(e, int'(exy_thr), int'(et_thr), quad_odd, rx, ry, rt);
      @(posedge clk);
      #1;
      checks += 4;
      if (cmm_word !== {~(^w), w} || ex !== 12'(rx) || ey !== 12'(ry) || et !== 12'(rt)) begin
        failures++;
        if (failures < 6) $display("it %0d got %h %0d %0d %0d want %h %0d %0d %0d", it,
          cmm_word[23:0], ex, ey, et, w, rx, ry, rt);
      end
      if (rt == 4095) n_ovf++;
      if (w == 24'hFFFFFF) n_sat++;
      if (rt > 1000 && rt < 4095) n_big++;
    end
    if (n_ovf < 20 || n_sat < 20 || n_big < 20) failures++;
    $display("overflows %0d, saturated %0d, large sums %0d", n_ovf, n_sat, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
