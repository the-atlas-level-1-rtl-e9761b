// tb_cmm_jet_et: random multiplicities, weights and thresholds; ETJ and its
// four threshold bits are compared with the weighted sum computed here.
module tb_cmm_jet_et;
  logic clk = 0, rst_n = 0;
  logic [23:0] mult;
  logic [9:0] weight [8];
  logic [15:0] thr [4];
  logic [15:0] etj;
  logic [3:0] etj_hits;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  cmm_jet_et dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mult = '0;
    foreach (weight[i]) weight[i] = '0;
    foreach (thr[k]) thr[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int sum;
      bit [3:0] h;
      @(negedge clk);
      if (it % 50 == 0) begin
        foreach (weight[i]) weight[i] = 10'($urandom % 1024);
        foreach (thr[k]) thr[k] = 16'($urandom % 20000);
      end
      mult = $urandom;
      sum = 0;
      for (int i = 0; i < 8; i++) sum += int'(mult[3*i +: 3]) * int'(weight[i]);
      foreach (h[k]) h[k] = sum > int'(thr[k]);
      repeat (2) @(posedge clk);
      #1;
      checks += 2;
      if (etj !== 16'(sum) || etj_hits !== h) begin
        failures++;
        if (failures < 6) $display("it %0d etj %0d/%0d hits %b/%b", it, etj, sum, etj_hits, h);
      end
      n_hit += $countones(h);
      n_miss += 4 - $countones(h);
    end
    if (n_hit < 500 || n_miss < 500) failures++;
    $display("threshold bits set %0d, clear %0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
