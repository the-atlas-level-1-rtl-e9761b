// tb_ppr_bcid: drives a stream of unsaturated pulses, saturated pulses
// with slow and fast leading edges, and noise, then compares the FIR peak
// flags and values, the saturated-pulse flags and the external flags with
// the reference model, crossing by crossing, at the 4-clock latency.
module tb_ppr_bcid;
  import l1calo_pkg::*;
  import l1calo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] sample;
  logic disc;
  logic [3:0] coef [5];
  logic [2:0] drop;
  logic [9:0] sat_low, sat_high;
  logic [3:0] ext_delay;
  logic [9:0] fir_peak_val;
  logic fir_peak, sat_peak, ext_peak;
  int checks = 0, failures = 0, n_fir = 0, n_sat = 0, n_ext = 0;
  sarr_t s;
  int c [5] = '{1, 5, 11, 7, 2};
  bit dr [NS];

  ppr_bcid dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(int t0, int amp);
    int shp [5] = '{15, 70, 100, 55, 20};
    for (int k = 0; k < 5; k++) begin
      int v;
      v = s[t0 + k] + amp * shp[k] / 100;
      s[t0 + k] = v > 1023 ? 1023 : v;
    end
  endtask

  initial begin
    foreach (s[i]) s[i] = 32 + ($urandom % 3);
    foreach (dr[i]) dr[i] = 0;
    for (int t = 20; t < NS - 20; t += 12 + $urandom % 6) begin
      int kind;
      kind = $urandom % 4;
      if (kind == 3) pulse(t, 2000 + $urandom % 3000);   // saturated
      else           pulse(t, 20 + $urandom % 900);
      dr[t + 1] = 1; dr[t + 2] = 1;                          // discriminator
    end
    for (int k = 0; k < 5; k++) coef[k] = 4'(c[k]);
    drop = 3'd3; sat_low = 10'd150; sat_high = 10'd600; ext_delay = 4'd4;
    sample = 0; disc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NS; i++) begin
      @(negedge clk);
      // outputs now reflect crossing i - 5 (valid after edge n + 4)
      if (i >= 12) begin
        int n;
        bit ef, es, ee;
        int ev;
        n = i - 5;
        ef = ref_fir_peak(s, n, c);
        ev = ef ? fir10(s, n, c, 3) : 0;
        es = ref_sat_peak(s, n, 150, 600);
        ee = (n + 3 - 4 >= 0) && dr[n + 3 - 4] && !(n + 2 - 4 >= 0 && dr[n + 2 - 4]);
        checks += 4;
        if (fir_peak !== ef || fir_peak_val !== 10'(ev) || sat_peak !== es || ext_peak !== ee) begin
          failures++;
          if (failures < 8) $display("n=%0d fir %b/%b val %0d/%0d sat %b/%b ext %b/%b", n,
            fir_peak, ef, fir_peak_val, ev, sat_peak, es, ext_peak, ee);
        end
        n_fir += int'(ef); n_sat += int'(es); n_ext += int'(ee);
      end
      sample = 10'(s[i]);
      disc = dr[i];
    end
    if (n_fir < 5 || n_sat < 2 || n_ext < 5) failures++;
    $display("fir peaks %0d, saturated %0d, external %0d", n_fir, n_sat, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
