// tb_cmm_hit_sum: random module and remote-crate hit words, with sparse
// and dense hit patterns (so that the 3-bit counts saturate) and some
// words with bad parity; crate and system words are compared with sums
// computed here. Inputs are held for three clocks per vector.
module tb_cmm_hit_sum;
  logic clk = 0, rst_n = 0;
  logic [24:0] mod_word [16], remote_word [3];
  logic [24:0] crate_word, ctp_word;
  logic par_err;
  int checks = 0, failures = 0, n_sat = 0, n_perr = 0;

  cmm_hit_sum dut (.*);
  always #5 clk = ~clk;

  function automatic logic [24:0] mk(input bit [23:0] m, input bit bad);
    return {~(^m) ^ bad, m};
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (mod_word[i]) mod_word[i] = 25'h1000000;
    foreach (remote_word[i]) remote_word[i] = 25'h1000000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 1500; it++) begin
      int cs [8], ss [8], dens;
      bit perr;
      bit [23:0] wc, ws;
      perr = 0;
      dens = 1 + $urandom % 8;
      foreach (cs[s]) cs[s] = 0;
      @(negedge clk);
      for (int m = 0; m < 16; m++) begin
        bit [23:0] v;
        bit bad;
        foreach (cs[s]) v[3*s +: 3] = ($urandom % 8 < dens) ? 3'($urandom % 3) : 3'd0;
        bad = ($urandom % 60 == 0);
        mod_word[m] = mk(v, bad);
        if (bad) perr = 1;
        else foreach (cs[s]) cs[s] += v[3*s +: 3];
      end
      foreach (cs[s]) begin
        if (cs[s] > 7) cs[s] = 7;
        ss[s] = cs[s];
      end
      for (int c = 0; c < 3; c++) begin
        bit [23:0] v;
        bit bad;
        foreach (ss[s]) v[3*s +: 3] = ($urandom % 8 < dens) ? 3'($urandom % 4) : 3'd0;
        bad = ($urandom % 60 == 0);
        remote_word[c] = mk(v, bad);
        if (bad) perr = 1;
        else foreach (ss[s]) ss[s] += v[3*s +: 3];
      end
      foreach (ss[s]) begin
        if (ss[s] > 7) ss[s] = 7;
        wc[3*s +: 3] = 3'(cs[s]);
        ws[3*s +: 3] = 3'(ss[s]);
        if (ss[s] == 7) n_sat++;
      end
      repeat (2) @(posedge clk);
      #1;
      checks += 3;
      if (crate_word !== {~(^wc), wc} || ctp_word !== {~(^ws), ws} || par_err !== perr) begin
        failures++;
        if (failures < 6) $display("it %0d crate %h/%h sys %h/%h perr %b/%b", it,
          crate_word[23:0], wc, ctp_word[23:0], ws, par_err, perr);
      end
      if (perr) n_perr++;
    end
    if (n_sat < 100 || n_perr < 50) failures++;
    $display("saturated counts %0d, vectors with parity errors %0d", n_sat, n_perr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
