// tb_jem_input: random EM and hadronic 0.2x0.2 words, including full-scale
// (511) values and corrupted parity; the jet element must be the sum, 1023
// when either input is at full scale, and bad-parity inputs count as zero.
module tb_jem_input;
  import l1calo_pkg::*;
  logic clk = 0, rst_n = 0;
  jet_word_t em, had;
  logic [9:0] je;
  logic par_err;
  int checks = 0, failures = 0, n_sat = 0, n_perr = 0;

  jem_input dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    em = '{parity: 1'b1, et: '0}; had = '{parity: 1'b1, et: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int a, b, w;
      bit ba, bb;
      a = ($urandom % 8 == 0) ? 511 : $urandom % 511;
      b = ($urandom % 8 == 0) ? 511 : $urandom % 511;
      ba = ($urandom % 16 == 0);
      bb = ($urandom % 16 == 0);
      @(negedge clk);
      em  = '{parity: (~^9'(a)) ^ ba, et: 9'(a)};
      had = '{parity: (~^9'(b)) ^ bb, et: 9'(b)};
      if (ba) a = 0;
      if (bb) b = 0;
      w = (a == 511 || b == 511) ? 1023 : a + b;
      @(posedge clk);
      #1;
      checks += 2;
      if (je !== 10'(w) || par_err !== (ba || bb)) begin
        failures++;
        if (failures < 5) $display("got %0d/%b want %0d/%b", je, par_err, w, ba || bb);
      end
      if (w == 1023) n_sat++;
      if (ba || bb) n_perr++;
    end
    if (n_sat < 50 || n_perr < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
