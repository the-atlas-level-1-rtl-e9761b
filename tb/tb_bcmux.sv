// tb_bcmux: BC-mux encoder and decoder back to back. Random tower pairs
// that obey the peak-finder rule (a non-zero value is followed by zero)
// must come out of the decoder unchanged, three clocks after they are
// presented (encoder register, decoder hold, decoder output). The test
// counts second words of both kinds (same crossing / following crossing)
// and finally corrupts one word to check the parity detection.
module tb_bcmux;
  import l1calo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] a, b, oa, ob;
  bcmux_word_t w, wx;
  logic perr, corrupt;
  int checks = 0, failures = 0, n_same = 0, n_next = 0, n_bfirst = 0;
  logic [7:0] ha [8], hb [8];

  ppr_bcmux_enc enc (.clk, .rst_n, .tower_a(a), .tower_b(b), .word(w));
  assign wx = corrupt ? (w ^ 10'h001) : w;
  cp_bcmux_dec dec (.clk, .rst_n, .word(wx), .tower_a(oa), .tower_b(ob), .par_err(perr));
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pa, pb;
    a = 0; b = 0; pa = 0; pb = 0; corrupt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t >= 4) begin
        checks += 2;
        if (oa !== ha[(t - 3) % 8] || ob !== hb[(t - 3) % 8]) begin
          failures++;
          if (failures < 6) $display("t=%0d got %0d,%0d want %0d,%0d", t, oa, ob,
                                     ha[(t-3)%8], hb[(t-3)%8]);
        end
      end
      if (t > 2 && dut_second()) begin
        if (w.flag) n_next++; else n_same++;
      end
      pa = (pa == 0 && $urandom % 3 == 0) ? 8'(1 + $urandom % 255) : 8'd0;
      pb = (pb == 0 && $urandom % 3 == 0) ? 8'(1 + $urandom % 255) : 8'd0;
      if (t > 2900) begin pa = 0; pb = 0; end
      a = pa; b = pb;
      if (a == 0 && b != 0 && !enc.second) n_bfirst++;
      ha[t % 8] = a; hb[t % 8] = b;
    end
    // parity error detection
    @(negedge clk);
    corrupt = 1;
    @(negedge clk);
    corrupt = 0;
    checks++;
    if (!perr) failures++;
    if (n_same < 10 || n_next < 10 || n_bfirst < 10) failures++;
    $display("second words: same crossing %0d, following crossing %0d; B first %0d",
             n_same, n_next, n_bfirst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the word now on the link is a second word when the decoder expects one
  function automatic bit dut_second();
    return dec.second;
  endfunction
endmodule
