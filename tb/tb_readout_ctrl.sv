// tb_readout_ctrl: every crossing writes a distinct random word; Level-1
// Accepts arrive at random, sometimes in bursts closer than one event's
// readout time, while the output is drained with a random ready pattern.
// Every word leaving the stream is compared with the header (BCN) and the
// slices expected around the crossing of interest, parity included.
// The number of slices and the offset change between runs. A final phase
// blocks the output to show that the FIFO overflow flag is raised.
module tb_readout_ctrl;
  logic clk = 0, rst_n = 0;
  logic [23:0] din;
  logic l1a;
  logic [11:0] bcn;
  logic [7:0] offset;
  logic [2:0] nslices;
  logic out_valid, out_ready, out_hdr, out_par, overflow;
  logic [23:0] out_data;
  int checks = 0, failures = 0, n_events = 0, n_words = 0, n_burst = 0;
  int cyc = 0;
  logic [23:0] hist [int];
  bit [24:0] expq [$];

  readout_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: compare every word taken from the stream
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    bit [24:0] w;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected word %b %h", out_hdr, out_data);
    end else begin
      w = expq.pop_front();
      if ({out_hdr, out_data} !== w || out_par !== ~(^w)) begin
        failures++;
        if (failures < 6) $display("cyc %0d got %b %h want %b %h", cyc, out_hdr, out_data, w[24], w[23:0]);
      end
    end
    n_words++;
  end

  task automatic step(input bit acc);
    @(negedge clk);
    din = $urandom;
    bcn = 12'(cyc + 100);
    hist[cyc] = din;
    l1a = acc;
    out_ready = ($urandom % 4 != 0);
    if (acc) begin
      expq.push_back({1'b1, 12'd0, bcn});
      for (int j = 0; j < nslices; j++)
        expq.push_back({1'b0, hist[cyc - offset - nslices / 2 + j]});
      n_events++;
    end
    @(posedge clk);
    cyc++;
  endtask

  initial begin
    din = 0; l1a = 0; bcn = 0; offset = 5; nslices = 5; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      offset = 8'(1 + 7 * run + $urandom % 5);
      nslices = 3'(run == 0 ? 1 : run == 1 ? 5 : 1 + $urandom % 7);
      for (int i = 0; i < 300; i++) step(0);
      for (int e = 0; e < 60; e++) begin
        if ($urandom % 4 == 0) begin
          step(1); step(1); step(0); step(1);   // three accepts within four crossings
          n_burst++;
        end else step(1);
        repeat (10 + 4 * nslices + $urandom % 20) step(0);
      end
      repeat (200) step(0);
      checks++;
      if (expq.size() != 0 || overflow) begin
        failures++;
        $display("run %0d: %0d words missing, overflow %b", run, expq.size(), overflow);
      end
    end
    // overflow: stop reading and keep accepting
    nslices = 7;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      l1a = (i % 10 == 0); out_ready = 0;
      @(posedge clk);
    end
    checks++;
    if (!overflow) failures++;
    if (n_events < 300 || n_burst < 30) failures++;
    $display("events %0d (bursts %0d), words %0d, overflow %b", n_events, n_burst, n_words, overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
