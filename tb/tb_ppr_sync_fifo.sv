// tb_ppr_sync_fifo: checks that every programmable delay gives exactly
// delay+1 clocks between input and output, with random data.
module tb_ppr_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic [3:0] delay;
  logic [9:0] din, dout;
  int checks = 0, failures = 0;
  logic [9:0] hist [64];

  ppr_sync_fifo #(.W(10), .DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    delay = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 16; d++) begin
      delay = 4'(d);
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        if (t > d + 20) begin
          checks++;
          if (dout !== hist[(t - d - 1) % 64]) begin
            failures++;
            if (failures < 5) $display("delay %0d t %0d: got %h want %h", d, t, dout, hist[(t-d-1)%64]);
          end
        end
        din = 10'($urandom);
        hist[t % 64] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
