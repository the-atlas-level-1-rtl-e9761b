// tb_ppr_lut: loads a full random table, then reads random addresses and
// checks each result one clock later against a copy kept by the test.
module tb_ppr_lut;
  logic clk = 0, rst_n = 0;
  logic [9:0] addr, wr_addr;
  logic [7:0] et, wr_data;
  logic wr_en;
  int checks = 0, failures = 0;
  logic [7:0] model [1024];

  ppr_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; wr_en = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = 8'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 500; i++) begin
      logic [9:0] a;
      a = 10'($urandom);
      addr = a;
      @(negedge clk);
      checks++;
      if (et !== model[a]) begin
        failures++;
        if (failures < 5) $display("addr %0d got %0d want %0d", a, et, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
