// ppr_sync_fifo: coarse timing alignment of one trigger tower.
//
// The re-timed FADC samples of every tower pass through a pipeline whose
// length is programmable in whole bunch crossings (25 ns), so that the
// data of one bunch crossing from all towers line up in time. It is a
// circular buffer: each cycle the new sample is written and the sample
// written `delay` cycles earlier is read.
//
// Interface: one sample per clock in `din`; `dout` is `din` delayed by
// delay+1 clock cycles (the +1 is the output register). `delay` ranges
// 0..DEPTH-1. The document says only "a wide range"; DEPTH = 16 is this
// design's choice.
module ppr_sync_fifo #(
  parameter int W     = 10,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] delay,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW-1:0] rptr;

  assign rptr = wptr - delay;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      dout <= '0;
    end else begin
      wptr <= wptr + 1'b1;
      dout <= (delay == '0) ? din : mem[rptr];
    end
  end

  always_ff @(posedge clk) mem[wptr] <= din;

endmodule
