// ppr_lut: the PreProcessor look-up table of one trigger tower.
//
// The 10-bit BCID value addresses a 1024 x 8-bit table whose contents give
// the final ET (1 GeV per count). Loading suitable contents performs in one
// step pedestal subtraction, linear (or any) ET calibration, zeroing of
// noise-level values, forcing saturated values to 255 and killing dead
// channels. The table is loaded through a simple synchronous write port
// (standing in for the VME access, whose protocol is not specified).
//
// Timing: `et` is registered, one clock after `addr`.
module ppr_lut
  import l1calo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADC_W-1:0]  addr,
  output logic [TT_W-1:0]   et,
  input  logic              wr_en,
  input  logic [ADC_W-1:0]  wr_addr,
  input  logic [TT_W-1:0]   wr_data
);
  logic [TT_W-1:0] mem [1 << ADC_W];

  always_ff @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) et <= '0;
    else        et <= mem[addr];

endmodule
