// ppr_mcm: one PreProcessor multi-chip module, four trigger towers.
//
// Towers are numbered 0:(phi0,eta0) 1:(phi1,eta0) 2:(phi0,eta1)
// 3:(phi1,eta1). Each passes through its own ppr_channel. The four ET
// values are then
//  * paired in phi and sent on two BC-mux links to the Cluster Processor
//    (towers 0+1 on link 0, towers 2+3 on link 1);
//  * summed into a 0.2x0.2 value for the Jet/Energy Processor: 9 bits,
//    set to 511 if the sum overflows or any tower is saturated (255).
// All link words carry odd parity.
//
// Timing: the link words of a crossing are valid one clock after the
// channel ET values, i.e. cfg.sync_delay + 7 clocks after its ADC sample.
//
// The channels' saturated-pulse and external BCID decisions (sat_b,
// ext_b) are not used here: the channel already folds them into its ET.
module ppr_mcm
  import l1calo_pkg::*;
#(
  parameter int PB_DEPTH = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  ppr_cfg_t                    cfg [4],
  input  logic [ADC_W-1:0]            adc [4],
  input  logic [3:0]                  disc,
  input  logic [3:0]                  lut_wr,
  input  logic [ADC_W-1:0]            lut_waddr,
  input  logic [TT_W-1:0]             lut_wdata,
  input  logic [3:0]                  pb_wr,
  input  logic [$clog2(PB_DEPTH)-1:0] pb_waddr,
  input  logic [ADC_W-1:0]            pb_wdata,
  input  logic                        rate_clear,
  output bcmux_word_t                 cp_link [2],
  output jet_word_t                   jet_link,
  output logic [TT_W-1:0]             et [4],          // for readout
  output logic [ADC_W-1:0]            adc_aligned [4], // for readout
  output logic [15:0]                 rate_count [4]
);
  logic [3:0]        sat_b, ext_b;
  logic [TT_W+1:0]   sum4;
  logic [SUM2_W-1:0] jet_et;

  for (genvar i = 0; i < 4; i++) begin : g_ch
    ppr_channel #(.PB_DEPTH(PB_DEPTH), .RATE_W(16)) u_ch (
      .clk, .rst_n, .cfg(cfg[i]), .adc(adc[i]), .disc(disc[i]),
      .lut_wr(lut_wr[i]), .lut_waddr, .lut_wdata,
      .pb_wr(pb_wr[i]), .pb_waddr, .pb_wdata, .rate_clear,
      .et(et[i]), .adc_aligned(adc_aligned[i]), .sat_bcid(sat_b[i]),
      .ext_bcid(ext_b[i]), .rate_count(rate_count[i]));
  end

  ppr_bcmux_enc u_mux0 (.clk, .rst_n, .tower_a(et[0]), .tower_b(et[1]), .word(cp_link[0]));
  ppr_bcmux_enc u_mux1 (.clk, .rst_n, .tower_a(et[2]), .tower_b(et[3]), .word(cp_link[1]));

  always_comb begin
    sum4 = {2'b0, et[0]} + {2'b0, et[1]} + {2'b0, et[2]} + {2'b0, et[3]};
    if (sum4 > (TT_W+2)'(SUM2_MAX) || et[0] == TT_MAX || et[1] == TT_MAX ||
        et[2] == TT_MAX || et[3] == TT_MAX)
      jet_et = SUM2_MAX;
    else
      jet_et = sum4[SUM2_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) jet_link <= '{parity: 1'b1, et: '0};
    else        jet_link <= '{parity: odd_par(64'(jet_et)), et: jet_et};

endmodule
