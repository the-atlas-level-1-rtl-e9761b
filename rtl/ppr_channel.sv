// ppr_channel: the digital processing of one trigger tower in the
// PreProcessor ASIC.
//
// Path: ADC sample (or playback memory) -> coarse-timing pipeline ->
// bunch-crossing identification -> look-up table. The output ET is
//   255                 on the crossing found by the saturated-pulse method,
//   LUT(FIR value)      on a FIR peak,
//   0                   on every other crossing.
// A rate counter counts the crossings whose output ET is above a
// programmable threshold, giving tower rate histograms free of trigger
// bias. The playback memory lets test samples replace the ADC input.
//
// Sizes chosen in this design where the document gives none: playback
// memory 256 x 10 bits, rate counter 16 bits saturating.
//
// Timing: `et` belongs to the crossing whose sample entered
// cfg.sync_delay + 6 clocks earlier (1 + delay in the timing pipeline,
// 4 in BCID, 1 in the LUT). `adc_aligned` is the time-aligned sample,
// cfg.sync_delay + 1 clocks after the input, for readout.
module ppr_channel
  import l1calo_pkg::*;
#(
  parameter int PB_DEPTH = 256,
  parameter int RATE_W   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  ppr_cfg_t                    cfg,
  input  logic [ADC_W-1:0]            adc,
  input  logic                        disc,
  // look-up table load port
  input  logic                        lut_wr,
  input  logic [ADC_W-1:0]            lut_waddr,
  input  logic [TT_W-1:0]             lut_wdata,
  // playback memory load port
  input  logic                        pb_wr,
  input  logic [$clog2(PB_DEPTH)-1:0] pb_waddr,
  input  logic [ADC_W-1:0]            pb_wdata,
  input  logic                        rate_clear,
  output logic [TT_W-1:0]             et,
  output logic [ADC_W-1:0]            adc_aligned,
  output logic                        sat_bcid,
  output logic                        ext_bcid,
  output logic [RATE_W-1:0]           rate_count
);
  logic [ADC_W-1:0]            pb_mem [PB_DEPTH];
  logic [$clog2(PB_DEPTH)-1:0] pb_ptr;
  logic [ADC_W-1:0]            sample;
  logic [ADC_W-1:0]            fir_val;
  logic                        fir_pk, sat_pk, ext_pk;
  logic                        fir_pk_d, sat_pk_d;
  logic [TT_W-1:0]             lut_et;
  logic [3:0]                  coefs [5];

  always_ff @(posedge clk) if (pb_wr) pb_mem[pb_waddr] <= pb_wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)            pb_ptr <= '0;
    else if (!cfg.playback) pb_ptr <= '0;
    else                   pb_ptr <= pb_ptr + 1'b1;

  assign sample = cfg.playback ? pb_mem[pb_ptr] : adc;

  ppr_sync_fifo #(.W(ADC_W), .DEPTH(16)) u_sync (
    .clk, .rst_n, .delay(cfg.sync_delay), .din(sample), .dout(adc_aligned));

  assign coefs = '{cfg.coef0, cfg.coef1, cfg.coef2, cfg.coef3, cfg.coef4};

  ppr_bcid u_bcid (
    .clk, .rst_n, .sample(adc_aligned), .disc, .coef(coefs), .drop(cfg.drop),
    .sat_low(cfg.sat_low), .sat_high(cfg.sat_high), .ext_delay(cfg.ext_delay),
    .fir_peak_val(fir_val), .fir_peak(fir_pk), .sat_peak(sat_pk), .ext_peak(ext_pk));

  ppr_lut u_lut (
    .clk, .rst_n, .addr(fir_val), .et(lut_et),
    .wr_en(lut_wr), .wr_addr(lut_waddr), .wr_data(lut_wdata));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fir_pk_d <= 1'b0;
      sat_pk_d <= 1'b0;
      ext_bcid <= 1'b0;
    end else begin
      fir_pk_d <= fir_pk;
      sat_pk_d <= sat_pk;
      ext_bcid <= ext_pk;
    end

  assign et       = sat_pk_d ? TT_MAX : (fir_pk_d ? lut_et : '0);
  assign sat_bcid = sat_pk_d;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                                     rate_count <= '0;
    else if (rate_clear)                            rate_count <= '0;
    else if (et > cfg.rate_thr && rate_count != '1) rate_count <= rate_count + 1'b1;

endmodule
