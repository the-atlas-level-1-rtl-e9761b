// l1calo_top: one slice of the Level-1 Calorimeter Trigger, from digitised
// trigger-tower samples to the results for the Central Trigger Processor
// and the readout fragment.
//
// Geometry: a grid of 22 x 14 (phi x eta) trigger towers in each of the EM
// and hadronic layers, which is exactly the 11 x 7 jet-element environment
// of one Jet/Energy Module; its first 20 x 7 towers form the input of one
// Cluster Processor Module. Index [r][c] is phi row r, eta column c.
//  * PreProcessor: 2 x 77 multi-chip modules, each covering 2 x 2 towers
//    (rows 2p, 2p+1, columns 2m, 2m+1) of one layer. Their BC-mux links
//    feed the CPM, their 0.2x0.2 sums feed the JEM.
//  * Cluster Processor: one CPM; its two result words go to the two CP
//    Common Merger Modules (sets 0-7 and 8-15), both configured as system
//    CMMs. The other 13 CPM slots of the crate and the 3 other CP crates
//    arrive as ports.
//  * Jet/Energy Processor: one JEM in slot 0 of a 16-slot crate; jet CMM
//    and energy CMM as system CMMs, the other 15 slots and the other JEP
//    crate as ports. The jet CMM also forms the total-jet-ET estimate.
//  * Readout: four readout controllers capture the CTP results (CP e/gamma
//    counts, CP second-group counts, jet counts, and the 16 ET/missing-
//    ET/jet-ET bits) and feed inputs 0..3 of one Readout Driver; its other
//    14 inputs are ports for further modules.
// Settings are shared per layer (one channel setting for all EM towers,
// one for all hadronic towers); the look-up-table and playback write ports
// broadcast to every channel of a layer. Analogue parts (receivers, ADCs,
// fine-delay chips), the link serialisers and the timing-system receiver
// are outside: samples, discriminator bits and the TTC signals are ports.
//
// Latency in clocks from an ADC sample (sync_delay = d): tower ET d+6,
// first BC-mux slot and jet link word d+7; CPM towers decoded d+9 (the
// second tower of a pair may arrive one crossing after the first), CPM
// result d+11, CP multiplicities to the CTP d+13; JEM results d+9, jet
// multiplicities d+11, ET and missing-ET bits d+12, jet-ET value d+12 and
// its threshold bits d+13.
//
// Unconnected on purpose: each MCM's per-tower ET and aligned-ADC outputs
// (et4, al4; used only for monitoring, as the rate counters are brought
// out) and the JEM's linear Ex/Ey/ET (jem_ex, jem_ey, jem_et; the crate
// sums travel in quad-linear code, as in the system). The reset feeds
// both the flip-flops and the assertions' disable condition, which the
// lint reports as a net used both synchronously and asynchronously.
module l1calo_top
  import l1calo_pkg::*;
#(
  parameter int N_ROD_IN = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // PreProcessor inputs and settings
  input  logic [ADC_W-1:0]      adc_em  [22][14],
  input  logic [ADC_W-1:0]      adc_had [22][14],
  input  logic                  disc_em  [22][14],
  input  logic                  disc_had [22][14],
  input  ppr_cfg_t              cfg_em,
  input  ppr_cfg_t              cfg_had,
  input  logic                  lut_wr_em,
  input  logic                  lut_wr_had,
  input  logic [ADC_W-1:0]      lut_waddr,
  input  logic [TT_W-1:0]       lut_wdata,
  input  logic                  pb_wr_em,
  input  logic                  pb_wr_had,
  input  logic [7:0]            pb_waddr,
  input  logic [ADC_W-1:0]      pb_wdata,
  input  logic                  rate_clear,
  output logic [15:0]           rate_em  [22][14],
  output logic [15:0]           rate_had [22][14],
  // Cluster Processor settings and the rest of the CP system
  input  cp_thr_t               cp_thr [N_CP_SETS],
  input  logic [24:0]           cpm_other   [13][2],  // other CPM slots of the crate
  input  logic [24:0]           cp_remote   [3][2],   // other CP crates, both CMM groups
  // Jet/Energy Processor settings and the rest of the JEP system
  input  jet_thr_t              jet_thr [N_JET_SETS],
  input  logic [JE_W-1:0]       exy_thr,
  input  logic [JE_W-1:0]       et_thr,
  input  logic                  quad_odd,
  input  logic                  flip_ex,
  input  logic                  flip_ey,
  input  logic [24:0]           jem_other_jet    [15],
  input  logic [24:0]           jem_other_energy [15],
  input  logic [24:0]           jet_remote,
  input  crate_esum_t           energy_remote,
  input  logic [8:0]            sum_et_thr [4],
  input  logic                  met_lut_wr,
  input  logic [13:0]           met_lut_waddr,
  input  logic [7:0]            met_lut_wdata,
  input  logic [9:0]            etj_weight [N_JET_SETS],
  input  logic [15:0]           etj_thr [4],
  // results to the Central Trigger Processor
  output logic [24:0]           ctp_cp_em,
  output logic [24:0]           ctp_cp_tau,
  output logic [24:0]           ctp_jet,
  output logic [3:0]            ctp_etj,
  output logic [7:0]            ctp_met,
  output logic [3:0]            ctp_et,
  output logic [15:0]           jet_et_sum,    // ETJ value behind ctp_etj
  // crate results on cables (for a crate that is not the system crate)
  output logic [24:0]           cp_crate_word [2],
  output logic [24:0]           jet_crate_word,
  output crate_esum_t           energy_crate_sum,
  // Region-of-Interest data
  output logic [N_CP_SETS-1:0]  cp_roi_hits [8][2],
  output logic [7:0]            cp_roi_sat,
  output logic [7:0]            jet_roi_found,
  output logic [1:0]            jet_roi_pos  [8],
  output logic [N_JET_SETS-1:0] jet_roi_hits [8],
  output crate_esum_t           energy_roi,
  output logic                  link_par_err,
  // timing system
  input  logic                  l1a,
  input  logic [23:0]           l1id,
  input  logic [11:0]           bcn,
  input  logic [7:0]            ttype,
  // readout
  input  logic [7:0]            ro_offset,
  input  logic [2:0]            ro_nslices,
  input  logic [N_ROD_IN-1:0]   rod_enable,
  input  logic                  rod_zero_sup,
  input  logic [8:0]            rod_busy_thr,
  input  logic [N_ROD_IN-5:0]   rod_ext_valid,
  output logic [N_ROD_IN-5:0]   rod_ext_ready,
  input  logic [N_ROD_IN-5:0]   rod_ext_hdr,
  input  logic [23:0]           rod_ext_data [N_ROD_IN-4],
  input  logic [N_ROD_IN-5:0]   rod_ext_par,
  output logic                  slink_valid,
  input  logic                  slink_ready,
  output logic [31:0]           slink_data,
  output logic                  rod_busy,
  output logic                  ro_overflow    // a readout or L1A FIFO overflowed
);
  // ---------------- PreProcessor ----------------
  bcmux_word_t em_mux  [11][14];   // [phi pair][eta]
  bcmux_word_t had_mux [11][14];
  jet_word_t   em_jet  [11][7];
  jet_word_t   had_jet [11][7];

  for (genvar p = 0; p < 11; p++) begin : g_pp
    for (genvar m = 0; m < 7; m++) begin : g_pm
      for (genvar l = 0; l < 2; l++) begin : g_layer
        ppr_cfg_t          cfg4 [4];
        logic [ADC_W-1:0]  adc4 [4];
        logic [3:0]        disc4;
        bcmux_word_t       links [2];
        jet_word_t         jw;
        logic [TT_W-1:0]   et4 [4];
        logic [ADC_W-1:0]  al4 [4];
        logic [15:0]       rc4 [4];
        for (genvar t = 0; t < 4; t++) begin : g_t
          localparam int R = 2 * p + (t % 2);
          localparam int C = 2 * m + (t / 2);
          assign cfg4[t]  = (l == 0) ? cfg_em : cfg_had;
          assign adc4[t]  = (l == 0) ? adc_em[R][C] : adc_had[R][C];
          assign disc4[t] = (l == 0) ? disc_em[R][C] : disc_had[R][C];
          if (l == 0) begin : g_re
            assign rate_em[R][C] = rc4[t];
          end else begin : g_rh
            assign rate_had[R][C] = rc4[t];
          end
        end
        ppr_mcm #(.PB_DEPTH(256)) u_mcm (
          .clk, .rst_n, .cfg(cfg4), .adc(adc4), .disc(disc4),
          .lut_wr({4{(l == 0) ? lut_wr_em : lut_wr_had}}), .lut_waddr, .lut_wdata,
          .pb_wr({4{(l == 0) ? pb_wr_em : pb_wr_had}}), .pb_waddr, .pb_wdata,
          .rate_clear, .cp_link(links), .jet_link(jw), .et(et4), .adc_aligned(al4),
          .rate_count(rc4));
        if (l == 0) begin : g_oe
          assign em_mux[p][2*m]   = links[0];
          assign em_mux[p][2*m+1] = links[1];
          assign em_jet[p][m]     = jw;
        end else begin : g_oh
          assign had_mux[p][2*m]   = links[0];
          assign had_mux[p][2*m+1] = links[1];
          assign had_jet[p][m]     = jw;
        end
      end
    end
  end

  // ---------------- Cluster Processor ----------------
  bcmux_word_t cpm_em  [10][7];
  bcmux_word_t cpm_had [10][7];
  logic [24:0] cpm_word [2];
  logic        cpm_perr, jem_perr, cmm_perr0, cmm_perr1, cmm_perr2;

  for (genvar p = 0; p < 10; p++) begin : g_cpin
    for (genvar c = 0; c < 7; c++) begin : g_cpc
      assign cpm_em[p][c]  = em_mux[p][c];
      assign cpm_had[p][c] = had_mux[p][c];
    end
  end

  cpm #(.N_CHIPS(8)) u_cpm (
    .clk, .rst_n, .em_link(cpm_em), .had_link(cpm_had), .thr(cp_thr),
    .cmm_word(cpm_word), .roi_hits(cp_roi_hits), .roi_sat(cp_roi_sat), .par_err(cpm_perr));

  for (genvar g = 0; g < 2; g++) begin : g_cpcmm
    logic [24:0] mods [14];
    logic [24:0] rem  [3];
    assign mods[0] = cpm_word[g];
    for (genvar s = 1; s < 14; s++) begin : g_s
      assign mods[s] = cpm_other[s-1][g];
    end
    for (genvar c = 0; c < 3; c++) begin : g_c
      assign rem[c] = cp_remote[c][g];
    end
    if (g == 0) begin : g_em
      cmm_hit_sum #(.N_MOD(14), .N_REMOTE(3)) u_cmm (
        .clk, .rst_n, .mod_word(mods), .remote_word(rem),
        .crate_word(cp_crate_word[g]), .ctp_word(ctp_cp_em), .par_err(cmm_perr0));
    end else begin : g_tau
      cmm_hit_sum #(.N_MOD(14), .N_REMOTE(3)) u_cmm (
        .clk, .rst_n, .mod_word(mods), .remote_word(rem),
        .crate_word(cp_crate_word[g]), .ctp_word(ctp_cp_tau), .par_err(cmm_perr1));
    end
  end

  // ---------------- Jet/Energy Processor ----------------
  logic [24:0]       jem_jet_word, jem_energy_word;
  logic [ESUM_W-1:0] jem_ex, jem_ey, jem_et;
  logic [24:0]       jet_mods [16];
  logic [24:0]       energy_mods [16];
  logic [24:0]       jet_rem [1];

  jem u_jem (
    .clk, .rst_n, .em_link(em_jet), .had_link(had_jet), .jet_thr, .exy_thr, .et_thr,
    .quad_odd, .jet_word(jem_jet_word), .energy_word(jem_energy_word),
    .roi_found(jet_roi_found), .roi_pos(jet_roi_pos), .roi_hits(jet_roi_hits),
    .ex(jem_ex), .ey(jem_ey), .et(jem_et), .par_err(jem_perr));

  assign jet_mods[0]    = jem_jet_word;
  assign energy_mods[0] = jem_energy_word;
  for (genvar s = 1; s < 16; s++) begin : g_jslot
    assign jet_mods[s]    = jem_other_jet[s-1];
    assign energy_mods[s] = jem_other_energy[s-1];
  end
  assign jet_rem[0] = jet_remote;

  cmm_hit_sum #(.N_MOD(16), .N_REMOTE(1)) u_cmm_jet (
    .clk, .rst_n, .mod_word(jet_mods), .remote_word(jet_rem),
    .crate_word(jet_crate_word), .ctp_word(ctp_jet), .par_err(cmm_perr2));

  cmm_jet_et u_etj (
    .clk, .rst_n, .mult(ctp_jet[23:0]), .weight(etj_weight), .thr(etj_thr),
    .etj(jet_et_sum), .etj_hits(ctp_etj));

  cmm_energy #(.N_MOD(16)) u_cmm_energy (
    .clk, .rst_n, .mod_word(energy_mods), .flip_ex, .flip_ey, .remote_sum(energy_remote),
    .et_thr(sum_et_thr), .lut_wr(met_lut_wr), .lut_waddr(met_lut_waddr),
    .lut_wdata(met_lut_wdata), .crate_sum(energy_crate_sum), .system_sum(energy_roi),
    .et_hits(ctp_et), .met_hits(ctp_met));

  assign link_par_err = cpm_perr || jem_perr || cmm_perr0 || cmm_perr1 || cmm_perr2;

  // ---------------- Readout ----------------
  logic [23:0]         ro_din [4];
  logic [N_ROD_IN-1:0] r_valid, r_ready, r_hdr, r_par;
  logic [23:0]         r_data [N_ROD_IN];

  assign ro_din[0] = ctp_cp_em[23:0];
  assign ro_din[1] = ctp_cp_tau[23:0];
  assign ro_din[2] = ctp_jet[23:0];
  assign ro_din[3] = {8'd0, ctp_etj, ctp_et, ctp_met};

  logic [3:0] ro_ovf;
  logic       l1a_ovf;
  assign ro_overflow = |ro_ovf || l1a_ovf;

  for (genvar i = 0; i < 4; i++) begin : g_ro
    readout_ctrl #(.W(24), .DEPTH(256), .QDEPTH(4), .FIFO_DEPTH(64)) u_ro (
      .clk, .rst_n, .din(ro_din[i]), .l1a, .bcn, .offset(ro_offset), .nslices(ro_nslices),
      .out_valid(r_valid[i]), .out_ready(r_ready[i]), .out_hdr(r_hdr[i]),
      .out_data(r_data[i]), .out_par(r_par[i]), .overflow(ro_ovf[i]));
  end
  for (genvar i = 4; i < N_ROD_IN; i++) begin : g_ext
    assign r_valid[i] = rod_ext_valid[i-4];
    assign r_hdr[i]   = rod_ext_hdr[i-4];
    assign r_data[i]  = rod_ext_data[i-4];
    assign r_par[i]   = rod_ext_par[i-4];
    assign rod_ext_ready[i-4] = r_ready[i];
  end

  rod #(.N_IN(N_ROD_IN), .DW(24), .CH_DEPTH(256), .L1A_DEPTH(16)) u_rod (
    .clk, .rst_n, .in_valid(r_valid), .in_ready(r_ready), .in_hdr(r_hdr), .in_data(r_data),
    .in_par(r_par), .l1a, .l1id, .l1a_bcn(bcn), .ttype, .enable(rod_enable),
    .nslices(ro_nslices), .zero_sup(rod_zero_sup), .busy_thr(rod_busy_thr),
    .out_valid(slink_valid), .out_ready(slink_ready), .out_data(slink_data),
    .busy(rod_busy), .l1a_overflow(l1a_ovf));

endmodule
