// jem: Jet/Energy Module.
//
// Receives the 11 x 7 (phi x eta) environment of EM and hadronic 0.2x0.2
// sums as link words (index [r][c]: phi row r, eta column c), forms jet
// elements in 77 input channels, runs the jet algorithm on the whole
// environment and the energy sums on the 8 x 4 core (rows 1..8, columns
// 1..4). Results go to the two CMMs of the crate as 25-bit words: jet
// multiplicities to the jet CMM, quad-linear energy sums to the energy
// CMM. The sharing of elements with neighbouring modules over the
// backplane happens outside this module.
//
// Timing: both result words leave 2 clocks after the link words.
//
// The energy-sum saturation flag (esat) stays inside: saturation already
// reaches the Common Merger Module as the 0xFF code.
module jem
  import l1calo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  jet_word_t             em_link  [11][7],
  input  jet_word_t             had_link [11][7],
  input  jet_thr_t              jet_thr [N_JET_SETS],
  input  logic [JE_W-1:0]       exy_thr,
  input  logic [JE_W-1:0]       et_thr,
  input  logic                  quad_odd,
  output logic [24:0]           jet_word,
  output logic [24:0]           energy_word,
  output logic [7:0]            roi_found,
  output logic [1:0]            roi_pos  [8],
  output logic [N_JET_SETS-1:0] roi_hits [8],
  output logic [ESUM_W-1:0]     ex, ey, et,
  output logic                  par_err
);
  logic [JE_W-1:0] je [11][7];
  logic [JE_W-1:0] core [8][4];
  logic [76:0]     perr;
  logic            esat;

  for (genvar r = 0; r < 11; r++) begin : g_r
    for (genvar c = 0; c < 7; c++) begin : g_c
      jem_input u_in (.clk, .rst_n, .em(em_link[r][c]), .had(had_link[r][c]),
                      .je(je[r][c]), .par_err(perr[r*7+c]));
    end
  end

  assign par_err = |perr;

  for (genvar r = 0; r < 8; r++) begin : g_cr
    for (genvar c = 0; c < 4; c++) begin : g_cc
      assign core[r][c] = je[r+1][c+1];
    end
  end

  jet_processor u_jet (.clk, .rst_n, .je, .thr(jet_thr), .cmm_word(jet_word),
                       .roi_found, .roi_pos, .roi_hits);

  jem_energy_sum u_sum (.clk, .rst_n, .je(core), .exy_thr, .et_thr, .quad_odd,
                        .cmm_word(energy_word), .ex, .ey, .et, .sat(esat));

endmodule
