// cpm: Cluster Processor Module.
//
// Covers 16 x 4 (phi x eta) algorithm windows. Its input is 280 towers
// (20 phi rows x 7 eta columns x EM/hadronic), arriving as 140 BC-mux
// links, each carrying a phi-pair of towers; link [p][c] holds tower rows
// 2p and 2p+1 of column c. Row 0, at the -phi end, is a by-product of the
// pairing and is not used, leaving the 19 x 7 towers that 16 x 4 windows
// need. Eight CP chips form a one-dimensional array in phi: chip k takes
// window rows 2k and 2k+1, i.e. tower rows 2k+1 .. 2k+5.
//
// Each chip reports one 16-bit hit word per half; the module counts, for
// each of the 16 threshold sets, the hits of the 16 half-chips, saturating
// at 7. Sets 0-7 go to the first Common Merger Module and sets 8-15 to the
// second, each as a 25-bit word: eight 3-bit counts (set 0 in bits 2:0)
// and odd parity in bit 24.
//
// The fan-in/fan-out of towers between neighbouring modules over the
// backplane is outside this module: the 280 towers arrive here already
// gathered.
//
// Timing: a crossing's hit counts leave 4 clocks after its first-slot link
// words (decode 2, since the pair's second tower may arrive one crossing
// later; chip 1; merge 1).
//
// The per-window hit words of each chip (wh) are left unread: the module
// reports RoIs per half-chip, which the chips already form.
module cpm
  import l1calo_pkg::*;
#(
  parameter int N_CHIPS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bcmux_word_t          em_link  [N_CHIPS+2][7],
  input  bcmux_word_t          had_link [N_CHIPS+2][7],
  input  cp_thr_t              thr [N_CP_SETS],
  output logic [24:0]          cmm_word [2],
  output logic [N_CP_SETS-1:0] roi_hits [N_CHIPS][2],
  output logic [N_CHIPS-1:0]   roi_sat,
  output logic                 par_err
);
  localparam int NROW = 2 * N_CHIPS + 4;

  logic [TT_W-1:0] em_t  [NROW][7];
  logic [TT_W-1:0] had_t [NROW][7];
  logic [2*(N_CHIPS+2)*7-1:0] perr;

  for (genvar p = 0; p < N_CHIPS + 2; p++) begin : g_pair
    for (genvar c = 0; c < 7; c++) begin : g_col
      cp_bcmux_dec u_dem (.clk, .rst_n, .word(em_link[p][c]),
        .tower_a(em_t[2*p][c]), .tower_b(em_t[2*p+1][c]), .par_err(perr[2*(p*7+c)]));
      cp_bcmux_dec u_deh (.clk, .rst_n, .word(had_link[p][c]),
        .tower_a(had_t[2*p][c]), .tower_b(had_t[2*p+1][c]), .par_err(perr[2*(p*7+c)+1]));
    end
  end

  assign par_err = |perr;

  for (genvar k = 0; k < N_CHIPS; k++) begin : g_chip
    logic [TT_W-1:0]      em_w  [5][7];
    logic [TT_W-1:0]      had_w [5][7];
    logic [N_CP_SETS-1:0] wh [2][4];
    for (genvar r = 0; r < 5; r++) begin : g_r
      assign em_w[r]  = em_t[2*k+1+r];
      assign had_w[r] = had_t[2*k+1+r];
    end
    cp_chip #(.ROWS(2), .COLS(4)) u_chip (
      .clk, .rst_n, .em(em_w), .had(had_w), .thr,
      .win_hits(wh), .half_hits(roi_hits[k]), .saturated(roi_sat[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmm_word[0] <= 25'h1000000;
      cmm_word[1] <= 25'h1000000;
    end else begin
      for (int w = 0; w < 2; w++) begin
        logic [23:0] m;
        for (int s = 0; s < 8; s++) begin
          logic [MULT_W-1:0] cnt;
          cnt = '0;
          for (int k = 0; k < N_CHIPS; k++)
            for (int h = 0; h < 2; h++)
              cnt = mult_add(cnt, MULT_W'(roi_hits[k][h][8*w+s]));
          m[3*s +: 3] = cnt;
        end
        cmm_word[w] <= {odd_par(64'(m)), m};
      end
    end
  end

endmodule
