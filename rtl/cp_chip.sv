// cp_chip: electron/photon and tau/hadron cluster algorithms on a block of
// overlapping 4x4 trigger-tower windows (one CP FPGA).
//
// For every window (its 2x2 centre is the "core"), with EM and hadronic
// tower ET of 8 bits:
//  * EM clusters: the four 1x2/2x1 EM pairs in the core (sum saturated at
//    255); e/gamma passes if the largest is greater than the cluster
//    threshold. tau/hadron uses each pair plus the 2x2 hadronic core.
//  * EM and hadronic isolation: the 12 towers around the core in each
//    layer, summed and saturated at 63, must be less than or equal to
//    their thresholds. For e/gamma only, the 2x2 hadronic core (saturated
//    at 63) must be less than or equal to the hadronic veto.
//    Threshold 255 (cluster) or 63 (isolation) switches a cut off.
//  * local maximum: the EM+hadronic 2x2 core sum R must be greater than
//    the overlapping neighbouring 2x2 sums at +eta and +phi (four of them)
//    and greater than or equal to those at -eta and -phi (four).
// A window reports a hit for a threshold set when it is a local maximum
// and passes that set. Sets 0-7 are e/gamma; sets 8-15 are e/gamma or tau
// as selected by their is_tau bit.
//
// Geometry: ROWS x COLS windows (phi x eta), default 2x4 as in the
// document, read from (ROWS+3) x (COLS+3) towers. Array index [r][c] is
// phi row r, eta column c; window (i,j) spans towers [i..i+3][j..j+3].
// The chip is split in eta into halves of two columns; at most one window
// per half can be a local maximum, so each half reports one 16-bit hit
// word (the document's two 16-bit results per chip).
//
// Timing: all outputs are registered, one clock after the towers.
module cp_chip
  import l1calo_pkg::*;
#(
  parameter int ROWS = 2,
  parameter int COLS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [TT_W-1:0]      em  [ROWS+3][COLS+3],
  input  logic [TT_W-1:0]      had [ROWS+3][COLS+3],
  input  cp_thr_t              thr [N_CP_SETS],
  output logic [N_CP_SETS-1:0] win_hits  [ROWS][COLS],  // RoI information
  output logic [N_CP_SETS-1:0] half_hits [COLS/2],
  output logic                 saturated                // a saturated core tower
);
  localparam int NH = COLS / 2;

  function automatic logic [TT_W-1:0] sat8(input logic [11:0] v);
    return (v > 12'd255) ? 8'd255 : v[7:0];
  endfunction

  function automatic logic [ISO_W-1:0] sat6(input logic [11:0] v);
    return (v > 12'd63) ? 6'd63 : v[5:0];
  endfunction

  logic [N_CP_SETS-1:0] hit_c [ROWS][COLS];
  logic                 sat_c;

  always_comb begin
    sat_c = 1'b0;
    for (int i = 0; i < ROWS; i++) begin
      for (int j = 0; j < COLS; j++) begin
        logic [11:0] pr [4];
        logic [11:0] hcore, emring, hadring, rsum;
        logic [11:0] r2 [3][3];
        logic [TT_W-1:0] em_max, tau_max, tau_s;
        logic [ISO_W-1:0] emi, hadi, hv;
        logic lmax;
        pr[0] = 12'(em[i+1][j+1]) + 12'(em[i+2][j+1]);
        pr[1] = 12'(em[i+1][j+2]) + 12'(em[i+2][j+2]);
        pr[2] = 12'(em[i+1][j+1]) + 12'(em[i+1][j+2]);
        pr[3] = 12'(em[i+2][j+1]) + 12'(em[i+2][j+2]);
        hcore = 12'(had[i+1][j+1]) + 12'(had[i+1][j+2]) +
                12'(had[i+2][j+1]) + 12'(had[i+2][j+2]);
        em_max = '0;
        tau_max = '0;
        for (int p = 0; p < 4; p++) begin
          if (sat8(pr[p]) > em_max) em_max = sat8(pr[p]);
          tau_s = sat8(pr[p] + hcore);
          if (tau_s > tau_max) tau_max = tau_s;
        end
        emring = '0;
        hadring = '0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            if (!(r inside {1, 2} && c inside {1, 2})) begin
              emring  += 12'(em[i+r][j+c]);
              hadring += 12'(had[i+r][j+c]);
            end
        emi  = sat6(emring);
        hadi = sat6(hadring);
        hv   = sat6(hcore);
        // 2x2 EM+had sums of the core (r2[1][1]) and its 8 neighbours
        for (int dr = 0; dr < 3; dr++)
          for (int dc = 0; dc < 3; dc++)
            r2[dr][dc] = 12'(em[i+dr][j+dc])   + 12'(em[i+dr][j+dc+1]) +
                         12'(em[i+dr+1][j+dc]) + 12'(em[i+dr+1][j+dc+1]) +
                         12'(had[i+dr][j+dc])   + 12'(had[i+dr][j+dc+1]) +
                         12'(had[i+dr+1][j+dc]) + 12'(had[i+dr+1][j+dc+1]);
        rsum = r2[1][1];
        // index [1+dphi][1+deta]: strict towards +eta and +phi
        lmax = (rsum >  r2[0][2]) && (rsum >  r2[1][2]) && (rsum >  r2[2][2]) &&
               (rsum >  r2[2][1]) &&
               (rsum >= r2[0][0]) && (rsum >= r2[1][0]) && (rsum >= r2[2][0]) &&
               (rsum >= r2[0][1]);
        for (int s = 0; s < N_CP_SETS; s++) begin
          logic tau;
          tau = (s >= 8) && thr[s].is_tau;
          hit_c[i][j][s] = lmax && (emi <= thr[s].em_iso) && (hadi <= thr[s].had_iso) &&
                           (tau ? (tau_max > thr[s].cluster)
                                : (em_max > thr[s].cluster && hv <= thr[s].had_veto));
        end
        if (em[i+1][j+1] == TT_MAX || em[i+1][j+2] == TT_MAX ||
            em[i+2][j+1] == TT_MAX || em[i+2][j+2] == TT_MAX ||
            had[i+1][j+1] == TT_MAX || had[i+1][j+2] == TT_MAX ||
            had[i+2][j+1] == TT_MAX || had[i+2][j+2] == TT_MAX)
          sat_c = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) win_hits[i][j] <= '0;
      for (int h = 0; h < NH; h++) half_hits[h] <= '0;
      saturated <= 1'b0;
    end else begin
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) win_hits[i][j] <= hit_c[i][j];
      for (int h = 0; h < NH; h++) begin
        logic [N_CP_SETS-1:0] acc;
        acc = '0;
        for (int i = 0; i < ROWS; i++)
          for (int j = 2*h; j < 2*h+2; j++) acc |= hit_c[i][j];
        half_hits[h] <= acc;
      end
      saturated <= sat_c;
    end
  end

endmodule
