// jet_processor: the jet algorithm of one Jet/Energy Module.
//
// Input: 11 x 7 (phi x eta) jet elements of 10 bits, 1023 meaning
// saturated; index [r][c] is phi row r, eta column c. The 8 x 4 core
// (rows 1..8, columns 1..4) holds the reference elements of the module's
// 32 jet positions; the rest is environment shared with neighbours.
//  1. Cluster sums: 10 x 6 sums of 2x2 elements, 9 x 5 of 3x3 and 8 x 4 of
//     4x4, each flagged if it contains a saturated element.
//  2. Local maxima: each of the 32 central 2x2 sums (2x2 cluster index
//     rows 1..8, columns 1..4) is compared with its 8 neighbours: greater
//     than those at +eta and +phi, greater than or equal to those at -eta
//     and -phi.
//  3. The core is divided into eight 2x2 subregions of jet positions; each
//     holds at most one local maximum. For it the 2x2 cluster, the 4x4
//     cluster around it and the largest of the four 3x3 clusters that
//     contain it are selected; a subregion without a maximum gives nothing.
//  4. Each of the eight threshold sets picks one window size; a jet passes
//     if its window sum, saturated to 10 bits, is greater than the
//     threshold (1023 turns the set off), or if the window holds a
//     saturated element and the threshold is not 1023.
//  5. Per set the passing subregions are counted, saturating at 7.
// Output: 25-bit word to the jet CMM, eight 3-bit counts (set 0 in bits
// 2:0) and odd parity in bit 24; per subregion the RoI (found, position
// inside the subregion, threshold bits).
//
// Timing: registered, one clock after the jet elements.
//
// The window-size field of a threshold set is used to pick the sum before
// the compare, so the compare function reads only the threshold value.
module jet_processor
  import l1calo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [JE_W-1:0]       je [11][7],
  input  jet_thr_t              thr [N_JET_SETS],
  output logic [24:0]           cmm_word,
  output logic [7:0]            roi_found,
  output logic [1:0]            roi_pos  [8],   // {eta offset, phi offset}
  output logic [N_JET_SETS-1:0] roi_hits [8]
);
  logic [13:0] c2 [10][6];
  logic [13:0] c3 [9][5];
  logic [13:0] c4 [8][4];
  logic        s2 [10][6];
  logic        s3 [9][5];
  logic        s4 [8][4];
  logic        lmax [10][6];

  always_comb begin
    for (int r = 0; r < 10; r++)
      for (int c = 0; c < 6; c++) begin
        c2[r][c] = '0; s2[r][c] = 1'b0;
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++) begin
            c2[r][c] += 14'(je[r+a][c+b]);
            s2[r][c] |= (je[r+a][c+b] == JE_MAX);
          end
      end
    for (int r = 0; r < 9; r++)
      for (int c = 0; c < 5; c++) begin
        c3[r][c] = '0; s3[r][c] = 1'b0;
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) begin
            c3[r][c] += 14'(je[r+a][c+b]);
            s3[r][c] |= (je[r+a][c+b] == JE_MAX);
          end
      end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 4; c++) begin
        c4[r][c] = '0; s4[r][c] = 1'b0;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++) begin
            c4[r][c] += 14'(je[r+a][c+b]);
            s4[r][c] |= (je[r+a][c+b] == JE_MAX);
          end
      end
    for (int r = 0; r < 10; r++)
      for (int c = 0; c < 6; c++) lmax[r][c] = 1'b0;
    for (int r = 1; r < 9; r++)
      for (int c = 1; c < 5; c++)
        lmax[r][c] = (c2[r][c] >  c2[r][c+1])   && (c2[r][c] >  c2[r+1][c+1]) &&
                     (c2[r][c] >  c2[r-1][c+1]) && (c2[r][c] >  c2[r+1][c])   &&
                     (c2[r][c] >= c2[r-1][c])   && (c2[r][c] >= c2[r-1][c-1]) &&
                     (c2[r][c] >= c2[r][c-1])   && (c2[r][c] >= c2[r+1][c-1]);
  end

  function automatic logic pass(input logic [13:0] sum, input logic sat, input jet_thr_t t);
    logic [JE_W-1:0] s10;
    s10 = (sum > 14'(JE_MAX)) ? JE_MAX : sum[JE_W-1:0];
    return sat ? (t.thr != JE_MAX) : (s10 > t.thr);
  endfunction

  logic [7:0]            found_c;
  logic [1:0]            pos_c  [8];
  logic [N_JET_SETS-1:0] hits_c [8];

  always_comb begin
    for (int q = 0; q < 8; q++) begin
      int sr, sc;
      sr = 1 + 2 * (q % 4);   // subregion q: phi block q%4, eta block q/4
      sc = 1 + 2 * (q / 4);
      found_c[q] = 1'b0;
      pos_c[q]   = '0;
      hits_c[q]  = '0;
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++)
          if (lmax[sr+a][sc+b] && !found_c[q]) begin
            int r, c;
            logic [13:0] best3;
            logic        bsat3;
            r = sr + a;
            c = sc + b;
            found_c[q] = 1'b1;
            pos_c[q]   = {b[0], a[0]};
            best3 = c3[r-1][c-1];
            bsat3 = s3[r-1][c-1];
            for (int u = 0; u < 2; u++)
              for (int v = 0; v < 2; v++)
                if (c3[r-1+u][c-1+v] > best3) begin
                  best3 = c3[r-1+u][c-1+v];
                  bsat3 = s3[r-1+u][c-1+v];
                end
            for (int s = 0; s < N_JET_SETS; s++)
              case (thr[s].win)
                WIN_2X2: hits_c[q][s] = pass(c2[r][c], s2[r][c], thr[s]);
                WIN_3X3: hits_c[q][s] = pass(best3, bsat3, thr[s]);
                default: hits_c[q][s] = pass(c4[r-1][c-1], s4[r-1][c-1], thr[s]);
              endcase
          end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmm_word  <= 25'h1000000;
      roi_found <= '0;
      for (int q = 0; q < 8; q++) begin
        roi_pos[q]  <= '0;
        roi_hits[q] <= '0;
      end
    end else begin
      logic [23:0] m;
      for (int s = 0; s < N_JET_SETS; s++) begin
        logic [MULT_W-1:0] cnt;
        cnt = '0;
        for (int q = 0; q < 8; q++) cnt = mult_add(cnt, MULT_W'(hits_c[q][s]));
        m[3*s +: 3] = cnt;
      end
      cmm_word  <= {odd_par(64'(m)), m};
      roi_found <= found_c;
      roi_pos   <= pos_c;
      roi_hits  <= hits_c;
    end
  end

endmodule
