// jem_energy_sum: first stage of the missing-ET and total-ET triggers on a
// Jet/Energy Module.
//
// Works on the 8 x 4 (phi x eta) core jet elements. An element enters the
// Ex/Ey adder trees if it is above `exy_thr` and the ET tree if above
// `et_thr` (noise cuts). Ex and Ey use the element times |cos phi| and
// |sin phi| of its phi row; a JEM sees one quadrant, so all its components
// share one sign and the arithmetic is unsigned. Coefficients are 8-bit
// fractions, C = round(256 * cos((k + 0.5) * 90/8 degrees)) clamped to 255
// for phi row k; each product (10 x 8 bits) is kept to 0.25 GeV (12 bits),
// the quarter-GeV sum is rounded to the nearest GeV. In quadrants with odd
// number the cos and sin roles swap (`quad_odd`).
// The three 12-bit sums saturate at 4095. Each is sent in the 8-bit
// quad-linear code; overflow or any saturated (1023) core element forces
// the code to 0xFF. Output word: {odd parity, ET, Ey, Ex} codes, 25 bits.
// The coefficient width and the product scaling are this design's reading
// of "12-bit multipliers ... to 0.25 GeV precision".
//
// Timing: registered, one clock after the jet elements.
module jem_energy_sum
  import l1calo_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [JE_W-1:0]   je [8][4],
  input  logic [JE_W-1:0]   exy_thr,
  input  logic [JE_W-1:0]   et_thr,
  input  logic              quad_odd,
  output logic [24:0]       cmm_word,
  output logic [ESUM_W-1:0] ex, ey, et,   // linear sums, for readout
  output logic              sat
);
  localparam logic [7:0] COS_TAB [8] = '{8'd255, 8'd245, 8'd226, 8'd198,
                                         8'd162, 8'd121, 8'd74,  8'd25};

  logic [17:0] qx, qy;   // quarter-GeV sums
  logic [15:0] st;
  logic        any_sat;
  logic [ESUM_W-1:0] ex_c, ey_c, et_c;
  logic        ovx, ovy, ovt;

  always_comb begin
    qx = '0; qy = '0; st = '0; any_sat = 1'b0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 4; c++) begin
        logic [7:0]  cc, ss;
        logic [17:0] px, py;
        cc = quad_odd ? COS_TAB[7-r] : COS_TAB[r];
        ss = quad_odd ? COS_TAB[r]   : COS_TAB[7-r];
        px = (18'(je[r][c]) * 18'(cc)) >> 6;
        py = (18'(je[r][c]) * 18'(ss)) >> 6;
        if (je[r][c] > exy_thr) begin
          qx += px;
          qy += py;
        end
        if (je[r][c] > et_thr) st += 16'(je[r][c]);
        any_sat |= (je[r][c] == JE_MAX);
      end
  end

  always_comb begin
    logic [17:0] gx, gy;
    gx = (qx + 18'd2) >> 2;
    gy = (qy + 18'd2) >> 2;
    ovx = gx > 18'd4095;
    ovy = gy > 18'd4095;
    ovt = st > 16'd4095;
    ex_c = ovx ? 12'hFFF : gx[11:0];
    ey_c = ovy ? 12'hFFF : gy[11:0];
    et_c = ovt ? 12'hFFF : st[11:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmm_word <= 25'h1000000;
      ex <= '0; ey <= '0; et <= '0; sat <= 1'b0;
    end else begin
      logic [23:0] w;
      w = {ql_encode(et_c, ovt || any_sat), ql_encode(ey_c, ovy || any_sat),
           ql_encode(ex_c, ovx || any_sat)};
      cmm_word <= {odd_par(64'(w)), w};
      ex <= ex_c; ey <= ey_c; et <= et_c;
      sat <= any_sat || ovx || ovy || ovt;
    end
  end

endmodule
