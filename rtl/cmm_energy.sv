// cmm_energy: energy summation on the Common Merger Modules of the
// Jet/Energy Processor, crate and system level.
//
// Crate level: the 25-bit words of N_MOD JEMs each carry Ex, Ey and ET in
// the 8-bit quad-linear code (bits 7:0 Ex, 15:8 Ey, 23:16 ET, odd parity
// in bit 24). They are decoded to linear values and summed. Slots
// 0..N_MOD/2-1 cover one phi quadrant and the rest the opposite quadrant,
// so the component sums of the two halves are subtracted (first minus
// second, or the reverse when flip_ex / flip_ey is set, depending on which
// quadrants the crate holds). ET is the plain sum. A code of 0xFF (an
// overflow or saturation in a JEM) or bad parity sets the overflow flag.
// System level: the own crate result and the remote crate result are
// added. Outputs to the Central Trigger Processor:
//  * 4 total-ET bits: ET greater than threshold x 4 GeV (9-bit thresholds,
//    up to about 2 TeV in 4 GeV steps);
//  * 8 missing-ET bits from a look-up table addressed by |Ex| and |Ey|,
//    both scaled by 2**r where r = 0..3 is the smallest range in which the
//    larger of the two fits in 6 bits (steps of 1, 2, 4 and 8 GeV). The
//    table holds, for each address, which of the eight thresholds the
//    quadrature sum passes; it is loaded through a write port.
// An overflow, or a larger component beyond the last range (512 GeV and
// up), sets all threshold bits. The 6-bit scaled components, and what an
// overflow does, are this design's choices.
//
// Timing: crate_sum one clock after the JEM words; system sums one clock
// later (remote_sum sampled with crate_sum); threshold bits one more.
module cmm_energy
  import l1calo_pkg::*;
#(
  parameter int N_MOD = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [24:0] mod_word [N_MOD],
  input  logic        flip_ex,
  input  logic        flip_ey,
  input  crate_esum_t remote_sum,
  input  logic [8:0]  et_thr [4],
  input  logic        lut_wr,
  input  logic [13:0] lut_waddr,
  input  logic [7:0]  lut_wdata,
  output crate_esum_t crate_sum,
  output crate_esum_t system_sum,  // RoI data for Level-2
  output logic [3:0]  et_hits,
  output logic [7:0]  met_hits
);
  logic [7:0] lut [1 << 14];
  always_ff @(posedge clk) if (lut_wr) lut[lut_waddr] <= lut_wdata;

  crate_esum_t crate_c, sys_c;

  always_comb begin
    logic [16:0] xa, xb, ya, yb, t;
    logic        ovf;
    xa = '0; xb = '0; ya = '0; yb = '0; t = '0; ovf = 1'b0;
    for (int m = 0; m < N_MOD; m++) begin
      logic [24:0] w;
      w = mod_word[m];
      if (!(^w) || w[7:0] == 8'hFF || w[15:8] == 8'hFF || w[23:16] == 8'hFF) ovf = 1'b1;
      if (^w) begin
        if (m < N_MOD / 2) begin
          xa += 17'(ql_decode(w[7:0]));
          ya += 17'(ql_decode(w[15:8]));
        end else begin
          xb += 17'(ql_decode(w[7:0]));
          yb += 17'(ql_decode(w[15:8]));
        end
        t += 17'(ql_decode(w[23:16]));
      end
    end
    crate_c.ovf = ovf;
    crate_c.ex  = flip_ex ? $signed(xb - xa) : $signed(xa - xb);
    crate_c.ey  = flip_ey ? $signed(yb - ya) : $signed(ya - yb);
    crate_c.et  = t;
    sys_c.ovf = crate_sum.ovf || remote_sum.ovf;
    sys_c.ex  = crate_sum.ex + remote_sum.ex;
    sys_c.ey  = crate_sum.ey + remote_sum.ey;
    sys_c.et  = crate_sum.et + remote_sum.et;
  end

  logic [16:0] ax, ay, amax;
  logic [1:0]  rng;
  logic        beyond;
  logic [13:0] laddr;

  always_comb begin
    ax = system_sum.ex[16] ? 17'(-system_sum.ex) : 17'(system_sum.ex);
    ay = system_sum.ey[16] ? 17'(-system_sum.ey) : 17'(system_sum.ey);
    amax = (ax > ay) ? ax : ay;
    beyond = 1'b0;
    if      (amax < 17'd64)  rng = 2'd0;
    else if (amax < 17'd128) rng = 2'd1;
    else if (amax < 17'd256) rng = 2'd2;
    else begin
      rng = 2'd3;
      beyond = amax >= 17'd512;
    end
    laddr = {rng, 6'(ax >> rng), 6'(ay >> rng)};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      crate_sum  <= '0;
      system_sum <= '0;
      et_hits    <= '0;
      met_hits   <= '0;
    end else begin
      crate_sum  <= crate_c;
      system_sum <= sys_c;
      for (int k = 0; k < 4; k++)
        et_hits[k] <= system_sum.ovf || (system_sum.et > {6'd0, et_thr[k], 2'b00});
      met_hits <= (system_sum.ovf || beyond) ? 8'hFF : lut[laddr];
    end

endmodule
