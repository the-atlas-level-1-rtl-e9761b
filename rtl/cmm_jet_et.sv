// cmm_jet_et: estimate of the total transverse energy in jets (ETJ) on the
// system jet CMM.
//
// The eight system-wide jet multiplicities m_i (3 bits each) are weighted
// by programmable energies w_i and summed: ETJ = sum_i m_i * w_i. For
// threshold sets ordered by rising threshold, choosing w_i as the step
// between the energy values assigned to neighbouring thresholds gives the
// estimate sum over bands of (jets in band) x (value for that band); the
// value for each band is programmable and best set close to its lower
// threshold. ETJ is compared with four thresholds (greater than), giving
// the 4 bits sent to the Central Trigger Processor.
// The per-count weighting replaces the look-up tables of the original
// with arithmetic that gives the same table contents.
//
// Timing: ETJ is registered one clock after the multiplicities, the
// threshold bits one clock later.
module cmm_jet_et
  import l1calo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:0] mult,          // eight 3-bit multiplicities, set 0 in bits 2:0
  input  logic [9:0]  weight [N_JET_SETS],
  input  logic [15:0] thr    [4],
  output logic [15:0] etj,
  output logic [3:0]  etj_hits
);
  logic [15:0] etj_c;

  always_comb begin
    etj_c = '0;
    for (int i = 0; i < N_JET_SETS; i++)
      etj_c += 16'(mult[3*i +: 3]) * 16'(weight[i]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      etj      <= '0;
      etj_hits <= '0;
    end else begin
      etj <= etj_c;
      for (int k = 0; k < 4; k++) etj_hits[k] <= etj > thr[k];
    end

endmodule
