// ppr_bcid: bunch-crossing identification for one trigger tower.
//
// Calorimeter pulses span several bunch crossings; this block marks the
// one crossing each pulse belongs to, with three independent methods:
//  * FIR + peak finder (unsaturated pulses): five consecutive samples are
//    weighted by programmable coefficients and summed; the crossing whose
//    sum is greater than the previous sum and greater than or equal to the
//    next one is the peak (the strict/non-strict split keeps a plateau of
//    two equal sums from giving two peaks).
//  * saturated-pulse method: two thresholds on the leading edge estimate
//    where the peak of a pulse that saturated the ADC would have been.
//    This design's rule: with the first saturated sample at crossing t,
//    the peak is t if sample t-1 exceeds `sat_high` and sample t-2
//    exceeds `sat_low` (a fast-rising, very large pulse), otherwise t+1.
//  * external method: the analogue discriminator bit, delayed by a
//    programmable number of crossings; its rising edge marks the crossing.
//    It is reported for consistency checks only.
// Around a saturated pulse (any of the five FIR samples saturated) the FIR
// peak is suppressed and only the saturated method decides.
//
// The FIR sum (up to 17 bits) is turned into the 10-bit value sent to the
// look-up table by dropping `drop` low bits and saturating at 1023.
// Coefficient width (4 bits) and the exact saturated-pulse rule are this
// design's choices; the document gives the method, not these details.
//
// Timing: the results for the crossing whose sample entered on clock edge
// n are valid after clock edge n+4.
module ppr_bcid
  import l1calo_pkg::*;
#(
  parameter int COEF_W = 4,
  parameter int EXT_DELAY_W = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [ADC_W-1:0]       sample,
  input  logic                   disc,          // analogue discriminator
  input  logic [COEF_W-1:0]      coef [5],      // coef[0] weights the oldest sample
  input  logic [2:0]             drop,
  input  logic [ADC_W-1:0]       sat_low,
  input  logic [ADC_W-1:0]       sat_high,
  input  logic [EXT_DELAY_W-1:0] ext_delay,
  output logic [ADC_W-1:0]       fir_peak_val,  // 10-bit FIR value at a FIR peak, else 0
  output logic                   fir_peak,
  output logic                   sat_peak,
  output logic                   ext_peak
);
  localparam int FIR_W = ADC_W + COEF_W + 3;
  localparam logic [ADC_W-1:0] ADC_MAX = '1;

  logic [ADC_W-1:0] s [7];            // s[0] newest
  logic [FIR_W-1:0] f_now, fd1, fd2;  // FIR centred on s[2], s[3], s[4]
  logic [FIR_W-1:0] f_shift;
  logic [ADC_W-1:0] f10;
  logic             peak_c, sat_near, first_sat0, first_sat1, fast_rise0, fast_rise1, sat_c;
  logic [(1<<EXT_DELAY_W)-1:0] disc_sr;
  logic             disc_d, disc_dd;

  always_comb begin
    f_now = '0;
    for (int k = 0; k < 5; k++)
      f_now += FIR_W'(coef[k]) * FIR_W'(s[4-k]);
  end

  // Value of the candidate crossing (centre s[3]), scaled to 10 bits.
  always_comb begin
    f_shift = fd1 >> drop;
    f10 = (f_shift > FIR_W'(ADC_MAX)) ? ADC_MAX : f_shift[ADC_W-1:0];
  end

  always_comb begin
    sat_near   = (s[1] == ADC_MAX) || (s[2] == ADC_MAX) || (s[3] == ADC_MAX) ||
                 (s[4] == ADC_MAX) || (s[5] == ADC_MAX);
    peak_c     = (fd1 > fd2) && (fd1 >= f_now) && !sat_near;
    first_sat0 = (s[3] == ADC_MAX) && (s[4] != ADC_MAX);
    first_sat1 = (s[4] == ADC_MAX) && (s[5] != ADC_MAX);
    fast_rise0 = (s[4] > sat_high) && (s[5] > sat_low);
    fast_rise1 = (s[5] > sat_high) && (s[6] > sat_low);
    sat_c      = (first_sat0 && fast_rise0) || (first_sat1 && !fast_rise1);
  end

  assign disc_d = disc_sr[ext_delay];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 7; k++) s[k] <= '0;
      fd1 <= '0;
      fd2 <= '0;
      fir_peak_val <= '0;
      fir_peak <= 1'b0;
      sat_peak <= 1'b0;
      ext_peak <= 1'b0;
      disc_sr <= '0;
      disc_dd <= 1'b0;
    end else begin
      s[0] <= sample;
      for (int k = 1; k < 7; k++) s[k] <= s[k-1];
      fd1 <= f_now;
      fd2 <= fd1;
      fir_peak     <= peak_c;
      fir_peak_val <= peak_c ? f10 : '0;
      sat_peak     <= sat_c;
      disc_sr      <= {disc_sr[(1<<EXT_DELAY_W)-2:0], disc};
      disc_dd      <= disc_d;
      ext_peak     <= disc_d && !disc_dd;
    end
  end

endmodule
