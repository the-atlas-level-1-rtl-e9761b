// jem_input: forms one jet element from an EM and a hadronic 0.2x0.2
// PreProcessor sum (one channel of a JEM input-processor FPGA).
//
// Each link word (9-bit ET plus odd parity) is parity-checked; a word with
// bad parity is taken as zero and flagged. The element is EM + hadronic,
// 10 bits, and is set to full scale (1023) when either input is at its own
// full scale (511), which marks tower saturation or an overflowed 2x2 sum
// upstream. Zeroing a word with bad parity is this design's choice.
//
// Timing: registered, one clock after the link words.
module jem_input
  import l1calo_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  jet_word_t       em,
  input  jet_word_t       had,
  output logic [JE_W-1:0] je,
  output logic            par_err
);
  logic              em_bad, had_bad;
  logic [SUM2_W-1:0] em_et, had_et;

  assign em_bad  = (^{em.parity, em.et}) == 1'b0;
  assign had_bad = (^{had.parity, had.et}) == 1'b0;
  assign em_et   = em_bad  ? '0 : em.et;
  assign had_et  = had_bad ? '0 : had.et;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      je <= '0;
      par_err <= 1'b0;
    end else begin
      je <= (em_et == SUM2_MAX || had_et == SUM2_MAX) ? JE_MAX
                                                      : JE_W'(em_et) + JE_W'(had_et);
      par_err <= em_bad || had_bad;
    end

endmodule
