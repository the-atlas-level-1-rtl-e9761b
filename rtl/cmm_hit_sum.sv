// cmm_hit_sum: hit counting on a Common Merger Module (CP or jet).
//
// Crate level: the 25-bit words of up to N_MOD processor modules (eight
// 3-bit multiplicities plus odd parity) are added per threshold set,
// saturating at 7. A word with bad parity is left out and flagged.
// The crate result leaves on `crate_word` (25 bits, odd parity), the
// cable to the system CMM.
// System level (used when this CMM is the system CMM): its own crate
// result plus the N_REMOTE crate results received on cables are added the
// same way, giving the eight 3-bit multiplicities and parity for the
// Central Trigger Processor.
// Defaults: 16 module slots and 3 remote crates (the CP system; the jet
// system uses 1 remote crate). Treatment of parity errors is this design's
// choice.
//
// Timing: crate_word one clock after the module words; ctp_word one clock
// after crate_word, remote words being sampled together with crate_word.
module cmm_hit_sum
  import l1calo_pkg::*;
#(
  parameter int N_MOD    = 16,
  parameter int N_REMOTE = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [24:0] mod_word    [N_MOD],
  input  logic [24:0] remote_word [N_REMOTE],
  output logic [24:0] crate_word,
  output logic [24:0] ctp_word,
  output logic        par_err
);
  function automatic logic good(input logic [24:0] w);
    return ^w;
  endfunction

  function automatic logic [23:0] add_words(input logic [23:0] a, input logic [23:0] b);
    logic [23:0] r;
    for (int s = 0; s < 8; s++) r[3*s +: 3] = mult_add(a[3*s +: 3], b[3*s +: 3]);
    return r;
  endfunction

  logic [23:0] crate_c, sys_c;
  logic        perr_c;

  always_comb begin
    crate_c = '0;
    perr_c  = 1'b0;
    for (int m = 0; m < N_MOD; m++)
      if (good(mod_word[m])) crate_c = add_words(crate_c, mod_word[m][23:0]);
      else                   perr_c = 1'b1;
    sys_c = crate_word[23:0];
    for (int c = 0; c < N_REMOTE; c++)
      if (good(remote_word[c])) sys_c = add_words(sys_c, remote_word[c][23:0]);
      else                      perr_c = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      crate_word <= 25'h1000000;
      ctp_word   <= 25'h1000000;
      par_err    <= 1'b0;
    end else begin
      crate_word <= {odd_par(64'(crate_c)), crate_c};
      ctp_word   <= {odd_par(64'(sys_c)), sys_c};
      par_err    <= perr_c;
    end

endmodule
