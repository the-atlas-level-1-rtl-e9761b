// ppr_bcmux_enc: bunch-crossing multiplexing of two trigger towers onto
// one link.
//
// After peak finding, a tower that is non-zero on one crossing is zero on
// the next, so two towers can share one link word per crossing:
//  * first slot: if tower A is non-zero, send A with flag 0; else if B is
//    non-zero, send B with flag 1 (the flag says which tower came first);
//    if both are zero, send an empty word and the next slot is again a
//    first slot.
//  * second slot (after a non-zero first word): send the other tower. If
//    its value from the first word's crossing is non-zero, send it with
//    flag 0 ("same crossing"); otherwise send its value on the current
//    crossing with flag 1 ("following crossing").
// No data is lost as long as the inputs obey the rule that a non-zero
// value is followed by a zero; an assertion checks it. The flag meanings
// follow the document; the encoding of the empty word is this design's.
//
// Word: {odd parity, flag, 8-bit ET}. Registered: the word for inputs
// presented before clock edge n is valid after edge n.
//
// The reset also disables the assertion, so the lint sees it used both as
// an asynchronous reset and in a synchronous expression; that is intended.
module ppr_bcmux_enc
  import l1calo_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TT_W-1:0] tower_a,
  input  logic [TT_W-1:0] tower_b,
  output bcmux_word_t     word
);
  logic            second;
  logic            first_is_b;
  logic [TT_W-1:0] pend;
  logic [TT_W-1:0] other_now;
  logic [TT_W-1:0] first_now;
  logic [TT_W-1:0] et_n;
  logic            flag_n;

  assign other_now = first_is_b ? tower_a : tower_b;
  assign first_now = first_is_b ? tower_b : tower_a;

  always_comb begin
    if (!second) begin
      if (tower_a != '0)      begin et_n = tower_a; flag_n = 1'b0; end
      else if (tower_b != '0) begin et_n = tower_b; flag_n = 1'b1; end
      else                    begin et_n = '0;      flag_n = 1'b0; end
    end else if (pend != '0)  begin et_n = pend;      flag_n = 1'b0; end
    else                      begin et_n = other_now; flag_n = 1'b1; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second     <= 1'b0;
      first_is_b <= 1'b0;
      pend       <= '0;
      word       <= '{parity: 1'b1, flag: 1'b0, et: '0};
    end else begin
      word <= '{parity: odd_par(64'({flag_n, et_n})), flag: flag_n, et: et_n};
      if (!second) begin
        if (tower_a != '0) begin
          second <= 1'b1; first_is_b <= 1'b0; pend <= tower_b;
        end else if (tower_b != '0) begin
          second <= 1'b1; first_is_b <= 1'b1; pend <= '0;
        end
      end else begin
        second <= 1'b0;
        pend   <= '0;
      end
    end
  end

  // A tower sent in the first slot must be zero on the next crossing, and
  // so must the other tower if its earlier value is still to be sent.
  a_peak_rule: assert property (@(posedge clk) disable iff (!rst_n)
    second |-> (first_now == '0) && (pend == '0 || other_now == '0));

endmodule
