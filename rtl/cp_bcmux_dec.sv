// cp_bcmux_dec: recovers the two trigger towers of one BC-mux link.
//
// Tracks the slot phase of the link (a non-zero first word is always
// followed by a second word). A second word with flag 0 completes the
// crossing of the first word; with flag 1 it belongs to the crossing on
// which it arrives. Because a second word may still complete the previous
// crossing, each crossing is released one clock after its first word.
// A word with bad parity is taken as zero and reported on `par_err`.
//
// Timing: the towers of the crossing whose word was sampled at clock edge n
// are valid after edge n+1.
module cp_bcmux_dec
  import l1calo_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  bcmux_word_t     word,
  output logic [TT_W-1:0] tower_a,
  output logic [TT_W-1:0] tower_b,
  output logic            par_err
);
  logic            second;
  logic            first_is_b;
  logic [TT_W-1:0] prev_a, prev_b;
  logic [TT_W-1:0] et;
  logic            bad;

  assign bad = (^{word.parity, word.flag, word.et}) == 1'b0;
  assign et  = bad ? '0 : word.et;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second <= 1'b0; first_is_b <= 1'b0;
      prev_a <= '0; prev_b <= '0;
      tower_a <= '0; tower_b <= '0;
      par_err <= 1'b0;
    end else begin
      par_err <= bad;
      if (!second) begin
        tower_a <= prev_a;
        tower_b <= prev_b;
        prev_a  <= (et != '0 && !word.flag) ? et : '0;
        prev_b  <= (et != '0 &&  word.flag) ? et : '0;
        if (et != '0) begin
          second     <= 1'b1;
          first_is_b <= word.flag;
        end
      end else begin
        second <= 1'b0;
        if (!word.flag) begin
          // same crossing as the first word
          tower_a <= first_is_b ? et : prev_a;
          tower_b <= first_is_b ? prev_b : et;
          prev_a  <= '0;
          prev_b  <= '0;
        end else begin
          tower_a <= prev_a;
          tower_b <= prev_b;
          prev_a  <= first_is_b ? et : '0;
          prev_b  <= first_is_b ? '0 : et;
        end
      end
    end
  end

endmodule
