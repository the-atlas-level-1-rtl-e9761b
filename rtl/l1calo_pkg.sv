// l1calo_pkg: widths, encodings and small helper functions shared by the
// trigger-tower, cluster, jet and merger logic.
//
// Trigger-tower ET values are 8 bits (1 GeV per count, 255 = saturated),
// 2x2 PreProcessor sums are 9 bits (511 = saturated), jet elements are
// 10 bits (1023 = saturated). All real-time link words carry an odd-parity
// bit: the number of ones in the word including the parity bit is odd.
// The energy-sum words travel in a quad-linear code: 6-bit mantissa and
// 2-bit exponent, value = mantissa * 4**exponent, 0xFF means saturation.
package l1calo_pkg;

  localparam int ADC_W    = 10;   // FADC samples kept (12-bit ADC, two LSBs dropped)
  localparam int TT_W     = 8;    // trigger-tower ET after the look-up table
  localparam int SUM2_W   = 9;    // 0.2x0.2 PreProcessor sum
  localparam int JE_W     = 10;   // jet element
  localparam int ESUM_W   = 12;   // JEM energy sums
  localparam int ISO_W    = 6;    // isolation / veto thresholds
  localparam int N_CP_SETS  = 16; // CP threshold sets
  localparam int N_JET_SETS = 8;  // jet threshold sets
  localparam int MULT_W   = 3;    // hit multiplicity, saturates at 7

  localparam logic [TT_W-1:0]   TT_MAX   = '1;
  localparam logic [SUM2_W-1:0] SUM2_MAX = '1;
  localparam logic [JE_W-1:0]   JE_MAX   = '1;

  // One BC-mux link word: odd parity, flag, 8-bit tower ET.
  typedef struct packed {
    logic            parity;
    logic            flag;
    logic [TT_W-1:0] et;
  } bcmux_word_t;

  // One 0.2x0.2 jet link word: odd parity and a 9-bit sum.
  typedef struct packed {
    logic              parity;
    logic [SUM2_W-1:0] et;
  } jet_word_t;

  // CP threshold set: cluster threshold (pass if greater), isolation and
  // veto thresholds (pass if less than or equal), algorithm choice.
  typedef struct packed {
    logic              is_tau;
    logic [TT_W-1:0]   cluster;
    logic [ISO_W-1:0]  em_iso;
    logic [ISO_W-1:0]  had_iso;
    logic [ISO_W-1:0]  had_veto;
  } cp_thr_t;

  typedef enum logic [1:0] { WIN_2X2 = 2'd0, WIN_3X3 = 2'd1, WIN_4X4 = 2'd2 } jet_win_t;

  // Jet threshold set: ET threshold (pass if greater) and window size.
  typedef struct packed {
    jet_win_t        win;
    logic [JE_W-1:0] thr;
  } jet_thr_t;

  // Programmable settings of one PreProcessor channel.
  typedef struct packed {
    logic [3:0]       sync_delay;   // coarse timing, whole crossings
    logic [3:0]       coef4, coef3, coef2, coef1, coef0; // FIR, coef0 = oldest sample
    logic [2:0]       drop;         // FIR low bits dropped
    logic [ADC_W-1:0] sat_low;
    logic [ADC_W-1:0] sat_high;
    logic [3:0]       ext_delay;
    logic [TT_W-1:0]  rate_thr;     // rate counter counts ET above this
    logic             playback;     // take samples from the playback memory
  } ppr_cfg_t;

  // Crate-level energy sums sent from a crate CMM to the system CMM:
  // signed Ex and Ey, unsigned ET, and an overflow/saturation flag.
  typedef struct packed {
    logic               ovf;
    logic signed [16:0] ex;
    logic signed [16:0] ey;
    logic        [16:0] et;
  } crate_esum_t;

  // Odd parity bit for a word.
  function automatic logic odd_par(input logic [63:0] v);
    return ~(^v);
  endfunction

  // Saturating 3-bit multiplicity add.
  function automatic logic [MULT_W-1:0] mult_add(input logic [MULT_W-1:0] a,
                                                 input logic [MULT_W-1:0] b);
    logic [MULT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[MULT_W] ? '1 : s[MULT_W-1:0];
  endfunction

  // Quad-linear code of a 12-bit sum: the smallest exponent whose
  // mantissa fits in six bits, low bits truncated. sat forces 0xFF.
  function automatic logic [7:0] ql_encode(input logic [ESUM_W-1:0] v, input logic sat);
    logic [7:0] c;
    if (sat)                 c = 8'hFF;
    else if (v < 12'd64)     c = {2'd0, v[5:0]};
    else if (v < 12'd256)    c = {2'd1, v[7:2]};
    else if (v < 12'd1024)   c = {2'd2, v[9:4]};
    else                     c = {2'd3, v[11:6]};
    return c;
  endfunction

  function automatic logic [ESUM_W-1:0] ql_decode(input logic [7:0] c);
    return ESUM_W'({6'd0, c[5:0]} << (2 * c[7:6]));
  endfunction

endpackage
