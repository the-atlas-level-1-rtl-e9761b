// readout_ctrl: DAQ readout of one trigger module.
//
// Every crossing the module's data word (W bits) is written into a
// scrolling pipeline memory of DEPTH entries. On a Level-1 Accept, the
// event is queued; for each queued event the controller copies into the
// output FIFO a header word carrying the bunch-crossing number (BCN) seen
// with the L1A, followed by `nslices` consecutive crossings centred on the
// crossing of interest, which is the one written `offset` clocks before
// the L1A (slices from offset + nslices/2 down to offset + nslices/2 -
// nslices + 1 clocks back). The FIFO drains through a valid/ready stream
// towards the serial link; each word carries an odd-parity bit over
// {header flag, data}.
// L1As closer than the minimum spacing are accepted up to the depth of the
// event queue. offset must be at least 1 and offset + nslices/2 below
// DEPTH.
// Sizes chosen in this design: pipeline 256 crossings, event queue 4,
// output FIFO 64 words.
//
// Timing: the header enters the FIFO two clocks after the L1A, one slice
// per clock follows; `out_valid` rises the clock after the first write.
module readout_ctrl #(
  parameter int W          = 24,
  parameter int DEPTH      = 256,
  parameter int QDEPTH     = 4,
  parameter int FIFO_DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [W-1:0]             din,
  input  logic                     l1a,
  input  logic [11:0]              bcn,
  input  logic [$clog2(DEPTH)-1:0] offset,
  input  logic [2:0]               nslices,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic                     out_hdr,
  output logic [W-1:0]             out_data,
  output logic                     out_par,
  output logic                     overflow
);
  localparam int AW = $clog2(DEPTH);
  localparam int FW = $clog2(FIFO_DEPTH);
  localparam int QW = $clog2(QDEPTH);

  initial assert (W >= 12) else $error("readout word must hold a 12-bit BCN");

  // scrolling pipeline memory
  logic [W-1:0]  pipe [DEPTH];
  logic [AW-1:0] wptr;
  always_ff @(posedge clk) pipe[wptr] <= din;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wptr <= '0;
    else        wptr <= wptr + 1'b1;

  // queue of accepted events: first slice address and BCN
  logic [AW-1:0] q_start [QDEPTH];
  logic [11:0]   q_bcn   [QDEPTH];
  logic [QW:0]   q_cnt;
  logic [QW-1:0] q_rd, q_wr;

  // extraction state
  typedef enum logic [1:0] { IDLE, HEADER, SLICES } ro_state_t;
  ro_state_t     state;
  logic [AW-1:0] rd_addr;
  logic [2:0]    left;

  // output FIFO
  logic [W:0]    fifo [FIFO_DEPTH];
  logic [FW:0]   f_cnt;
  logic [FW-1:0] f_rd, f_wr;
  logic          push, pop;
  logic [W:0]    push_word;

  logic q_push, q_pop;
  assign q_push = l1a && (q_cnt != (QW+1)'(QDEPTH));
  assign q_pop  = (state == IDLE) && (q_cnt != '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q_cnt <= '0; q_rd <= '0; q_wr <= '0;
    end else begin
      if (q_push) begin
        q_start[q_wr] <= wptr - offset - AW'(nslices >> 1);
        q_bcn[q_wr]   <= bcn;
        q_wr          <= q_wr + 1'b1;
      end
      if (q_pop) q_rd <= q_rd + 1'b1;
      q_cnt <= q_cnt + (QW+1)'(q_push) - (QW+1)'(q_pop);
    end

  always_comb begin
    push = 1'b0;
    push_word = '0;
    case (state)
      HEADER: begin push = 1'b1; push_word = {1'b1, W'(q_bcn[q_rd - 1'b1])}; end
      SLICES: begin push = 1'b1; push_word = {1'b0, pipe[rd_addr]}; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= IDLE; rd_addr <= '0; left <= '0;
    end else begin
      case (state)
        IDLE: if (q_pop) begin
          state   <= HEADER;
          rd_addr <= q_start[q_rd];
          left    <= nslices;
        end
        HEADER: state <= (left == '0) ? IDLE : SLICES;
        SLICES: begin
          rd_addr <= rd_addr + 1'b1;
          left    <= left - 1'b1;
          if (left == 3'd1) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end

  logic room;
  assign pop  = out_valid && out_ready;
  assign room = (f_cnt != (FW+1)'(FIFO_DEPTH)) || pop;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      f_cnt <= '0; f_rd <= '0; f_wr <= '0; overflow <= 1'b0;
    end else begin
      if (push && room) begin
        fifo[f_wr] <= push_word;
        f_wr <= f_wr + 1'b1;
      end
      if (push && !room) overflow <= 1'b1;
      if (pop) f_rd <= f_rd + 1'b1;
      f_cnt <= f_cnt + (FW+1)'(push && room) - (FW+1)'(pop);
    end

  assign out_valid = (f_cnt != '0);
  assign {out_hdr, out_data} = fifo[f_rd];
  assign out_par = ~(^{out_hdr, out_data});

endmodule
