// rod: Readout Driver, DAQ flavour.
//
// Collects the readout streams of up to N_IN trigger modules and builds
// one event fragment per Level-1 Accept:
//   header  : 0xEE1234EE, L1 event id, BCN, trigger type (four words)
//   payload : for each enabled input, its nslices data words, each as
//             {input number (5 bits), slice number (3 bits), 24-bit data};
//             with zero suppression on, all-zero data words are dropped
//   trailer : status word (bit 0 parity error, bit 1 BCN mismatch,
//             bit 2 missing module header), then the payload word count.
// Each input stream begins an event with a header word carrying the BCN;
// it must equal the BCN the ROD received from the timing system with the
// L1A. Input words carry odd parity, which is checked.
// The ROD raises BUSY whenever the fill level of any input buffer is above
// the programmable threshold and drops it once all are at or below it.
// Output is one 32-bit stream with valid/ready flow control (one S-Link);
// spreading the output over up to four links is not modelled.
// The header marker and field layout follow common ATLAS practice as this
// design's choice; the document names the parts of a fragment only.
//
// Timing: input buffers accept a word per clock; the builder emits at most
// one output word per clock.
module rod #(
  parameter int N_IN  = 18,
  parameter int DW    = 24,
  parameter int CH_DEPTH = 256,
  parameter int L1A_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // inputs from the trigger modules
  input  logic [N_IN-1:0]             in_valid,
  output logic [N_IN-1:0]             in_ready,
  input  logic [N_IN-1:0]             in_hdr,
  input  logic [DW-1:0]               in_data [N_IN],
  input  logic [N_IN-1:0]             in_par,
  // timing system
  input  logic                        l1a,
  input  logic [23:0]                 l1id,
  input  logic [11:0]                 l1a_bcn,
  input  logic [7:0]                  ttype,
  // configuration
  input  logic [N_IN-1:0]             enable,
  input  logic [2:0]                  nslices,
  input  logic                        zero_sup,
  input  logic [$clog2(CH_DEPTH):0]   busy_thr,
  // output link
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [31:0]                 out_data,
  output logic                        busy,
  output logic                        l1a_overflow
);
  localparam int CW = $clog2(CH_DEPTH);
  localparam int LW = $clog2(L1A_DEPTH);

  // ---------------- input buffers ----------------
  logic [DW+1:0] ch_mem [N_IN][CH_DEPTH];   // {parity, hdr, data}
  logic [CW:0]   ch_cnt [N_IN];
  logic [CW-1:0] ch_rd  [N_IN];
  logic [CW-1:0] ch_wr  [N_IN];
  logic [N_IN-1:0] ch_pop;

  for (genvar i = 0; i < N_IN; i++) begin : g_ch
    assign in_ready[i] = ch_cnt[i] != (CW+1)'(CH_DEPTH);
    always_ff @(posedge clk) if (in_valid[i] && in_ready[i])
      ch_mem[i][ch_wr[i]] <= {in_par[i], in_hdr[i], in_data[i]};
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        ch_cnt[i] <= '0; ch_rd[i] <= '0; ch_wr[i] <= '0;
      end else begin
        if (in_valid[i] && in_ready[i]) ch_wr[i] <= ch_wr[i] + 1'b1;
        if (ch_pop[i]) ch_rd[i] <= ch_rd[i] + 1'b1;
        ch_cnt[i] <= ch_cnt[i] + (CW+1)'(in_valid[i] && in_ready[i]) - (CW+1)'(ch_pop[i]);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) busy <= 1'b0;
    else begin
      logic b;
      b = 1'b0;
      for (int i = 0; i < N_IN; i++) if (ch_cnt[i] > busy_thr) b = 1'b1;
      busy <= b;
    end

  // ---------------- L1A FIFO ----------------
  logic [43:0]   l1_mem [L1A_DEPTH];
  logic [LW:0]   l1_cnt;
  logic [LW-1:0] l1_rd, l1_wr;
  logic          l1_pop;
  logic [23:0]   cur_id;
  logic [11:0]   cur_bcn;
  logic [7:0]    cur_tt;

  assign {cur_id, cur_bcn, cur_tt} = l1_mem[l1_rd];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      l1_cnt <= '0; l1_rd <= '0; l1_wr <= '0; l1a_overflow <= 1'b0;
    end else begin
      if (l1a && l1_cnt != (LW+1)'(L1A_DEPTH)) begin
        l1_mem[l1_wr] <= {l1id, l1a_bcn, ttype};
        l1_wr <= l1_wr + 1'b1;
      end
      if (l1a && l1_cnt == (LW+1)'(L1A_DEPTH)) l1a_overflow <= 1'b1;
      if (l1_pop) l1_rd <= l1_rd + 1'b1;
      l1_cnt <= l1_cnt + (LW+1)'(l1a && l1_cnt != (LW+1)'(L1A_DEPTH)) - (LW+1)'(l1_pop);
    end

  // ---------------- event builder ----------------
  typedef enum logic [3:0] { S_IDLE, S_H0, S_H1, S_H2, S_H3, S_CHHDR, S_DATA, S_T0, S_T1 } rod_state_t;
  rod_state_t  st;
  logic [4:0]  ch;
  logic [2:0]  slice;
  logic [2:0]  err;
  logic [15:0] nwords;

  logic [DW+1:0] head;
  logic          head_par_ok, head_hdr, ch_has;
  logic [DW-1:0] head_data;
  logic          last_ch;

  assign head        = ch_mem[ch][ch_rd[ch]];
  assign head_par_ok = ^head;
  assign head_hdr    = head[DW];
  assign head_data   = head[DW-1:0];
  assign ch_has      = ch_cnt[ch] != '0;
  assign last_ch     = (ch == 5'(N_IN - 1));

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    ch_pop    = '0;
    l1_pop    = 1'b0;
    case (st)
      S_H0: begin out_valid = 1'b1; out_data = 32'hEE1234EE; end
      S_H1: begin out_valid = 1'b1; out_data = {8'd0, cur_id}; end
      S_H2: begin out_valid = 1'b1; out_data = {20'd0, cur_bcn}; end
      S_H3: begin out_valid = 1'b1; out_data = {24'd0, cur_tt}; end
      S_CHHDR: if (enable[ch] && ch_has) ch_pop[ch] = head_hdr;
      S_DATA: if (ch_has && !head_hdr) begin
        if (zero_sup && head_data == '0) ch_pop[ch] = 1'b1;
        else begin
          out_valid = 1'b1;
          out_data  = {ch, slice, 24'(head_data)};
          ch_pop[ch] = out_ready;
        end
      end
      S_T0: begin out_valid = 1'b1; out_data = {29'd0, err}; end
      S_T1: begin out_valid = 1'b1; out_data = {16'd0, nwords}; l1_pop = out_ready; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; ch <= '0; slice <= '0; err <= '0; nwords <= '0;
    end else begin
      case (st)
        S_IDLE: if (l1_cnt != '0) begin
          st <= S_H0; err <= '0; nwords <= '0; ch <= '0;
        end
        S_H0: if (out_ready) st <= S_H1;
        S_H1: if (out_ready) st <= S_H2;
        S_H2: if (out_ready) st <= S_H3;
        S_H3: if (out_ready) st <= S_CHHDR;
        S_CHHDR:
          if (!enable[ch]) begin
            if (last_ch) st <= S_T0;
            ch <= ch + 1'b1;
          end else if (ch_has) begin
            if (!head_hdr) err[2] <= 1'b1;   // data where a header belongs: read it as data
            else begin
              if (!head_par_ok) err[0] <= 1'b1;
              if (head_data[11:0] != cur_bcn) err[1] <= 1'b1;
            end
            slice <= '0;
            st <= (nslices == '0) ? ((last_ch) ? S_T0 : S_CHHDR) : S_DATA;
            if (nslices == '0) ch <= ch + 1'b1;
          end
        S_DATA:
          if (ch_has) begin
            if (head_hdr) begin
              // header of the next event: this input sent too few slices
              err[2] <= 1'b1;
              if (last_ch) st <= S_T0; else st <= S_CHHDR;
              ch <= ch + 1'b1;
            end else if ((zero_sup && head_data == '0) || out_ready) begin
              if (!head_par_ok) err[0] <= 1'b1;
              if (!(zero_sup && head_data == '0)) nwords <= nwords + 1'b1;
              slice <= slice + 1'b1;
              if (slice + 1'b1 == nslices) begin
                if (last_ch) st <= S_T0; else st <= S_CHHDR;
                ch <= ch + 1'b1;
              end
            end
          end
        S_T0: if (out_ready) st <= S_T1;
        S_T1: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end

endmodule
