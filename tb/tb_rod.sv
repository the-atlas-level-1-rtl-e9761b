// tb_rod: the Readout Driver at its default 18 inputs. For every Level-1
// Accept each enabled input sends a header carrying a BCN and nslices
// data words (many of them zero) through valid/ready with random gaps,
// while the output is read with a random ready pattern. The testbench
// builds the expected fragment (header, payload with or without zero
// suppression, status word, word count) and compares it word by word.
// Some events carry a bad parity bit, a wrong BCN or a missing slice, and
// the status word must report each. BUSY is compared every clock with the
// input buffer levels, and a phase with a stalled output makes it rise and
// fall. Finally an L1A burst with no data overflows the L1A FIFO.
module tb_rod;
  localparam int N = 18;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, in_hdr, in_par;
  logic [23:0] in_data [N];
  logic l1a;
  logic [23:0] l1id;
  logic [11:0] l1a_bcn;
  logic [7:0] ttype;
  logic [N-1:0] enable;
  logic [2:0] nslices;
  logic zero_sup;
  logic [8:0] busy_thr;
  logic out_valid, out_ready, busy, l1a_overflow;
  logic [31:0] out_data;
  int checks = 0, failures = 0, n_ev = 0, n_sup = 0, n_busy_rise = 0, n_busy_fall = 0;
  int n_err [3] = '{0, 0, 0};
  bit [25:0] inq [N][$];   // {parity, header flag, data}
  bit [31:0] expq [$];
  bit stall = 0;

  rod dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input streams
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && in_ready[i] && rst_n) void'(inq[i].pop_front());
    end
  end
  always @(negedge clk) begin
    #1;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = (inq[i].size() != 0) && ($urandom % 3 != 0);
      {in_par[i], in_hdr[i], in_data[i]} = (inq[i].size() != 0) ? inq[i][0] : 26'd0;
    end
    out_ready = !stall && ($urandom % 5 != 0);
  end

  // output comparison
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected output %h", out_data);
    end else begin
      bit [31:0] w;
      w = expq.pop_front();
      if (out_data !== w) begin
        failures++;
        if (failures < 8) $display("%t got %h want %h", $time, out_data, w);
      end
    end
  end

  // BUSY against the buffer levels
  bit busy_next = 0, busy_prev = 0;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (busy !== busy_next) begin
      failures++;
      if (failures < 8) $display("%t busy %b want %b", $time, busy, busy_next);
    end
    if (busy && !busy_prev) n_busy_rise++;
    if (!busy && busy_prev) n_busy_fall++;
    busy_prev = busy;
    busy_next = 0;
    for (int i = 0; i < N; i++) if (dut.ch_cnt[i] > busy_thr) busy_next = 1;
  end

  // one event: kind 0 clean, 1 bad parity, 2 wrong BCN, 3 one slice short
  task automatic send_event(input int kind);
    bit [2:0] err;
    int nw, victim;
    bit [11:0] b;
    err = '0; nw = 0;
    victim = $urandom % N;
    while (!enable[victim]) victim = (victim + 1) % N;
    b = 12'($urandom);
    @(negedge clk);
    l1a = 1; l1id = 24'(n_ev); l1a_bcn = b; ttype = 8'($urandom);
    expq.push_back(32'hEE1234EE);
    expq.push_back({8'd0, l1id});
    expq.push_back({20'd0, b});
    expq.push_back({24'd0, ttype});
    for (int i = 0; i < N; i++) if (enable[i]) begin
      bit [23:0] h;
      int ns;
      h = {12'd0, b};
      if (kind == 2 && i == victim) begin h = h ^ 24'h5; err[1] = 1; end
      inq[i].push_back({~(^{1'b1, h}), 1'b1, h});
      ns = (kind == 3 && i == victim) ? nslices - 1 : nslices;
      if (ns < nslices) err[2] = 1;
      for (int s = 0; s < ns; s++) begin
        bit [23:0] d;
        bit p;
        d = ($urandom % 2) ? 24'd0 : 24'($urandom);
        p = ~(^{1'b0, d});
        if (kind == 1 && i == victim && s == ns - 1) begin p = ~p; err[0] = 1; end
        inq[i].push_back({p, 1'b0, d});
        if (zero_sup && d == 0) n_sup++;
        else begin
          expq.push_back({5'(i), 3'(s), d});
          nw++;
        end
      end
    end
    expq.push_back({29'd0, err});
    expq.push_back({16'd0, 16'(nw)});
    for (int k = 0; k < 3; k++) if (err[k]) n_err[k]++;
    n_ev++;
    @(negedge clk);
    l1a = 0;
  endtask

  task automatic drain();
    int t;
    t = 0;
    while ((expq.size() != 0) && t < 20000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("fragment words missing: %0d", expq.size());
    end
  endtask

  initial begin
    in_valid = '0; in_hdr = '0; in_par = '0; foreach (in_data[i]) in_data[i] = '0;
    l1a = 0; l1id = 0; l1a_bcn = 0; ttype = 0; out_ready = 0;
    enable = '1; nslices = 5; zero_sup = 0; busy_thr = 200;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      enable = (run == 0) ? '1 : N'($urandom) | N'(1);
      nslices = 3'(run == 0 ? 5 : 1 + $urandom % 5);
      zero_sup = run % 2;
      for (int e = 0; e < 20; e++) begin
        int kind;
        kind = ($urandom % 4 == 0) ? 1 + $urandom % 3 : 0;
        // a short event must not be the last in the run: its missing slice is
        // only noticed when the next header arrives
        if (e == 19 && kind == 3) kind = 0;
        send_event(kind);
        repeat ($urandom % 60) @(posedge clk);
      end
      drain();
    end
    // BUSY: stall the output while events pile up in the input buffers
    enable = '1; nslices = 5; zero_sup = 0; busy_thr = 20;
    stall = 1;
    for (int e = 0; e < 6; e++) begin
      send_event(0);
      repeat (10) @(posedge clk);
    end
    repeat (50) @(posedge clk);
    stall = 0;
    drain();
    // L1A FIFO overflow
    enable = '0;
    stall = 1;
    for (int e = 0; e < 20; e++) begin
      @(negedge clk); l1a = 1;
      @(negedge clk); l1a = 0;
    end
    checks++;
    if (!l1a_overflow) failures++;
    if (n_ev < 100 || n_sup < 100 || n_busy_rise < 1 || n_busy_fall < 1 ||
        n_err[0] < 3 || n_err[1] < 3 || n_err[2] < 3) failures++;
    $display("events %0d, suppressed words %0d, errors parity/bcn/missing %0d/%0d/%0d, busy rise/fall %0d/%0d, l1a overflow %b",
             n_ev, n_sup, n_err[0], n_err[1], n_err[2], n_busy_rise, n_busy_fall, l1a_overflow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
