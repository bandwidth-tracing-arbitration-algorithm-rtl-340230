// tb_dpa_comm_top: end-to-end test of the DPA communication architecture at
// its default size (4 components, 8 FIFO channels of 256 words, sampling
// period 32, DMA clock 132 MHz, i.e. 528 Mbyte/s with 32-bit words).
//
// Four component models, each on its own clock (5, 9, 11 and 13 ns), write
// numbered words into their to-parent FIFO and read from their from-parent
// FIFO at random. The parent model accepts words and supplies numbered words.
// Every word is checked for channel and order at the far end, and at the end
// every word sent must have arrived.
//
// Phases: (1) moderate load; (2) the parent stops for 3000 cycles, so the
// to-parent FIFOs fill and the from-parent FIFOs drain and the components
// fail; (3) the parent returns, the backlog saturates the DMA, whose
// throughput is checked (at most one word per DMA cycle, and above 90 % of
// that while the backlog lasts); (1) again; (4) the components stop: the
// to-parent FIFOs drain completely and the from-parent FIFOs fill up.
// Each mechanism must be seen at least once: burst starts, back-to-back
// hand-over, parent stalls, early burst ends, component fails in both
// directions, fail counts and positive and negative fill changes on the
// information bus, a shortened burst (b < c), and a winner other than the
// one the largest fill count alone would pick (lowest index on a tie).
module tb_dpa_comm_top;
  import dpa_pkg::*;

  localparam int unsigned NCC = dpa_pkg::NUM_CC;
  localparam int unsigned N   = 2 * NCC;
  localparam int unsigned DW  = dpa_pkg::DATA_W;
  localparam int unsigned IW  = $clog2(N);

  logic              clk = 0, rst_n = 0;
  logic [NCC-1:0]    cc_clk = '0;
  logic [NCC-1:0]    cc_rst_n;
  logic [N-1:0]      cc_req, cc_ack, cc_fail;
  logic [DW-1:0]     cc_wdata [N], cc_rdata [N];
  logic              up_valid, up_ready, dn_ready, dn_valid;
  logic [IW-1:0]     up_ch, dn_ch, cur_ch, cand;
  logic [DW-1:0]     up_data, dn_data;
  logic              busy, cand_valid, burst_start, stall, underrun;
  cnt_t              burst_len;
  fifo_status_t      fib_status [N];

  dpa_comm_top dut (.*);

  always #3.788 clk = ~clk;               // 132 MHz
  always #2.5   cc_clk[0] = ~cc_clk[0];
  always #4.5   cc_clk[1] = ~cc_clk[1];
  always #5.5   cc_clk[2] = ~cc_clk[2];
  always #6.5   cc_clk[3] = ~cc_clk[3];
  assign cc_rst_n = {NCC{rst_n}};

  int checks = 0, failures = 0;
  int phase = 0;
  int cyc = 0;

  // traffic intensity per component, in 1/256 per component cycle
  int wr_rate [NCC], rd_rate [NCC];
  int sent [N], got [N];         // words per channel, producer / consumer

  // ---------------- component models ----------------
  for (genvar k = 0; k < int'(NCC); k++) begin : g_cc
    localparam int TP = 2 * k, FP = 2 * k + 1;
    always @(negedge cc_clk[k]) begin
      cc_req[TP]   <= (phase < 4) && ($urandom_range(255) < wr_rate[k]);
      cc_wdata[TP] <= DW'((TP << 24) | sent[TP]);
      cc_req[FP]   <= (phase < 4) && ($urandom_range(255) < rd_rate[k]);
    end
    always @(posedge cc_clk[k]) if (rst_n) begin
      if (cc_req[TP] && cc_ack[TP]) sent[TP]++;
      if (cc_req[FP] && cc_ack[FP]) begin
        checks++;
        if (cc_rdata[FP] != DW'((FP << 24) | got[FP])) begin
          failures++;
          if (failures < 10) $display("FAIL component %0d read %h", k, cc_rdata[FP]);
        end
        got[FP]++;
      end
    end
  end

  // ---------------- parent model ----------------
  assign dn_data = DW'((int'(dn_ch) << 24) | sent[dn_ch]);
  always @(negedge clk) begin
    up_ready <= (phase != 2) && ($urandom_range(15) != 0);
    dn_valid <= (phase != 2) && ($urandom_range(15) != 0);
  end

  // ---------------- monitor ----------------
  int n_start = 0, n_handover = 0, n_stall = 0, n_under = 0;
  int n_fail_to = 0, n_fail_from = 0, n_f_on_fib = 0, n_dc_pos = 0, n_dc_neg = 0;
  int n_short = 0, n_not_fullest = 0;
  int beats = 0, sat_beats = 0, sat_cycles = 0;
  logic [N-1:0] prev_mask;
  fifo_status_t prev_st [N];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (burst_start) n_start++;
    if (burst_start && busy) n_handover++;
    if (stall) n_stall++;
    if (underrun) n_under++;
    for (int i = 0; i < int'(N); i++) begin
      if (fib_status[i].f != 0) n_f_on_fib++;
      if (fib_status[i].dc > 0) n_dc_pos++;
      if (fib_status[i].dc < 0) n_dc_neg++;
    end
    if (burst_start && burst_len < fib_status[cand].c && burst_len > 1) n_short++;
    // was the registered candidate the fullest eligible channel last cycle?
    if (cand_valid) begin
      int best; best = -1;
      for (int i = 0; i < int'(N); i++)
        if (!prev_mask[i] && prev_st[i].c != 0 && (best < 0 || prev_st[i].c > prev_st[best].c)) best = i;
      if (best >= 0 && int'(cand) != best) n_not_fullest++;
    end
    prev_mask = busy ? (N'(1) << cur_ch) : '0;
    for (int i = 0; i < int'(N); i++) prev_st[i] = fib_status[i];
    // words to the parent
    if (up_valid && up_ready) begin
      beats++;
      checks++;
      if (up_data != DW'((int'(up_ch) << 24) | got[up_ch]) || up_ch[0] != 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL parent got %h on channel %0d", up_data, up_ch);
      end
      got[up_ch]++;
    end
    if (dn_valid && dn_ready) begin
      beats++;
      checks++;
      if (dn_ch[0] != 1'b1) begin failures++; $display("FAIL dn on to-parent channel"); end
      sent[dn_ch]++;
    end
    if (phase == 3) begin
      sat_cycles++;
      if ((up_valid && up_ready) || (dn_valid && dn_ready)) sat_beats++;
    end
    checks++;
    if ((up_valid && up_ready) && (dn_valid && dn_ready)) begin
      failures++;
      $display("FAIL two words in one DMA cycle");
    end
  end

  always @(posedge clk) begin
    n_fail_to   <= n_fail_to   + $countones(cc_fail & {NCC{2'b01}});
    n_fail_from <= n_fail_from + $countones(cc_fail & {NCC{2'b10}});
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int backlog;
    for (int i = 0; i < int'(N); i++) begin
      sent[i] = 0; got[i] = 0; cc_req[i] = 0; cc_wdata[i] = '0;
      prev_st[i] = '0;
    end
    prev_mask = '0;
    // component k: write and read probabilities per own cycle
    wr_rate = '{40, 50, 70, 60};
    rd_rate = '{30, 40, 50, 70};
    repeat (4) @(posedge clk);
    rst_n = 1;

    phase = 1; repeat (6000) @(posedge clk);
    phase = 2; repeat (3000) @(posedge clk);
    // backlog left when the parent returns
    backlog = 0;
    for (int i = 0; i < int'(N); i += 2) backlog += sent[i] - got[i];
    phase = 3; repeat (800) @(posedge clk);
    phase = 1; repeat (4000) @(posedge clk);
    // components stop: the to-parent FIFOs drain, the from-parent FIFOs
    // fill up (their bursts end early at full)
    phase = 4;
    repeat (6000) @(posedge clk);
    for (int i = 0; i < int'(N); i++) begin
      // words still held in a from-parent FIFO: depth minus free cells
      int held;
      held = (i % 2 == 1) ? int'(dpa_pkg::DEPTH) - int'(fib_status[i].c) : 0;
      checks++;
      if (sent[i] != got[i] + held) begin
        failures++;
        $display("FAIL channel %0d: %0d words sent, %0d arrived, %0d held", i, sent[i], got[i], held);
      end
      if (i % 2 == 1) begin
        checks++;
        if (held != int'(dpa_pkg::DEPTH)) begin
          failures++;
          $display("FAIL from-parent channel %0d not filled: %0d", i, held);
        end
      end
    end
    checks++;
    if (beats > cyc) begin failures++; $display("FAIL more words than DMA cycles"); end
    checks++;
    if (backlog < 800 || sat_beats * 10 < sat_cycles * 9) begin
      failures++;
      $display("FAIL saturated throughput %0d words in %0d cycles (backlog %0d)",
               sat_beats, sat_cycles, backlog);
    end
    need("burst start", n_start);
    need("back-to-back hand-over", n_handover);
    need("parent stall", n_stall);
    need("early burst end", n_under);
    need("component fail on full FIFO", n_fail_to);
    need("component fail on empty FIFO", n_fail_from);
    need("fail count on FIB", n_f_on_fib);
    need("rising fill", n_dc_pos);
    need("falling fill", n_dc_neg);
    need("burst shorter than content", n_short);
    need("winner other than fullest", n_not_fullest);
    $display("bursts %0d hand-overs %0d stalls %0d early-ends %0d fails to/from %0d/%0d short %0d not-fullest %0d",
             n_start, n_handover, n_stall, n_under, n_fail_to, n_fail_from, n_short, n_not_fullest);
    $display("words moved %0d in %0d DMA cycles; saturated %0d/%0d",
             beats, cyc, sat_beats, sat_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
