// tb_dma_controller: self-checking test of the DMA controller.
//
// The FIFO channels are modelled here as word counters: channel i returns
// the word {i, sequence number} and is empty at count 0 (to-parent channels,
// even numbers) or full at CAP (from-parent channels, odd numbers). The test
// plays the arbiter and the burst length calculator. Checked:
//   - a burst moves exactly burst_len words, in order, on the right channel;
//   - the next candidate starts in the cycle right after the last beat;
//   - the served channel is masked while its burst runs;
//   - a parent that is not ready stalls the burst without losing words;
//   - a burst longer than the FIFO content ends early at empty;
//   - from-parent bursts push dn_data into the right FIFO;
//   - with no candidate the controller goes idle.
module tb_dma_controller;
  import dpa_pkg::*;

  localparam int unsigned N   = dpa_pkg::NUM_CH;
  localparam int unsigned DW  = dpa_pkg::DATA_W;
  localparam int unsigned IW  = $clog2(N);
  localparam int          CAP = 64;

  logic           clk = 0, rst_n = 0;
  logic [IW-1:0]  cand;
  logic           cand_valid;
  cnt_t           burst_len;
  logic [N-1:0]   mask, fifo_empty, fifo_full, fifo_rd, fifo_wr;
  logic [DW-1:0]  fifo_rdata [N];
  logic [DW-1:0]  fifo_wdata;
  logic           up_valid, up_ready, dn_ready, dn_valid;
  logic [IW-1:0]  up_ch, dn_ch, cur_ch;
  logic [DW-1:0]  up_data, dn_data;
  logic           busy, burst_start, stall, underrun;

  dma_controller #(.N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  int cnt [N];     // words in each modelled FIFO
  int seq [N];     // next sequence number popped / pushed
  int checks = 0, failures = 0;
  int cycle = 0;
  int beats = 0, last_beat_cycle = -1, first_beat_cycle = -1;
  int n_stall = 0, n_under = 0, n_start = 0;
  int dn_word = 0;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      fifo_empty[i] = (cnt[i] == 0);
      fifo_full[i]  = (i % 2 == 1) && (cnt[i] == CAP);
      fifo_rdata[i] = DW'((i << 16) | seq[i]);
    end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  // FIFO and parent model plus monitor
  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (busy) begin
      checks++;
      if (mask != (N'(1) << cur_ch)) begin failures++; $display("FAIL mask"); end
    end
    if (stall) n_stall++;
    if (underrun) n_under++;
    if (burst_start) n_start++;
    for (int i = 0; i < int'(N); i++) begin
      if (fifo_rd[i]) begin
        checks++;
        if (!(up_valid && up_ready && int'(up_ch) == i && up_data == DW'((i << 16) | seq[i]))) begin
          failures++;
          $display("FAIL pop ch %0d", i);
        end
        cnt[i] <= cnt[i] - 1;
        seq[i] <= seq[i] + 1;
      end
      if (fifo_wr[i]) begin
        checks++;
        if (!(int'(dn_ch) == i && fifo_wdata == dn_data && dn_data == DW'(32'hD000 + dn_word))) begin
          failures++;
          $display("FAIL push ch %0d", i);
        end
        cnt[i] <= cnt[i] + 1;
      end
    end
    if (fifo_rd != '0 || fifo_wr != '0) begin
      beats <= beats + 1;
      if (first_beat_cycle < 0) first_beat_cycle <= cycle;
      last_beat_cycle <= cycle;
    end
    if (fifo_wr != '0) dn_word <= dn_word + 1;
  end
  assign dn_data = DW'(32'hD000 + dn_word);

  // offer a candidate until the controller takes it
  task automatic offer(int ch, int len);
    @(negedge clk);
    cand = IW'(ch); cand_valid = 1; burst_len = cnt_t'(len);
    do @(posedge clk); while (!burst_start);
    #1;
    @(negedge clk);
    cand_valid = 0;
  endtask

  task automatic wait_idle();
    do @(posedge clk); while (busy);
    #1;
  endtask

  task automatic clear_stats();
    @(negedge clk);
    beats = 0; first_beat_cycle = -1; last_beat_cycle = -1;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, end1, start2;
    for (int i = 0; i < int'(N); i++) begin cnt[i] = 0; seq[i] = 0; end
    cand = '0; cand_valid = 0; burst_len = '0; up_ready = 1; dn_valid = 1;
    cnt[0] = 20; cnt[2] = 10; cnt[4] = 2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    expect_eq("idle after reset", busy, 0);

    // 1. burst of 4 on channel 0, then 3 on channel 2 handed over at once
    clear_stats();
    @(negedge clk);
    cand = 0; cand_valid = 1; burst_len = 4;
    @(posedge clk); #1;
    expect_eq("busy on ch0", busy, 1);
    expect_eq("cur_ch 0", cur_ch, 0);
    @(negedge clk);
    cand = 2; burst_len = 3;          // next candidate waits during the burst
    do @(posedge clk); while (!(busy && cur_ch == 2));
    #1;
    end1 = last_beat_cycle;
    @(negedge clk);
    cand_valid = 0;
    wait_idle();
    expect_eq("beats 4+3", beats, 7);
    expect_eq("ch0 words moved", seq[0], 4);
    expect_eq("ch2 words moved", seq[2], 3);
    expect_eq("no gap between bursts (7 beats in 7 cycles)", last_beat_cycle - first_beat_cycle + 1, 7);

    // 2. stalls: parent ready every other cycle, burst of 6 on channel 0
    clear_stats();
    s0 = n_stall;
    fork
      begin
        for (int k = 0; k < 30; k++) begin @(negedge clk); up_ready = k[0]; end
        @(negedge clk); up_ready = 1;
      end
      offer(0, 6);
    join_any
    wait_idle();
    wait fork;
    expect_eq("beats under stall", beats, 6);
    expect_eq("ch0 words after stall burst", seq[0], 10);
    checks++; if (n_stall == s0) begin failures++; $display("FAIL no stall seen"); end

    // 3. early end: channel 4 holds 2 words, burst of 5 asked
    clear_stats();
    s0 = n_under;
    offer(4, 5);
    wait_idle();
    expect_eq("beats before underrun", beats, 2);
    expect_eq("underrun events", n_under - s0, 1);

    // 4. from-parent burst of 6 on channel 3 (empty, so 64 free cells)
    clear_stats();
    offer(3, 6);
    wait_idle();
    expect_eq("from-parent beats", beats, 6);
    expect_eq("channel 3 filled", cnt[3], 6);

    // 5. from-parent burst cut at full: channel 5 holds CAP-2
    clear_stats();
    @(negedge clk); cnt[5] = CAP - 2;
    offer(5, 9);
    wait_idle();
    expect_eq("from-parent beats before full", beats, 2);

    // 6. a zero-length candidate is not taken
    @(negedge clk);
    cand = 0; cand_valid = 1; burst_len = 0;
    repeat (3) @(posedge clk); #1;
    expect_eq("zero length not taken", busy, 0);
    @(negedge clk); cand_valid = 0;

    expect_eq("burst starts", n_start, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
