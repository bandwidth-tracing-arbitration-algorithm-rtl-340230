// tb_dpa_fifo_channel: self-checking test of the mixed-clock FIFO channel
// with status reporting, in both directions.
//
// The component clock (7 ns) and the DMA clock (5 ns) are unrelated. A long
// sampling period (S = 64 DMA cycles) lets the test finish each phase between
// sampling points, so that the expected status values are exact:
//   to-parent:   the component writes DEPTH + 5 words into the empty FIFO:
//                DEPTH are acknowledged, 5 fail. The DMA side must then show
//                c = DEPTH and f = 5; after the next sampling point
//                c_last = DEPTH, dc = +DEPTH, f_prev = 5, f = 0. The DMA
//                then reads every word back in order, and after the next
//                sampling point dc = -DEPTH.
//   from-parent: the DMA writes DEPTH words (c, the free count, falls to 0);
//                after the next sampling point dc = -DEPTH; the component
//                then reads DEPTH + 3 times: DEPTH words in order, 3 fails;
//                c returns to DEPTH and the fails show in f, then f_prev.
module tb_dpa_fifo_channel;
  import dpa_pkg::*;

  localparam int unsigned DEPTH = 16;
  localparam int unsigned S     = 64;
  localparam int unsigned DW    = 32;

  logic cc_clk = 0, clk = 0, rst_n = 0;
  always #3.5 cc_clk = ~cc_clk;
  always #2.5 clk    = ~clk;

  int checks = 0, failures = 0;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // to-parent channel
  logic          a_req, a_ack, a_fail, a_rd, a_empty, a_full;
  logic [DW-1:0] a_wdata, a_rdata, a_ccr;
  fifo_status_t  a_st;
  dpa_fifo_channel #(.DIR(CH_TO_PARENT), .DEPTH(DEPTH), .S(S), .DW(DW)) dut_a (
    .cc_clk(cc_clk), .cc_rst_n(rst_n), .cc_req(a_req), .cc_wdata(a_wdata),
    .cc_rdata(a_ccr), .cc_ack(a_ack), .cc_fail(a_fail),
    .clk(clk), .rst_n(rst_n), .dma_wr(1'b0), .dma_wdata('0), .dma_rd(a_rd),
    .dma_rdata(a_rdata), .dma_empty(a_empty), .dma_full(a_full), .status(a_st));

  // from-parent channel
  logic          b_req, b_ack, b_fail, b_wr, b_empty, b_full;
  logic [DW-1:0] b_wdata, b_ccr, b_rdata;
  fifo_status_t  b_st;
  dpa_fifo_channel #(.DIR(CH_FROM_PARENT), .DEPTH(DEPTH), .S(S), .DW(DW)) dut_b (
    .cc_clk(cc_clk), .cc_rst_n(rst_n), .cc_req(b_req), .cc_wdata('0),
    .cc_rdata(b_ccr), .cc_ack(b_ack), .cc_fail(b_fail),
    .clk(clk), .rst_n(rst_n), .dma_wr(b_wr), .dma_wdata(b_wdata), .dma_rd(1'b0),
    .dma_rdata(b_rdata), .dma_empty(b_empty), .dma_full(b_full), .status(b_st));

  // wait for the next sampling point of a channel: c_last or f_prev change
  // is not guaranteed, so count DMA cycles from reset instead
  longint dma_cycle = 0;
  always @(posedge clk) if (rst_n) dma_cycle++;
  task automatic to_after_sample();
    // sampling points are the DMA cycles S-1, 2S-1, ... after reset
    while ((dma_cycle % S) != 0) @(posedge clk);
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acks, fails;
    a_req = 0; a_wdata = '0; a_rd = 0;
    b_req = 0; b_wr = 0; b_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // ---------------- to-parent ----------------
    to_after_sample();
    acks = 0; fails = 0;
    for (int i = 0; i < int'(DEPTH) + 5; i++) begin
      @(negedge cc_clk);
      a_req = 1; a_wdata = 32'hA000 + i;
      #0.1;
      if (a_ack) acks++;
      if (a_fail) fails++;
      @(posedge cc_clk); #0.1;
      a_req = 0;
    end
    expect_eq("to-parent acks", acks, DEPTH);
    expect_eq("to-parent fails", fails, 5);
    repeat (6) @(posedge clk); #1;
    expect_eq("to-parent c", a_st.c, DEPTH);
    expect_eq("to-parent f", a_st.f, 5);
    expect_eq("to-parent empty", a_empty, 0);
    to_after_sample();
    expect_eq("to-parent c_last", a_st.c_last, DEPTH);
    expect_eq("to-parent dc", a_st.dc, DEPTH);
    expect_eq("to-parent f_prev", a_st.f_prev, 5);
    expect_eq("to-parent f reset", a_st.f, 0);
    // DMA drains in order
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      expect_eq("to-parent empty during drain", a_empty, 0);
      expect_eq("to-parent data", a_rdata, 32'hA000 + i);
      expect_eq("to-parent c during drain", a_st.c, DEPTH - i);
      a_rd = 1;
      @(posedge clk); #0.1;
      a_rd = 0;
    end
    #1;
    expect_eq("to-parent empty after drain", a_empty, 1);
    expect_eq("to-parent c after drain", a_st.c, 0);
    to_after_sample();
    expect_eq("to-parent dc after drain", a_st.dc, -DEPTH);
    expect_eq("to-parent f_prev after drain", a_st.f_prev, 0);

    // ---------------- from-parent ----------------
    to_after_sample();
    expect_eq("from-parent free at start", b_st.c, DEPTH);
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      expect_eq("from-parent full while filling", b_full, 0);
      b_wr = 1; b_wdata = 32'hB000 + i;
      @(posedge clk); #0.1;
      b_wr = 0;
    end
    #1;
    expect_eq("from-parent full", b_full, 1);
    expect_eq("from-parent free", b_st.c, 0);
    to_after_sample();
    expect_eq("from-parent dc after fill", b_st.dc, -DEPTH);
    expect_eq("from-parent c_last after fill", b_st.c_last, 0);
    expect_eq("from-parent f before reads", b_st.f, 0);
    acks = 0; fails = 0;
    for (int i = 0; i < int'(DEPTH) + 3; i++) begin
      @(negedge cc_clk);
      b_req = 1;
      #0.1;
      if (b_ack) begin
        expect_eq("from-parent data", b_ccr, 32'hB000 + acks);
        acks++;
      end
      if (b_fail) fails++;
      @(posedge cc_clk); #0.1;
      b_req = 0;
    end
    expect_eq("from-parent acks", acks, DEPTH);
    expect_eq("from-parent fails", fails, 3);
    repeat (6) @(posedge clk); #1;
    expect_eq("from-parent free after reads", b_st.c, DEPTH);
    expect_eq("from-parent f", b_st.f, 3);
    to_after_sample();
    expect_eq("from-parent f_prev", b_st.f_prev, 3);
    expect_eq("from-parent c_last", b_st.c_last, DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
