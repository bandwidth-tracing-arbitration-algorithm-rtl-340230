// dpa_fifo_channel: one mixed-clock FIFO channel of the DPA communication
// architecture, with the extra status outputs the DPA arbiter needs.
//
// A channel joins a child communication component (own clock cc_clk) to the
// DMA controller (clk). DIR = CH_TO_PARENT: the component writes, the DMA
// reads. DIR = CH_FROM_PARENT: the DMA writes, the component reads.
//
// Component side: cc_req is a transfer attempt (a write of cc_wdata, or a
// read returning cc_rdata in the same cycle). cc_ack means it succeeded;
// cc_fail means the FIFO was full (write) or empty (read) and nothing
// happened. Fail events are counted by a free-running counter that crosses to
// the DMA clock in Gray code.
//
// DMA side: dma_wr / dma_rd move one word, first-word fall-through. The
// status record (dpa_pkg::fifo_status_t), in the DMA clock domain, holds
//   c      the urgency count: filled cells for a to-parent channel, free cells
//          for a from-parent channel (the number of cells the DMA can move);
//   c_last c at the latest sampling point; sampling points are every S cycles;
//   dc     c(latest sampling point) - c(sampling point before); the fill
//          speed times the sampling period, held between sampling points;
//   f      component fails since the latest sampling point (reset there);
//   f_prev component fails during the last complete sampling period.
// The definitions of c, v = dc/s and f, and their reset at each sampling
// point, follow the source design; using free cells as c for a from-parent
// channel (where the component fails on empty rather than full) is this
// implementation's choice. The record is combinational from registers.
// Inputs that belong to the other direction (dma_wr and dma_wdata on a
// to-parent channel, dma_rd and cc_wdata on a from-parent channel) are
// ignored, and the matching outputs are held at constant values.
module dpa_fifo_channel
  import dpa_pkg::*;
#(
  parameter ch_dir_e     DIR   = CH_TO_PARENT,
  parameter int unsigned DEPTH = dpa_pkg::DEPTH,
  parameter int unsigned S     = dpa_pkg::SAMPLE_PERIOD,
  parameter int unsigned DW    = dpa_pkg::DATA_W
) (
  // communication component side
  input  logic          cc_clk,
  input  logic          cc_rst_n,
  input  logic          cc_req,
  input  logic [DW-1:0] cc_wdata,
  output logic [DW-1:0] cc_rdata,
  output logic          cc_ack,
  output logic          cc_fail,
  // DMA side
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dma_wr,
  input  logic [DW-1:0] dma_wdata,
  input  logic          dma_rd,
  output logic [DW-1:0] dma_rdata,
  output logic          dma_empty,
  output logic          dma_full,
  output fifo_status_t  status
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1;

  initial begin
    assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");
    assert (DEPTH <= MAX_DEPTH) else $error("DEPTH above dpa_pkg::MAX_DEPTH");
  end

  logic [AW:0] wr_count, rd_count;
  logic        full, empty;
  logic        cc_full_or_empty;
  cnt_t        c_now;

  if (DIR == CH_TO_PARENT) begin : g_to_parent
    async_fifo #(.DW(DW), .AW(AW)) u_fifo (
      .wclk(cc_clk), .wrst_n(cc_rst_n), .wr_en(cc_req), .wdata(cc_wdata),
      .full(full), .wr_count(wr_count),
      .rclk(clk), .rrst_n(rst_n), .rd_en(dma_rd), .rdata(dma_rdata),
      .empty(empty), .rd_count(rd_count));
    assign cc_full_or_empty = full;
    assign cc_rdata  = '0;
    assign dma_empty = empty;
    assign dma_full  = 1'b0;
    assign c_now     = cnt_t'(rd_count);
  end else begin : g_from_parent
    async_fifo #(.DW(DW), .AW(AW)) u_fifo (
      .wclk(clk), .wrst_n(rst_n), .wr_en(dma_wr), .wdata(dma_wdata),
      .full(full), .wr_count(wr_count),
      .rclk(cc_clk), .rrst_n(cc_rst_n), .rd_en(cc_req), .rdata(cc_rdata),
      .empty(empty), .rd_count(rd_count));
    assign cc_full_or_empty = empty;
    assign dma_rdata = '0;
    assign dma_empty = 1'b1;
    assign dma_full  = full;
    assign c_now     = cnt_t'(DEPTH) - cnt_t'(wr_count);
  end

  assign cc_ack  = cc_req && !cc_full_or_empty;
  assign cc_fail = cc_req &&  cc_full_or_empty;

  // ---------------- fail counter, component clock ----------------
  logic [FAIL_CNT_W-1:0] fail_bin, fail_gray, fail_gray_s, fail_bin_s;

  always_ff @(posedge cc_clk or negedge cc_rst_n) begin
    if (!cc_rst_n) begin
      fail_bin  <= '0;
      fail_gray <= '0;
    end else if (cc_fail) begin
      fail_bin  <= fail_bin + 1'b1;
      fail_gray <= (fail_bin + 1'b1) ^ ((fail_bin + 1'b1) >> 1);
    end
  end

  sync_2ff #(.W(FAIL_CNT_W)) u_sync_fail (
    .clk(clk), .rst_n(rst_n), .d(fail_gray), .q(fail_gray_s));

  always_comb begin
    fail_bin_s[FAIL_CNT_W-1] = fail_gray_s[FAIL_CNT_W-1];
    for (int i = FAIL_CNT_W - 2; i >= 0; i--)
      fail_bin_s[i] = fail_bin_s[i+1] ^ fail_gray_s[i];
  end

  // ---------------- status sampling, DMA clock ----------------
  logic [SW-1:0]         smp_cnt;
  logic                  smp_point;
  logic [FAIL_CNT_W-1:0] fail_snap;
  logic [FAIL_CNT_W-1:0] f_diff;
  fail_t                 f_run;
  cnt_t                  c_last;
  dcnt_t                 dc;
  fail_t                 f_prev;

  assign smp_point = (smp_cnt == SW'(S - 1));
  assign f_diff    = fail_bin_s - fail_snap;
  assign f_run     = (f_diff > FAIL_CNT_W'({FAIL_W{1'b1}})) ? {FAIL_W{1'b1}} : fail_t'(f_diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_cnt   <= '0;
      fail_snap <= '0;
      c_last    <= '0;
      dc        <= '0;
      f_prev    <= '0;
    end else begin
      smp_cnt <= smp_point ? '0 : smp_cnt + 1'b1;
      if (smp_point) begin
        c_last    <= c_now;
        dc        <= dcnt_t'({1'b0, c_now}) - dcnt_t'({1'b0, c_last});
        f_prev    <= f_run;
        fail_snap <= fail_bin_s;
      end
    end
  end

  assign status.c      = c_now;
  assign status.c_last = c_last;
  assign status.dc     = dc;
  assign status.f      = f_run;
  assign status.f_prev = f_prev;

endmodule
