// dpa_comm_top: mixed-clock communication architecture with dynamic priority
// adaptation (DPA).
//
// NUM_CC child communication components, each in its own clock domain, each
// own a to-parent FIFO channel (channel 2k, the component writes) and a
// from-parent FIFO channel (channel 2k+1, the component reads). One DMA
// controller, clocked with the parent component, moves data between these
// FIFOs and the parent over the shared bus. Every FIFO reports its status on
// the FIFO information bus (fib); the DPA arbiter computes a priority per FIFO
// from fill count, fill speed and fail count and picks the winner candidate;
// the burst length calculator (blc) sizes the burst for it; the DMA
// controller starts that burst as soon as the current one ends.
//
// Ports: clk / rst_n are the DMA (parent) clock and reset; cc_clk / cc_rst_n
// the components' clocks and resets. Per channel i, cc_req is a component's
// transfer attempt (write of cc_wdata[i] on a to-parent channel, read of
// cc_rdata[i] on a from-parent channel), answered in the same cycle by
// cc_ack (done) or cc_fail (FIFO full / empty). up_* carries words to the
// parent (valid/ready, with the channel number), dn_* takes words from the
// parent (the DMA raises dn_ready with dn_ch; a word moves on dn_valid).
// The remaining outputs expose the arbitration for observation.
// Every channel i has its own FIFO depth CH_DEPTH[i] and sampling period
// CH_S[i]; by default all are 256 words and 32 cycles.
//
// The block structure and the equations follow the source design; the
// channel-to-component mapping, widths and handshakes are this
// implementation's choices (see the module headers).
module dpa_comm_top
  import dpa_pkg::*;
#(
  parameter int unsigned NUM_CC = dpa_pkg::NUM_CC,
  // depth d_i (power of two, at most dpa_pkg::MAX_DEPTH) and sampling
  // period s_i of every FIFO channel
  parameter int unsigned CH_DEPTH [2*NUM_CC] = '{default: dpa_pkg::DEPTH},
  parameter int unsigned CH_S     [2*NUM_CC] = '{default: dpa_pkg::SAMPLE_PERIOD},
  parameter int unsigned DW     = dpa_pkg::DATA_W,
  parameter prio_mode_e  MODE   = PRIO_FULL
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // communication components
  input  logic [NUM_CC-1:0]         cc_clk,
  input  logic [NUM_CC-1:0]         cc_rst_n,
  input  logic [2*NUM_CC-1:0]       cc_req,
  input  logic [DW-1:0]             cc_wdata [2*NUM_CC],
  output logic [DW-1:0]             cc_rdata [2*NUM_CC],
  output logic [2*NUM_CC-1:0]       cc_ack,
  output logic [2*NUM_CC-1:0]       cc_fail,
  // parent communication component
  output logic                      up_valid,
  input  logic                      up_ready,
  output logic [$clog2(2*NUM_CC)-1:0] up_ch,
  output logic [DW-1:0]             up_data,
  output logic                      dn_ready,
  output logic [$clog2(2*NUM_CC)-1:0] dn_ch,
  input  logic                      dn_valid,
  input  logic [DW-1:0]             dn_data,
  // observation
  output logic                      busy,
  output logic [$clog2(2*NUM_CC)-1:0] cur_ch,
  output logic [$clog2(2*NUM_CC)-1:0] cand,
  output logic                      cand_valid,
  output cnt_t                      burst_len,
  output logic                      burst_start,
  output logic                      stall,
  output logic                      underrun,
  output fifo_status_t              fib_status [2*NUM_CC]
);
  localparam int unsigned N = 2 * NUM_CC;
  localparam logic [N-1:0] CH_DIR = {NUM_CC{2'b10}};

  fifo_status_t  st_raw [N];
  fifo_status_t  st_sel;
  prio_t         prio   [N];
  logic [N-1:0]  mask;
  logic [N-1:0]  fifo_empty, fifo_full, fifo_rd, fifo_wr;
  logic [DW-1:0] fifo_rdata [N];
  logic [DW-1:0] fifo_wdata;

  for (genvar i = 0; i < int'(N); i++) begin : g_ch
    dpa_fifo_channel #(
      .DIR   (CH_DIR[i] ? CH_FROM_PARENT : CH_TO_PARENT),
      .DEPTH (CH_DEPTH[i]),
      .S     (CH_S[i]),
      .DW    (DW)
    ) u_ch (
      .cc_clk   (cc_clk[i/2]),
      .cc_rst_n (cc_rst_n[i/2]),
      .cc_req   (cc_req[i]),
      .cc_wdata (cc_wdata[i]),
      .cc_rdata (cc_rdata[i]),
      .cc_ack   (cc_ack[i]),
      .cc_fail  (cc_fail[i]),
      .clk      (clk),
      .rst_n    (rst_n),
      .dma_wr   (fifo_wr[i]),
      .dma_wdata(fifo_wdata),
      .dma_rd   (fifo_rd[i]),
      .dma_rdata(fifo_rdata[i]),
      .dma_empty(fifo_empty[i]),
      .dma_full (fifo_full[i]),
      .status   (st_raw[i])
    );
  end

  fib #(.N(N)) u_fib (
    .clk(clk), .rst_n(rst_n), .st_in(st_raw), .sel(cand),
    .st_all(fib_status), .st_sel(st_sel));

  dpa_arbiter #(.N(N), .MODE(MODE), .S_CH(CH_S), .D_CH(CH_DEPTH)) u_arb (
    .clk(clk), .rst_n(rst_n), .st(fib_status), .mask(mask),
    .prio(prio), .cand(cand), .cand_valid(cand_valid));

  blc #(.N(N), .D_CH(CH_DEPTH)) u_blc (.st(st_sel), .sel(cand), .burst_len(burst_len));

  dma_controller #(.N(N), .DW(DW), .CH_DIR(CH_DIR)) u_dma (
    .clk(clk), .rst_n(rst_n),
    .cand(cand), .cand_valid(cand_valid), .burst_len(burst_len), .mask(mask),
    .fifo_empty(fifo_empty), .fifo_full(fifo_full), .fifo_rdata(fifo_rdata),
    .fifo_rd(fifo_rd), .fifo_wr(fifo_wr), .fifo_wdata(fifo_wdata),
    .up_valid(up_valid), .up_ready(up_ready), .up_ch(up_ch), .up_data(up_data),
    .dn_ready(dn_ready), .dn_ch(dn_ch), .dn_valid(dn_valid), .dn_data(dn_data),
    .busy(busy), .cur_ch(cur_ch), .burst_start(burst_start),
    .stall(stall), .underrun(underrun));

endmodule
