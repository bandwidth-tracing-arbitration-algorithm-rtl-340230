// dma_controller: moves bursts between the FIFO channels and the parent
// communication component over the shared bus.
//
// When idle, or in the cycle its current burst ends, it takes the DPA
// arbiter's winner candidate (cand, cand_valid) as the new current channel
// with the burst length from the burst length calculator (burst_len), so a
// new transfer starts in the cycle after the previous one ends, with no
// arbitration gap. While a burst runs it masks its channel from the arbiter,
// so the next candidate is computed in parallel with the transfer.
//
// Beats (one word per cycle at most):
//   to-parent channel:   pops the FIFO and offers {up_ch, up_data} with
//                        up_valid; a beat happens on up_valid && up_ready.
//   from-parent channel: raises dn_ready with dn_ch; a beat happens on
//                        dn_valid && dn_ready and dn_data is pushed.
// The parent not being ready stalls the burst (stall pulses). If the FIFO
// runs empty (to-parent) or full (from-parent) during a burst, the burst
// ends early (underrun pulses): the FIFO's reported count lags the DMA's own
// pops by a few cycles, so a stale length is cut short rather than waited on.
// Taking the candidate when the previous transfer is finished follows the
// source design; the parent port handshake, the early end and the mask are
// this implementation's choices.
module dma_controller
  import dpa_pkg::*;
#(
  parameter int unsigned N      = dpa_pkg::NUM_CH,
  parameter int unsigned DW     = dpa_pkg::DATA_W,
  parameter logic [N-1:0] CH_DIR = {(N / 2){2'b10}}  // 1: from-parent channel
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the DPA arbiter and the BLC
  input  logic [$clog2(N)-1:0] cand,
  input  logic                 cand_valid,
  input  cnt_t                 burst_len,
  output logic [N-1:0]         mask,
  // shared bus to the FIFO channels
  input  logic [N-1:0]         fifo_empty,
  input  logic [N-1:0]         fifo_full,
  input  logic [DW-1:0]        fifo_rdata [N],
  output logic [N-1:0]         fifo_rd,
  output logic [N-1:0]         fifo_wr,
  output logic [DW-1:0]        fifo_wdata,
  // parent communication component
  output logic                 up_valid,
  input  logic                 up_ready,
  output logic [$clog2(N)-1:0] up_ch,
  output logic [DW-1:0]        up_data,
  output logic                 dn_ready,
  output logic [$clog2(N)-1:0] dn_ch,
  input  logic                 dn_valid,
  input  logic [DW-1:0]        dn_data,
  // state and events
  output logic                 busy,
  output logic [$clog2(N)-1:0] cur_ch,
  output logic                 burst_start,
  output logic                 stall,
  output logic                 underrun
);

  cnt_t remain;
  logic dir_from;   // current channel is from-parent
  logic beat, last_beat, cut, done, take;

  assign dir_from = CH_DIR[cur_ch];

  // shared bus
  assign up_ch    = cur_ch;
  assign dn_ch    = cur_ch;
  assign up_data  = fifo_rdata[cur_ch];
  assign up_valid = busy && !dir_from && !fifo_empty[cur_ch];
  assign dn_ready = busy &&  dir_from && !fifo_full[cur_ch];
  assign fifo_wdata = dn_data;

  always_comb begin
    fifo_rd = '0;
    fifo_wr = '0;
    fifo_rd[cur_ch] = up_valid && up_ready;
    fifo_wr[cur_ch] = dn_ready && dn_valid;
  end

  assign beat      = (up_valid && up_ready) || (dn_ready && dn_valid);
  assign last_beat = beat && (remain == cnt_t'(1));
  assign cut       = busy && (dir_from ? fifo_full[cur_ch] : fifo_empty[cur_ch]);
  assign done      = last_beat || cut;
  assign take      = (!busy || done) && cand_valid && (burst_len != '0);

  assign stall       = busy && !beat && !cut;
  assign underrun    = cut;
  assign burst_start = take;

  always_comb begin
    mask = '0;
    mask[cur_ch] = busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cur_ch <= '0;
      remain <= '0;
    end else if (take) begin
      busy   <= 1'b1;
      cur_ch <= cand;
      remain <= burst_len;
    end else if (done) begin
      busy   <= 1'b0;
    end else if (beat) begin
      remain <= remain - 1'b1;
    end
  end

  // shared bus rules
  a_no_pop_empty:  assert property (@(posedge clk) disable iff (!rst_n)
                     (fifo_rd & fifo_empty) == '0);
  a_no_push_full:  assert property (@(posedge clk) disable iff (!rst_n)
                     (fifo_wr & fifo_full) == '0);
  a_one_hot:       assert property (@(posedge clk) disable iff (!rst_n)
                     $onehot0(fifo_rd | fifo_wr));
  a_cand_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                     cand_valid |-> (int'(cand) < int'(N)));
endmodule
