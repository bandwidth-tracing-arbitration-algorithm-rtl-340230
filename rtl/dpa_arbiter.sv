// dpa_arbiter: dynamic priority adaptation arbiter.
//
// Every cycle it computes the priority of every FIFO channel from the FIFO
// information bus (one dpa_priority unit per channel), and registers as the
// winner candidate the eligible channel with the largest priority. A channel
// is eligible when its urgency count c is non-zero (there is something the
// DMA can move) and it is not masked; the DMA controller masks the channel it
// is serving so that the candidate for the next transfer is chosen while the
// current one runs. Ties go to the lowest channel index.
//
// Each channel has its own sampling period and depth (S_CH[i], D_CH[i]),
// as the priority equation is written per FIFO.
// Timing: cand / cand_valid are registered, one cycle after st. prio shows
// the priorities of the current cycle.
// The priority equations follow the source design; the eligibility rule, the
// mask and the tie-break are this implementation's choices.
module dpa_arbiter
  import dpa_pkg::*;
#(
  parameter int unsigned N       = dpa_pkg::NUM_CH,
  parameter prio_mode_e  MODE    = PRIO_FULL,
  parameter int unsigned S_CH [N] = '{default: dpa_pkg::SAMPLE_PERIOD},
  parameter int unsigned D_CH [N] = '{default: dpa_pkg::DEPTH}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  fifo_status_t         st   [N],
  input  logic [N-1:0]         mask,
  output prio_t                prio [N],
  output logic [$clog2(N)-1:0] cand,
  output logic                 cand_valid
);
  localparam int unsigned IW = $clog2(N);

  for (genvar i = 0; i < int'(N); i++) begin : g_prio
    dpa_priority #(.MODE(MODE), .S(S_CH[i]), .D(D_CH[i])) u_prio (.st(st[i]), .p(prio[i]));
  end

  logic [IW-1:0] best_idx;
  logic          best_vld;
  prio_t         best_p;

  always_comb begin
    best_idx = '0;
    best_vld = 1'b0;
    best_p   = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (st[i].c != '0 && !mask[i] && (!best_vld || prio[i] > best_p)) begin
        best_idx = IW'(i);
        best_vld = 1'b1;
        best_p   = prio[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand       <= '0;
      cand_valid <= 1'b0;
    end else begin
      cand       <= best_idx;
      cand_valid <= best_vld;
    end
  end
endmodule
