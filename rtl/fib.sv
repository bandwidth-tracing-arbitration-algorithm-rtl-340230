// fib: FIFO information bus.
//
// Collects the status record of every FIFO channel once per DMA clock cycle
// into a register stage (the arbiter sees every FIFO's status each cycle) and
// hands the DPA arbiter the whole set. It also puts the record of the channel
// the arbiter has selected as winner candidate (sel) on a second output for
// the burst length calculator.
//
// Timing: st_all is the channel status of the previous cycle; st_sel is
// st_all[sel] combinationally. The source design gives the bus and what it
// carries; sampling all channels in parallel each cycle is this
// implementation's reading of "requests current status of each FIFO at each
// clock cycle".
module fib
  import dpa_pkg::*;
#(
  parameter int unsigned N = dpa_pkg::NUM_CH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  fifo_status_t         st_in  [N],
  input  logic [$clog2(N)-1:0] sel,
  output fifo_status_t         st_all [N],
  output fifo_status_t         st_sel
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) st_all[i] <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++) st_all[i] <= st_in[i];
    end
  end

  assign st_sel = st_all[sel];
endmodule
