// async_fifo: mixed-clock first-in first-out buffer.
//
// Write and read sides run on independent clocks. Each side keeps a binary
// pointer one bit wider than the address and publishes it in Gray code; the
// other side brings it in through a two-flop synchroniser. Full and empty
// are computed from the local pointer and the synchronised remote one, so
// they are conservative: a side may see the FIFO fuller (writer) or emptier
// (reader) than it is for a few cycles, never the opposite.
//
// Interface: a write with wr_en while full, or a read with rd_en while empty,
// is ignored. rdata shows the oldest entry whenever empty is low (first-word
// fall-through); rd_en removes it. wr_count and rd_count give the number of
// stored entries as each side sees it (0 .. 2**AW).
//
// The source design specifies only that the FIFOs cross clock domains; the
// Gray-pointer construction is this implementation's choice.
module async_fifo #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 8
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  output logic [AW:0]   wr_count,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   rd_count
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s, rgray_s;   // remote Gray pointers, synchronised
  logic [AW:0] wbin_s, rbin_s;     // and converted back to binary

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic wr_do;
  assign wr_do = wr_en && !full;

  always_ff @(posedge wclk) begin
    if (wr_do) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wr_do) begin
      wbin  <= wbin + 1'b1;
      wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
    end
  end

  sync_2ff #(.W(AW + 1)) u_sync_r2w (.clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_s));
  assign rbin_s   = gray2bin(rgray_s);
  assign wr_count = wbin - rbin_s;
  assign full     = (wr_count == (AW + 1)'(DEPTH));

  // ---------------- read side ----------------
  logic rd_do;
  assign rd_do = rd_en && !empty;
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_do) begin
      rbin  <= rbin + 1'b1;
      rgray <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
    end
  end

  sync_2ff #(.W(AW + 1)) u_sync_w2r (.clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_s));
  assign wbin_s   = gray2bin(wgray_s);
  assign rd_count = wbin_s - rbin;
  assign empty    = (rd_count == '0);

endmodule
