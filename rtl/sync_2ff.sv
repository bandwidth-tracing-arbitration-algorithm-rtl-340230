// sync_2ff: two-flop synchroniser for a vector whose value changes in at most
// one bit at a time (a Gray-coded pointer or counter). The output follows the
// input two destination clock edges later. Reset clears both stages.
module sync_2ff #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
