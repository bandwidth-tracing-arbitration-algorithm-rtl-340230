// blc: burst length calculator.
//
// Computes the burst length of the winner candidate from its FIFO record:
//   b = (c/2) * (1 + v*s/d) = (c/2) * (1 + dc/d),
// evaluated without division as  b = h + ((h * dc) >>> n),  h = c >> 1,
// n = log2(d). A channel that fills quickly gets a longer burst, one that
// drains gets a shorter one, and b never exceeds c, so one channel cannot
// take the bus for its whole content. sel names the candidate's channel, whose
// depth d (D_CH[sel]) sets the shift n. b is raised to 1 when c > 0 (so a
// single waiting word is still moved) and is 0 when c = 0.
// The equation follows the source design; applying the shift after the
// multiplication, and the minimum of one, are this implementation's choices.
// Combinational.
module blc
  import dpa_pkg::*;
#(
  parameter int unsigned N        = dpa_pkg::NUM_CH,
  parameter int unsigned D_CH [N] = '{default: dpa_pkg::DEPTH}
) (
  input  fifo_status_t         st,
  input  logic [$clog2(N)-1:0] sel,
  output cnt_t                 burst_len
);
  localparam int unsigned PW = 2 * CNT_W + 2;

  // n_i = log2(d_i) of every channel, selected by the candidate number
  logic [4:0] n_ch [N];
  for (genvar i = 0; i < int'(N); i++) begin : g_n
    assign n_ch[i] = 5'($clog2(D_CH[i]));
  end

  logic signed [PW-1:0] h, prod, b;

  always_comb begin
    h    = PW'(st.c >> 1);
    prod = h * PW'(st.dc);
    b    = h + (prod >>> n_ch[sel]);
    if (st.c == '0)
      burst_len = '0;
    else if (b < 1)
      burst_len = cnt_t'(1);
    else if (b > PW'(st.c))
      burst_len = st.c;
    else
      burst_len = cnt_t'(b);
  end
endmodule
