// dpa_priority: dynamic priority of one FIFO channel, combinational.
//
// MODE = PRIO_FULL evaluates the heuristic of the source design,
//   p = c + (c + v*d) * f * s,  with v = dc / s,  i.e.  p = c + f*(c*s + dc*d),
// which needs no division. MODE = PRIO_REDUCED evaluates the source design's
// reduced form for s << d, p = (s+d) * (c*f - c_last*f_prev), with two
// multipliers (the constant s+d one reduces to shifts and adds).
// With f = 0 the full form gives p = c, the reduced form p = 0.
// Result is signed; S and D are the channel's sampling period and depth.
module dpa_priority
  import dpa_pkg::*;
#(
  parameter prio_mode_e  MODE = PRIO_FULL,
  parameter int unsigned S    = dpa_pkg::SAMPLE_PERIOD,
  parameter int unsigned D    = dpa_pkg::DEPTH
) (
  input  fifo_status_t st,
  output prio_t        p
);
  prio_t c, c_last, dc, f, f_prev;

  always_comb begin
    c      = prio_t'({1'b0, st.c});
    c_last = prio_t'({1'b0, st.c_last});
    dc     = prio_t'(st.dc);            // sign-extended
    f      = prio_t'({1'b0, st.f});
    f_prev = prio_t'({1'b0, st.f_prev});
    if (MODE == PRIO_FULL)
      p = c + f * (c * prio_t'(S) + dc * prio_t'(D));
    else
      p = prio_t'(S + D) * (c * f - c_last * f_prev);
  end
endmodule
