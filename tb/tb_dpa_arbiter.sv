// tb_dpa_arbiter: self-checking test of the DPA arbiter.
// Two arbiters, one per priority equation, see the same random FIFO records
// and mask. The test computes every priority itself with 64-bit integers,
//   full:    p = c + f*(c*s + dc*d)
//   reduced: p = (s+d)*(c*f - c_last*f_prev),
// picks the eligible channel (c > 0, not masked) with the largest priority,
// lowest index on a tie, and checks the registered candidate one cycle later.
// The channels have different sampling periods s and depths d.
module tb_dpa_arbiter;
  import dpa_pkg::*;

  localparam int unsigned N = dpa_pkg::NUM_CH;
  localparam int unsigned D = dpa_pkg::DEPTH;
  // per-channel sampling periods and depths
  localparam int unsigned S_CH [N] = '{32, 16, 64, 32, 8, 32, 128, 32};
  localparam int unsigned D_CH [N] = '{256, 128, 256, 64, 32, 256, 16, 256};

  logic                 clk = 0, rst_n = 0;
  fifo_status_t         st [N];
  logic [N-1:0]         mask;
  prio_t                prio_f [N], prio_r [N];
  logic [$clog2(N)-1:0] cand_f, cand_r;
  logic                 vld_f, vld_r;
  int                   checks = 0, failures = 0;
  int                   n_fail_driven = 0;

  dpa_arbiter #(.N(N), .MODE(PRIO_FULL), .S_CH(S_CH), .D_CH(D_CH)) dut_f (
    .clk(clk), .rst_n(rst_n), .st(st), .mask(mask), .prio(prio_f),
    .cand(cand_f), .cand_valid(vld_f));
  dpa_arbiter #(.N(N), .MODE(PRIO_REDUCED), .S_CH(S_CH), .D_CH(D_CH)) dut_r (
    .clk(clk), .rst_n(rst_n), .st(st), .mask(mask), .prio(prio_r),
    .cand(cand_r), .cand_valid(vld_r));

  always #5 clk = ~clk;

  function automatic longint ref_p(fifo_status_t r, bit reduced, int ch);
    longint c, cl, dc, f, fp, S, D;
    S = longint'(S_CH[ch]); D = longint'(D_CH[ch]);
    c = longint'(r.c); cl = longint'(r.c_last); dc = longint'(r.dc);
    f = longint'(r.f); fp = longint'(r.f_prev);
    if (!reduced) return c + f * (c * S + dc * D);
    return (S + D) * (c * f - cl * fp);
  endfunction

  task automatic pick(bit reduced, output int idx, output bit vld);
    longint best;
    idx = 0; vld = 0; best = 0;
    for (int i = 0; i < int'(N); i++) begin
      if (st[i].c != 0 && !mask[i] && (!vld || ref_p(st[i], reduced, i) > best)) begin
        idx = i; vld = 1; best = ref_p(st[i], reduced, i);
      end
    end
  endtask

  task automatic random_records(int mode);
    for (int i = 0; i < int'(N); i++) begin
      st[i]        = '0;
      st[i].c      = cnt_t'($urandom_range(D));
      st[i].c_last = cnt_t'($urandom_range(D));
      st[i].dc     = dcnt_t'(int'($urandom_range(2 * D)) - int'(D));
      st[i].f      = (mode == 0) ? '0 : fail_t'($urandom_range(mode == 1 ? 3 : 255));
      st[i].f_prev = fail_t'($urandom_range(7));
      if ($urandom_range(7) == 0) st[i].c = '0;
    end
    mask = ($urandom_range(3) == 0) ? N'($urandom) : '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  ef, er, ec;
    bit  vf, vr, vc;
    for (int i = 0; i < int'(N); i++) st[i] = '0;
    mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Hand-worked case: with no fails the full equation reduces to the fill
    // count; one fail on a filling channel outranks a fuller idle one.
    @(negedge clk);
    for (int i = 0; i < int'(N); i++) st[i] = '0;
    st[2].c = 100;
    st[5].c = 60;
    @(posedge clk); #1;
    checks++; if (!(vld_f && cand_f == 2)) begin failures++; $display("FAIL hand 1"); end
    checks++; if (prio_f[2] != 100) begin failures++; $display("FAIL hand p=c"); end
    @(negedge clk);
    st[5].f  = 1;
    st[5].dc = 10;    // p5 = 60 + 1*(60*32 + 10*256) = 4540
    @(posedge clk); #1;
    checks++; if (!(vld_f && cand_f == 5)) begin failures++; $display("FAIL hand 2"); end
    checks++; if (prio_f[5] != 4540) begin failures++; $display("FAIL hand p5=%0d", prio_f[5]); end
    // masking the winner passes it over
    @(negedge clk);
    mask = N'(1) << 5;
    @(posedge clk); #1;
    checks++; if (!(vld_f && cand_f == 2)) begin failures++; $display("FAIL hand mask"); end
    // nothing to move: no candidate
    @(negedge clk);
    for (int i = 0; i < int'(N); i++) st[i] = '0;
    mask = '0;
    @(posedge clk); #1;
    checks++; if (vld_f || vld_r) begin failures++; $display("FAIL empty"); end

    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      random_records(k % 3);
      #1;
      pick(0, ef, vf);
      pick(1, er, vr);
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (longint'(prio_f[i]) != ref_p(st[i], 0, i) || longint'(prio_r[i]) != ref_p(st[i], 1, i)) begin
          failures++;
          $display("FAIL prio ch %0d %0d %0d %0d %0d c=%0d dc=%0d f=%0d", i, prio_f[i], ref_p(st[i],0,i), prio_r[i], ref_p(st[i],1,i), st[i].c, st[i].dc, st[i].f);
        end
      end
      // does the fail term change the winner compared with fill count alone?
      ec = 0; vc = 0;
      for (int i = 0; i < int'(N); i++)
        if (st[i].c != 0 && !mask[i] && (!vc || st[i].c > st[ec].c)) begin ec = i; vc = 1; end
      if (vf && ec != ef) n_fail_driven++;
      @(posedge clk); #1;
      checks++;
      if (vld_f != vf || (vf && int'(cand_f) != ef)) begin
        failures++;
        $display("FAIL full cand %0d/%0d expected %0d/%0d", cand_f, vld_f, ef, vf);
      end
      checks++;
      if (vld_r != vr || (vr && int'(cand_r) != er)) begin
        failures++;
        $display("FAIL reduced cand %0d/%0d expected %0d/%0d", cand_r, vld_r, er, vr);
      end
    end
    checks++;
    if (n_fail_driven == 0) begin failures++; $display("FAIL fail term never decided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
