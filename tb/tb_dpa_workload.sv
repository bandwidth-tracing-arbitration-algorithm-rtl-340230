// tb_dpa_workload: bandwidth-tracing workloads on the default-size design.
//
// Runs three experiments of 120000 DMA cycles each (DMA clock 132 MHz). In
// each, the four components push words toward the parent through their
// to-parent FIFOs at a required bandwidth that changes at random: every
// 1320 DMA cycles (10 us) a new value is drawn, uniform around the
// component's mean with the given spread (standard deviation), never below 0.
// Means and spreads per component, in transfers per 100 ns:
//   experiment 1: (2.2,1.4) (1.3,0.8) (1.7,0.1) (1.4,0.5)
//   experiment 2: (3.2,3.3) (1.9,0.9) (2.0,1.1) (1.6,0.5)
//   experiment 3: (2.2,1.4) (1.9,2.2) (2.0,1.4) (1.6,1.0)
// Component clocks are 10, 12, 8 and 15 ns; a component attempts a write in
// a cycle with probability bandwidth * period / 100 ns, and a failed attempt
// (FIFO full) is dropped and counted. The parent is always ready, and always
// has data for the from-parent FIFOs, which the components leave unread.
//
// Measured bandwidth is the number of a component's words delivered to the
// parent in each 10 us window. Reported per component: mean required and
// delivered bandwidth, the mean square error between them over the windows,
// and the fails. Checked: every word arrives in order and none is lost, the
// DMA moves at most one word per cycle, and over each experiment the
// delivered bandwidth of every component is within 5 % of its required mean
// (the total load, 6.6 to 8.7 transfers per 100 ns, is below the DMA's 13.2).
module tb_dpa_workload;
  import dpa_pkg::*;

  localparam int unsigned NCC = dpa_pkg::NUM_CC;
  localparam int unsigned N   = 2 * NCC;
  localparam int unsigned DW  = dpa_pkg::DATA_W;
  localparam int unsigned IW  = $clog2(N);
  localparam int          EXP_CYCLES = 120000;
  localparam int          WIN        = 1320;      // 10 us at 132 MHz
  localparam real         T_DMA      = 7.576;     // ns

  logic              clk = 0, rst_n = 0;
  logic [NCC-1:0]    cc_clk = '0;
  logic [NCC-1:0]    cc_rst_n;
  logic [N-1:0]      cc_req, cc_ack, cc_fail;
  logic [DW-1:0]     cc_wdata [N], cc_rdata [N];
  logic              up_valid, up_ready, dn_ready, dn_valid;
  logic [IW-1:0]     up_ch, dn_ch, cur_ch, cand;
  logic [DW-1:0]     up_data, dn_data;
  logic              busy, cand_valid, burst_start, stall, underrun;
  cnt_t              burst_len;
  fifo_status_t      fib_status [N];

  dpa_comm_top dut (.*);

  real cc_period [NCC] = '{10.0, 12.0, 8.0, 15.0};
  always #3.788 clk = ~clk;
  always #5.0   cc_clk[0] = ~cc_clk[0];
  always #6.0   cc_clk[1] = ~cc_clk[1];
  always #4.0   cc_clk[2] = ~cc_clk[2];
  always #7.5   cc_clk[3] = ~cc_clk[3];
  assign cc_rst_n = {NCC{rst_n}};

  // experiment table: mean, spread per component
  real mean_t [3][NCC] = '{'{2.2, 1.3, 1.7, 1.4}, '{3.2, 1.9, 2.0, 1.6}, '{2.2, 1.9, 2.0, 1.6}};
  real sd_t   [3][NCC] = '{'{1.4, 0.8, 0.1, 0.5}, '{3.3, 0.9, 1.1, 0.5}, '{1.4, 2.2, 1.4, 1.0}};

  int  checks = 0, failures = 0;
  bit  active = 0;
  real req_bw [NCC];        // current required bandwidth, per 100 ns
  int  sent [N], got [N];
  int  fails [NCC];
  int  win_got [NCC];
  real req_sum [NCC], got_sum [NCC], sq_sum [NCC];
  int  n_win;

  // the parent always has data for the from-parent FIFOs; the components do
  // not read them, so they fill once at the start and then drop out
  int dn_sent [N];
  assign dn_valid = 1'b1;
  assign dn_data  = DW'((int'(dn_ch) << 24) | dn_sent[dn_ch]);
  assign up_ready = 1'b1;
  always @(posedge clk) if (rst_n && dn_valid && dn_ready) dn_sent[dn_ch]++;

  for (genvar k = 0; k < int'(NCC); k++) begin : g_cc
    localparam int TP = 2 * k;
    always @(negedge cc_clk[k]) begin
      cc_req[TP]   <= active && ($urandom_range(999999) < int'(req_bw[k] * cc_period[k] / 100.0 * 1.0e6));
      cc_wdata[TP] <= DW'((TP << 24) | sent[TP]);
      cc_req[TP+1] <= 1'b0;
    end
    always @(posedge cc_clk[k]) if (rst_n) begin
      if (cc_req[TP] && cc_ack[TP]) sent[TP]++;
      if (cc_req[TP] && cc_fail[TP]) fails[k]++;
    end
  end

  always @(posedge clk) if (rst_n && up_valid && up_ready) begin
    checks++;
    if (up_data != DW'((int'(up_ch) << 24) | got[up_ch]) || up_ch[0] != 1'b0) begin
      failures++;
      if (failures < 10) $display("FAIL parent got %h on channel %0d", up_data, up_ch);
    end
    got[up_ch]++;
    if (active) win_got[up_ch / 2]++;
  end

  initial begin
    repeat (3 * (EXP_CYCLES + 20000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic draw_bw(int e);
    for (int k = 0; k < int'(NCC); k++) begin
      real u;
      u = real'($urandom_range(1000000)) / 1.0e6 - 0.5;
      req_bw[k] = mean_t[e][k] + u * 2.0 * $sqrt(3.0) * sd_t[e][k];
      if (req_bw[k] < 0.0) req_bw[k] = 0.0;
    end
  endtask

  initial begin
    for (int i = 0; i < int'(N); i++) begin cc_req[i] = 0; cc_wdata[i] = '0; end
    for (int e = 0; e < 3; e++) begin
      rst_n = 0;
      for (int i = 0; i < int'(N); i++) begin sent[i] = 0; got[i] = 0; dn_sent[i] = 0; end
      for (int k = 0; k < int'(NCC); k++) begin
        fails[k] = 0; win_got[k] = 0; req_sum[k] = 0; got_sum[k] = 0; sq_sum[k] = 0;
        req_bw[k] = 0;
      end
      n_win = 0;
      repeat (4) @(posedge clk);
      rst_n = 1;
      repeat (4) @(posedge clk);
      draw_bw(e);
      active = 1;
      for (int w = 0; w < EXP_CYCLES / WIN; w++) begin
        repeat (WIN) @(posedge clk);
        for (int k = 0; k < int'(NCC); k++) begin
          real meas;
          meas = real'(win_got[k]) / (real'(WIN) * T_DMA / 100.0);
          req_sum[k] += req_bw[k];
          got_sum[k] += meas;
          sq_sum[k]  += (meas - req_bw[k]) * (meas - req_bw[k]);
          win_got[k] = 0;
        end
        n_win++;
        draw_bw(e);
      end
      active = 0;
      repeat (3000) @(posedge clk);
      $display("experiment %0d:", e + 1);
      for (int k = 0; k < int'(NCC); k++) begin
        real rq, gt;
        rq = req_sum[k] / n_win;
        gt = got_sum[k] / n_win;
        $display("  CC%0d required %5.2f delivered %5.2f per 100 ns, MSE %7.4f, fails %0d",
                 k, rq, gt, sq_sum[k] / n_win, fails[k]);
        checks++;
        if (gt < 0.95 * rq || gt > 1.05 * rq) begin
          failures++;
          $display("FAIL CC%0d delivered bandwidth off its requirement", k);
        end
        checks++;
        if (sent[2*k] != got[2*k]) begin
          failures++;
          $display("FAIL CC%0d: %0d accepted, %0d delivered", k, sent[2*k], got[2*k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
