// tb_blc: self-checking test of the burst length calculator.
// Drives random and corner-case FIFO records and compares the burst length
// with b = floor(c/2) + floor(floor(c/2)*dc / d), limited to 1..c (0 for
// c = 0), worked out here with plain integer arithmetic. The channels have
// different depths d, so the candidate number selects the divisor.
module tb_blc;
  import dpa_pkg::*;

  localparam int unsigned N = dpa_pkg::NUM_CH;
  localparam int unsigned D_CH [N] = '{256, 128, 64, 32, 256, 16, 256, 256};
  localparam int unsigned D = dpa_pkg::DEPTH;

  fifo_status_t         st;
  logic [$clog2(N)-1:0] sel = '0;
  cnt_t                 burst_len;
  int                   checks = 0, failures = 0;

  blc #(.N(N), .D_CH(D_CH)) dut (.st(st), .sel(sel), .burst_len(burst_len));

  function automatic int ref_len(int c, int dc, int D);
    int h, prod, q, b;
    h    = c / 2;
    prod = h * dc;
    q    = (prod >= 0) ? prod / int'(D) : -((-prod + int'(D) - 1) / int'(D));
    b    = h + q;
    if (c == 0) return 0;
    if (b < 1) return 1;
    if (b > c) return c;
    return b;
  endfunction

  task automatic check(int c, int dc);
    int D;
    D         = int'(D_CH[sel]);
    st        = '0;
    st.c      = cnt_t'(c);
    st.dc     = dcnt_t'(dc);
    st.c_last = cnt_t'($urandom_range(D));
    st.f      = fail_t'($urandom);
    #1;
    checks++;
    if (int'(burst_len) != ref_len(c, dc, D)) begin
      failures++;
      $display("FAIL ch=%0d c=%0d dc=%0d burst_len=%0d expected %0d", sel, c, dc, burst_len, ref_len(c, dc, D));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner cases
    check(0, 0);
    check(1, 0);
    check(2, 0);
    check(100, 0);          // steady fill: half the content
    check(200, 256);        // filled by a whole depth: the full content
    check(200, -256);       // drained by a whole depth: minimum
    check(128, 128);        // 64 * 1.5 = 96
    check(128, -128);       // 64 * 0.5 = 32
    check(256, 256);
    check(256, -1);
    // other depths: 32-deep channel 3, 64 words filled by 16: 32 * 1.5 = 48
    sel = 3;
    check(64, 16);
    st = '0; st.c = 64; st.dc = 16; #1;
    checks++; if (burst_len != 48) begin failures++; $display("FAIL hand 48"); end
    for (int i = 0; i < 4000; i++) begin
      int c, dc;
      sel = $clog2(N)'($urandom_range(N - 1));
      c  = $urandom_range(D_CH[sel]);
      dc = $urandom_range(2 * D_CH[sel]) - int'(D_CH[sel]);
      check(c, dc);
    end
    sel = 0;
    // spot values worked by hand
    st = '0; st.c = 128; st.dc = 128; #1;
    checks++; if (burst_len != 96) begin failures++; $display("FAIL hand 96"); end
    st = '0; st.c = 100; st.dc = 0; #1;
    checks++; if (burst_len != 50) begin failures++; $display("FAIL hand 50"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
