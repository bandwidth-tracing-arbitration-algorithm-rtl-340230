// tb_fib: self-checking test of the FIFO information bus.
// Applies random status records each cycle and checks that st_all shows the
// previous cycle's records and st_sel the record of the selected channel.
module tb_fib;
  import dpa_pkg::*;

  localparam int unsigned N = dpa_pkg::NUM_CH;

  logic                 clk = 0, rst_n = 0;
  fifo_status_t         st_in [N], st_all [N], prev [N];
  fifo_status_t         st_sel;
  logic [$clog2(N)-1:0] sel;
  int                   checks = 0, failures = 0;

  fib #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .st_in(st_in), .sel(sel),
                    .st_all(st_all), .st_sel(st_sel));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(N); i++) st_in[i] = '0;
    sel = '0;
    repeat (2) @(posedge clk);
    // reset clears the bus
    checks++;
    for (int i = 0; i < int'(N); i++) if (st_all[i] != '0) begin failures++; break; end
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) begin
        st_in[i] = fifo_status_t'({$urandom, $urandom});
        prev[i]  = st_in[i];
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (st_all[i] != prev[i]) begin
          failures++;
          $display("FAIL cycle %0d channel %0d", k, i);
        end
      end
      // inputs change, outputs hold until the next edge
      for (int i = 0; i < int'(N); i++) st_in[i] = fifo_status_t'({$urandom, $urandom});
      for (int s = 0; s < int'(N); s++) begin
        sel = $clog2(N)'(s);
        #1;
        checks++;
        if (st_sel != prev[s]) begin
          failures++;
          $display("FAIL sel %0d", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
