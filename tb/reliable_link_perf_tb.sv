// reliable_link_perf_tb: throughput of the link over the window and packet
// sizes of the original measurements.
//
// Each configuration is one perf_pair: two reliable_link ends streaming
// numbered packets through a channel that loses nothing, with upper layers
// fast enough not to limit the link. The configurations are
//   - window 16, packets of 1500 bytes, both directions at once (main case)
//   - the same with one direction only and a short ACK timeout
//   - windows 1, 2, 8 and 32 at 1500 bytes, both directions
//   - packets of 64, 3000, 5000 and 7200 bytes at window 16, both directions
//   - window 16, 1500 bytes, with the far end in loopback mode
// and each prints its rate per direction in MB/s at 125 MHz.
//
// Checked: every configuration delivers every packet intact; the main case
// exceeds 100 MB/s in each direction at once; one direction alone exceeds
// 120 MB/s; no rate exceeds the 125 MB/s of the wire; a window of one packet
// (stop and wait) is slower than a window of 16; packets echoed by the
// loopback unit all return intact and in order, at a rate that is not above
// that of one-way streaming (every byte crosses the wire twice).
module reliable_link_perf_tb;

  int checks = 0, failures = 0;
  logic rst = 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [11:0] fin;

  perf_pair #(.PS(1500), .W(16), .TT(500), .NPKT(48), .DUPLEX(1)) p_main (.rst(rst), .finished(fin[0]));
  perf_pair #(.PS(1500), .W(16), .TT(200), .NPKT(48), .DUPLEX(0)) p_oneway (.rst(rst), .finished(fin[1]));
  perf_pair #(.PS(1500), .W(1),  .TT(500), .NPKT(16), .DUPLEX(1)) p_w1 (.rst(rst), .finished(fin[2]));
  perf_pair #(.PS(1500), .W(2),  .TT(500), .NPKT(16), .DUPLEX(1)) p_w2 (.rst(rst), .finished(fin[3]));
  perf_pair #(.PS(1500), .W(8),  .TT(500), .NPKT(32), .DUPLEX(1)) p_w8 (.rst(rst), .finished(fin[4]));
  perf_pair #(.PS(1500), .W(32), .TT(500), .NPKT(80), .DUPLEX(1)) p_w32 (.rst(rst), .finished(fin[5]));
  perf_pair #(.PS(64),   .W(16), .TT(500), .NPKT(200), .DUPLEX(1)) p_ps64 (.rst(rst), .finished(fin[6]));
  perf_pair #(.PS(3000), .W(16), .TT(500), .NPKT(32), .DUPLEX(1)) p_ps3000 (.rst(rst), .finished(fin[7]));
  perf_pair #(.PS(5000), .W(16), .TT(500), .NPKT(24), .DUPLEX(1)) p_ps5000 (.rst(rst), .finished(fin[8]));
  perf_pair #(.PS(7200), .W(16), .TT(500), .NPKT(20), .DUPLEX(1)) p_ps7200 (.rst(rst), .finished(fin[9]));
  perf_pair #(.PS(1500), .W(16), .TT(500), .NPKT(32), .DUPLEX(1), .LOOPBACK(1)) p_loop (.rst(rst), .finished(fin[10]));
  assign fin[11] = 1'b1;

  // watchdog: 3 ms of simulated time is far beyond the slowest configuration
  initial begin
    #3ms;
    failures++;
    $display("watchdog expired, finished %b", fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ns rst = 0;
    wait (&fin);
    check(p_main.n_bad == 0 && p_oneway.n_bad == 0 && p_w1.n_bad == 0 && p_w2.n_bad == 0 &&
          p_w8.n_bad == 0 && p_w32.n_bad == 0 && p_ps64.n_bad == 0 && p_ps3000.n_bad == 0 &&
          p_ps5000.n_bad == 0 && p_ps7200.n_bad == 0, "every packet delivered intact");
    check(p_loop.n_bad == 0 && p_loop.rate_ba > 0.0 && p_loop.rate_ba <= p_oneway.rate_ab,
          "loopback: every echoed packet intact, rate not above one-way streaming");
    check(p_main.rate_ab > 100.0 && p_main.rate_ba > 100.0,
          "window 16, 1500 B: over 100 MB/s in both directions at once");
    check(p_oneway.rate_ab > 120.0, "one direction alone: over 120 MB/s");
    check(p_main.rate_ab <= 125.0 && p_oneway.rate_ab <= 125.0 && p_ps7200.rate_ab <= 125.0,
          "no rate above the line rate");
    check(p_w1.rate_ab < p_main.rate_ab && p_w1.rate_ba < p_main.rate_ba,
          "stop and wait (window 1) is slower than window 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
