// reliable_link_stress_tb: long full-duplex runs over lossy channels, swept
// over window sizes and timeouts, looking for a link that stops.
//
// The original design had a rare fault: the sending window of one end and the
// receiving window of the other disagreed about the last acknowledged packet,
// and one direction stopped for good. It showed up with some timeout settings
// and vanished when the timeouts were changed by a few percent. This test runs
// eight pairs of reliable_link ends (perf_pair), each streaming a few hundred
// numbered packets in both directions over channels that corrupt and lose
// frames at random, data and ACK-only frames alike. The pairs differ in
// window size, packet size, ACK timeout, resend timeout and random seed. Two
// pairs differ only by 3 % in both timeouts.
//
// Checked, for every pair: every packet arrives in both directions, intact,
// in order and once (the reader compares each packet with the next number of
// the sender's pattern, so a gap or a duplicate counts as a bad packet); both
// channels really corrupted and lost frames. A pair whose link stops never
// finishes, and the watchdog then reports which pairs did.
module reliable_link_stress_tb;

  int checks = 0, failures = 0;
  logic rst = 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] fin;

  perf_pair #(.PS(64),  .W(4),  .TT(100), .MT(2000), .PERR(3), .NPKT(300),
              .SEED_AB(32'h1234), .SEED_BA(32'h4321)) s0 (.rst(rst), .finished(fin[0]));
  perf_pair #(.PS(64),  .W(4),  .TT(103), .MT(2060), .PERR(3), .NPKT(300),
              .SEED_AB(32'h1234), .SEED_BA(32'h4321)) s1 (.rst(rst), .finished(fin[1]));
  perf_pair #(.PS(64),  .W(8),  .TT(50),  .MT(3000), .PERR(3), .NPKT(300),
              .SEED_AB(32'h0BAD), .SEED_BA(32'hF00D)) s2 (.rst(rst), .finished(fin[2]));
  perf_pair #(.PS(64),  .W(8),  .TT(230), .MT(1500), .PERR(3), .NPKT(300),
              .SEED_AB(32'h2468), .SEED_BA(32'h1357)) s3 (.rst(rst), .finished(fin[3]));
  perf_pair #(.PS(64),  .W(1),  .TT(40),  .MT(1000), .PERR(3), .NPKT(200),
              .SEED_AB(32'h5A5A), .SEED_BA(32'hA5A5)) s4 (.rst(rst), .finished(fin[4]));
  perf_pair #(.PS(256), .W(16), .TT(500), .MT(6000), .PERR(3), .NPKT(200),
              .SEED_AB(32'h7777), .SEED_BA(32'h3333)) s5 (.rst(rst), .finished(fin[5]));
  perf_pair #(.PS(64),  .W(4),  .TT(100), .MT(2000), .PERR(3), .NPKT(300),
              .SEED_AB(32'hC0DE), .SEED_BA(32'hBEEF)) s6 (.rst(rst), .finished(fin[6]));
  perf_pair #(.PS(64),  .W(2),  .TT(100), .MT(2000), .PERR(10), .NPKT(200),
              .SEED_AB(32'h0F0F), .SEED_BA(32'hF0F0)) s7 (.rst(rst), .finished(fin[7]));

  // watchdog: 4 ms of simulated time, well over twice what all pairs need
  initial begin
    #4ms;
    failures++;
    $display("watchdog expired, finished %b (a 0 is a pair whose link stopped)", fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ns rst = 0;
    wait (&fin);
    check(s0.n_bad == 0 && s1.n_bad == 0 && s2.n_bad == 0 && s3.n_bad == 0 &&
          s4.n_bad == 0 && s5.n_bad == 0 && s6.n_bad == 0 && s7.n_bad == 0,
          "every packet intact, in order and once");
    check(s0.ch_ab.n_lost > 0 && s0.ch_ba.n_lost > 0 && s0.ch_ab.n_corrupt > 0 && s0.ch_ba.n_corrupt > 0 &&
          s1.ch_ab.n_lost > 0 && s1.ch_ba.n_lost > 0 && s1.ch_ab.n_corrupt > 0 && s1.ch_ba.n_corrupt > 0 &&
          s2.ch_ab.n_lost > 0 && s2.ch_ba.n_lost > 0 && s2.ch_ab.n_corrupt > 0 && s2.ch_ba.n_corrupt > 0 &&
          s3.ch_ab.n_lost > 0 && s3.ch_ba.n_lost > 0 && s3.ch_ab.n_corrupt > 0 && s3.ch_ba.n_corrupt > 0,
          "frames lost and corrupted in both directions (pairs 0-3)");
    check(s4.ch_ab.n_lost > 0 && s4.ch_ba.n_lost > 0 && s4.ch_ab.n_corrupt > 0 && s4.ch_ba.n_corrupt > 0 &&
          s5.ch_ab.n_lost > 0 && s5.ch_ba.n_lost > 0 && s5.ch_ab.n_corrupt > 0 && s5.ch_ba.n_corrupt > 0 &&
          s6.ch_ab.n_lost > 0 && s6.ch_ba.n_lost > 0 && s6.ch_ab.n_corrupt > 0 && s6.ch_ba.n_corrupt > 0 &&
          s7.ch_ab.n_lost > 0 && s7.ch_ba.n_lost > 0 && s7.ch_ab.n_corrupt > 0 && s7.ch_ba.n_corrupt > 0,
          "frames lost and corrupted in both directions (pairs 4-7)");
    $display("frames lost / corrupted, A->B and B->A:");
    $display("  s0 %0d/%0d %0d/%0d  s1 %0d/%0d %0d/%0d  s2 %0d/%0d %0d/%0d  s3 %0d/%0d %0d/%0d",
             s0.ch_ab.n_lost, s0.ch_ab.n_corrupt, s0.ch_ba.n_lost, s0.ch_ba.n_corrupt,
             s1.ch_ab.n_lost, s1.ch_ab.n_corrupt, s1.ch_ba.n_lost, s1.ch_ba.n_corrupt,
             s2.ch_ab.n_lost, s2.ch_ab.n_corrupt, s2.ch_ba.n_lost, s2.ch_ba.n_corrupt,
             s3.ch_ab.n_lost, s3.ch_ab.n_corrupt, s3.ch_ba.n_lost, s3.ch_ba.n_corrupt);
    $display("  s4 %0d/%0d %0d/%0d  s5 %0d/%0d %0d/%0d  s6 %0d/%0d %0d/%0d  s7 %0d/%0d %0d/%0d",
             s4.ch_ab.n_lost, s4.ch_ab.n_corrupt, s4.ch_ba.n_lost, s4.ch_ba.n_corrupt,
             s5.ch_ab.n_lost, s5.ch_ab.n_corrupt, s5.ch_ba.n_lost, s5.ch_ba.n_corrupt,
             s6.ch_ab.n_lost, s6.ch_ab.n_corrupt, s6.ch_ba.n_lost, s6.ch_ba.n_corrupt,
             s7.ch_ab.n_lost, s7.ch_ab.n_corrupt, s7.ch_ba.n_lost, s7.ch_ba.n_corrupt);
    $display("all pairs finished at %0t", $realtime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
