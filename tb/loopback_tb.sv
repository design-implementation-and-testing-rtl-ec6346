// loopback_tb: self-checking testbench of loopback.
//
// The receive side is driven by a model of the rx_buffer read port: while a
// packet is offered (rx_valid) the word at rx_pos appears on rx_rdata one
// cycle later, filled with a pattern that depends on the packet number and
// the word. The transmit side is a model of the tx_buffer write port that
// stores every word written and, on tx_done, compares the packet with the
// pattern. tx_ready is withheld for a while so that the unit, holding one
// packet, must refuse the next one on the receive side. The two sides run on
// unrelated clocks.
//
// Checked: every packet comes back intact and in order; the receive side
// takes exactly UW+1 cycles per packet (one position per cycle plus the read
// latency) and writes one word per cycle on the transmit side; no second
// packet is read while one is held.
module loopback_tb;

  localparam int unsigned PS   = 40;
  localparam int unsigned UB   = 4;
  localparam int unsigned UW   = PS / UB;
  localparam int unsigned UPW  = $clog2(UW);
  localparam int unsigned NPKT = 6;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [8*UB-1:0] pat(int n, int w);
    return {8'(n), 8'(w), 8'(n * 37 + w * 11), 8'hC3 ^ 8'(w)};
  endfunction

  logic rx_clk = 0, tx_clk = 0;
  always #5.0 rx_clk = ~rx_clk;
  always #3.7 tx_clk = ~tx_clk;
  logic rx_rst = 1, tx_rst = 1;

  logic            rx_valid, rx_done, tx_ready = 0, tx_we, tx_done;
  logic [UPW-1:0]  rx_pos, tx_pos;
  logic [8*UB-1:0] rx_rdata, tx_wdata;

  loopback #(.PACKET_SIZE(PS), .UL_BYTES(UB)) dut (
    .rx_clk, .rx_rst, .rx_valid, .rx_pos, .rx_rdata, .rx_done,
    .tx_clk, .tx_rst, .tx_ready, .tx_pos, .tx_we, .tx_wdata, .tx_done);

  // ------------------------------------------------ receive-side model
  int rx_pkt = 0;            // number of the packet being offered
  int busy_cyc = 0;
  always @(posedge rx_clk) rx_rdata <= pat(rx_pkt, int'(rx_pos));
  // sampled away from the active edge
  always @(negedge rx_clk) if (!rx_rst) begin
    if (dut.rx_busy) busy_cyc++;
    if (rx_done) begin
      check(busy_cyc == UW + 1, "receive side reads a packet in UW+1 cycles");
      rx_pkt++;
      busy_cyc = 0;
    end
  end
  assign rx_valid = !rx_rst && rx_pkt < NPKT;

  // ----------------------------------------------- transmit-side model
  logic [8*UB-1:0] got [UW];
  int tx_pkt = 0, tx_words = 0;
  // outputs are only looked at out of reset
  always @(posedge tx_clk) if (!tx_rst) begin
    if (tx_we) begin
      got[tx_pos] <= tx_wdata;
      tx_words++;
    end
    if (tx_done) begin
      bit ok;
      ok = (tx_words == UW);
      for (int w = 0; w < UW; w++) if (got[w] !== pat(tx_pkt, w)) ok = 0;
      check(ok, $sformatf("packet %0d returned intact", tx_pkt));
      tx_pkt++;
      tx_words = 0;
    end
  end

  // one word per cycle: tx_we stays high for UW consecutive cycles
  int we_run = 0;
  always @(posedge tx_clk) if (!tx_rst) begin
    if (tx_we) we_run++;
    else begin
      if (we_run != 0) check(we_run == UW, "transmit side writes one word per cycle");
      we_run = 0;
    end
  end

  // ------------------------------------------------------ watchdog
  initial begin
    repeat (20000) @(posedge rx_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge tx_clk);
    rx_rst = 0;
    tx_rst = 0;
    // transmit side busy: the first packet is taken, the second must wait
    wait (rx_pkt == 1);
    repeat (20 * UW) @(posedge rx_clk);
    check(rx_pkt == 1 && !dut.rx_busy, "second packet refused while one is held");
    check(tx_pkt == 0, "nothing written while tx_ready is low");
    tx_ready = 1;
    wait (tx_pkt == NPKT);
    repeat (4) @(posedge rx_clk);
    check(rx_pkt == NPKT && tx_pkt == NPKT, "every packet looped exactly once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
