// reliable_link_tb: end-to-end test of reliable_link at reduced sizes.
//
// Two reliable_link instances, A and B, talk to each other through a lossy
// channel model (link_channel) in place of the MACs, PHYs and cable; the
// upper layers are ul_writer and ul_reader. Each direction's
// channel takes a frame from the sender's MAC transmit interface (answering
// tx_dvld with tx_ack after a variable wait, like a busy wire), pads it to 60
// bytes and delivers it to the receiver's MAC receive interface with a
// goodframe strobe, with a badframe strobe (corrupted on the way), or not at
// all (lost). All four clocks are unrelated. Upper-layer models on both sides
// write numbered packets with a known pattern and check that the other side
// reads every packet exactly once, in order and intact.
//
// Sequence: the two ends start with the default host address, so the first
// frames (and one foreign frame injected later) are filtered out; then a magic
// packet sent to each end registers the peer and resets the ARQ; then both
// directions stream NPKT packets at once. The receive side of B stalls for a
// while to let its buffer fill, so that A's master runs ahead of B's window.
// Counted, and each must happen at least once: magic packets taken, ARQ
// resets, filtered frames, corrupted and lost frames, master timeouts and
// resends, duplicates dropped by a target, frames ahead of a target's window,
// ACK-only frames, cumulative ACKs that retire packets, a full transmit
// window, and a busy MAC. Finally B switches to loopback mode and returns NLB
// packets that A writes; A checks them and the number looped is counted.
module reliable_link_tb;
  import link_pkg::*;

  localparam int unsigned PS   = 64;
  localparam int unsigned W    = 4;
  localparam int unsigned UB   = 4;
  localparam int unsigned UW   = PS / UB;
  localparam int unsigned MT   = 3000;
  localparam int unsigned NPKT = 40;
  localparam int unsigned NLB  = 6;      // packets sent round the loop
  localparam mac_addr_t   MAC_A = 48'h02_00_00_00_00_AA;
  localparam mac_addr_t   MAC_B = 48'h02_00_00_00_00_BB;
  localparam mac_addr_t   FOREIGN = 48'h00_16_3E_00_BE_EF;
  localparam int unsigned UPW = (UW > 1) ? $clog2(UW) : 1;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ clocks
  logic a_rx_clk = 0, a_tx_clk = 0, b_rx_clk = 0, b_tx_clk = 0;
  always #4.0 a_tx_clk = ~a_tx_clk;
  always #4.1 a_rx_clk = ~a_rx_clk;
  always #3.9 b_tx_clk = ~b_tx_clk;
  always #4.2 b_rx_clk = ~b_rx_clk;
  logic rst = 1;

  // ------------------------------------------------------------- DUTs
  mac_rx_t  a_rx, b_rx;
  logic b_loopback = 0;   // mode switch: B returns what it receives
  logic [7:0] a_txd, b_txd;
  logic a_tx_dvld, b_tx_dvld, a_tx_ack, b_tx_ack;
  logic a_ul_rx_valid, b_ul_rx_valid, a_ul_rx_done, b_ul_rx_done;
  logic [UPW-1:0] a_ul_rx_pos, b_ul_rx_pos, a_ul_tx_pos, b_ul_tx_pos;
  logic [8*UB-1:0] a_ul_rx_rdata, b_ul_rx_rdata, a_ul_tx_wdata, b_ul_tx_wdata;
  logic a_ul_tx_ready, b_ul_tx_ready, a_ul_tx_we, b_ul_tx_we, a_ul_tx_done, b_ul_tx_done;
  mac_addr_t a_host, b_host;

  reliable_link #(.PACKET_SIZE(PS), .WINDOW(W), .UL_BYTES(UB), .MASTER_TIMEOUT(MT), .TARGET_TIMEOUT(100), .LOCAL_MAC(MAC_A)) dut_a (
    .rx_clk(a_rx_clk), .rx_rst(rst), .mac_rx(a_rx),
    .ul_rx_valid(a_ul_rx_valid), .ul_rx_pos(a_ul_rx_pos), .ul_rx_rdata(a_ul_rx_rdata),
    .ul_rx_done(a_ul_rx_done), .host_mac(a_host), .loopback_en(1'b0),
    .tx_clk(a_tx_clk), .tx_rst(rst), .mac_txd(a_txd), .mac_tx_dvld(a_tx_dvld),
    .mac_tx_ack(a_tx_ack), .ul_tx_ready(a_ul_tx_ready), .ul_tx_pos(a_ul_tx_pos),
    .ul_tx_we(a_ul_tx_we), .ul_tx_wdata(a_ul_tx_wdata), .ul_tx_done(a_ul_tx_done));

  reliable_link #(.PACKET_SIZE(PS), .WINDOW(W), .UL_BYTES(UB), .MASTER_TIMEOUT(MT), .TARGET_TIMEOUT(100), .LOCAL_MAC(MAC_B)) dut_b (
    .rx_clk(b_rx_clk), .rx_rst(rst), .mac_rx(b_rx),
    .ul_rx_valid(b_ul_rx_valid), .ul_rx_pos(b_ul_rx_pos), .ul_rx_rdata(b_ul_rx_rdata),
    .ul_rx_done(b_ul_rx_done), .host_mac(b_host), .loopback_en(b_loopback),
    .tx_clk(b_tx_clk), .tx_rst(rst), .mac_txd(b_txd), .mac_tx_dvld(b_tx_dvld),
    .mac_tx_ack(b_tx_ack), .ul_tx_ready(b_ul_tx_ready), .ul_tx_pos(b_ul_tx_pos),
    .ul_tx_we(b_ul_tx_we), .ul_tx_wdata(b_ul_tx_wdata), .ul_tx_done(b_ul_tx_done));

  // ------------------------------------------------------ watchdog
  initial begin
    repeat (2000000) @(posedge a_tx_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------- channels and upper layers
  link_channel #(.SEED(32'hACE1), .PCORRUPT(5), .PLOST(5),
                 .FORCE_CORRUPT(12), .FORCE_LOST(17)) ch_ab (
    .tx_clk(a_tx_clk), .tx_dvld(a_tx_dvld), .txd(a_txd), .tx_ack(a_tx_ack),
    .rx_clk(b_rx_clk), .rx(b_rx));
  link_channel #(.SEED(32'h1D2B), .PCORRUPT(5), .PLOST(5),
                 .FORCE_CORRUPT(9), .FORCE_LOST(21)) ch_ba (
    .tx_clk(b_tx_clk), .tx_dvld(b_tx_dvld), .txd(b_txd), .tx_ack(b_tx_ack),
    .rx_clk(a_rx_clk), .rx(a_rx));

  logic go = 0, stall_a = 0, stall_b = 0;
  // A's upper layer: wr_a/rd_a in the normal phase, wr_l/rd_l (packets that
  // B sends back) in the loopback phase
  logic lb_phase = 0;
  logic wa_we, wa_done, wl_we, wl_done, ra_done, rl_done;
  logic [UPW-1:0] wa_pos, wl_pos, ra_pos, rl_pos;
  logic [8*UB-1:0] wa_wdata, wl_wdata;
  ul_writer #(.DIR(0), .UW(UW), .UB(UB), .NPKT(NPKT)) wr_a (
    .clk(a_tx_clk), .go(go), .ready(a_ul_tx_ready && !lb_phase), .we(wa_we), .pos(wa_pos),
    .wdata(wa_wdata), .done(wa_done));
  ul_writer #(.DIR(2), .UW(UW), .UB(UB), .NPKT(NLB)) wr_l (
    .clk(a_tx_clk), .go(lb_phase), .ready(a_ul_tx_ready && lb_phase), .we(wl_we), .pos(wl_pos),
    .wdata(wl_wdata), .done(wl_done));
  assign a_ul_tx_we    = lb_phase ? wl_we    : wa_we;
  assign a_ul_tx_pos   = lb_phase ? wl_pos   : wa_pos;
  assign a_ul_tx_wdata = lb_phase ? wl_wdata : wa_wdata;
  assign a_ul_tx_done  = lb_phase ? wl_done  : wa_done;
  ul_writer #(.DIR(1), .UW(UW), .UB(UB), .NPKT(NPKT)) wr_b (
    .clk(b_tx_clk), .go(go), .ready(b_ul_tx_ready), .we(b_ul_tx_we), .pos(b_ul_tx_pos),
    .wdata(b_ul_tx_wdata), .done(b_ul_tx_done));
  ul_reader #(.DIR(0), .UW(UW), .UB(UB)) rd_b (
    .clk(b_rx_clk), .valid(b_ul_rx_valid), .stall(stall_b), .pos(b_ul_rx_pos),
    .rdata(b_ul_rx_rdata), .done(b_ul_rx_done));
  ul_reader #(.DIR(1), .UW(UW), .UB(UB)) rd_a (
    .clk(a_rx_clk), .valid(a_ul_rx_valid && !lb_phase), .stall(stall_a), .pos(ra_pos),
    .rdata(a_ul_rx_rdata), .done(ra_done));
  ul_reader #(.DIR(2), .UW(UW), .UB(UB)) rd_l (
    .clk(a_rx_clk), .valid(a_ul_rx_valid && lb_phase), .stall(1'b0), .pos(rl_pos),
    .rdata(a_ul_rx_rdata), .done(rl_done));
  assign a_ul_rx_pos  = lb_phase ? rl_pos  : ra_pos;
  assign a_ul_rx_done = lb_phase ? rl_done : ra_done;

  // ------------------------------------------------- mechanism counters
  int n_host_update = 0, n_arq_rst = 0, n_filtered = 0, n_timeout = 0, n_dup_drop = 0;
  int n_ahead = 0, n_ack_hit = 0, n_looped = 0;
  int n_corrupt, n_lost, n_ackonly, n_busy, n_window_full;
  logic a_rst_q = 0, b_rst_q = 0;
  always @(posedge a_rx_clk) if (!rst) begin
    if (dut_a.u_magic.host_update) n_host_update++;
    if (dut_a.u_magic.arq_rst && !a_rst_q) n_arq_rst++;
    a_rst_q <= dut_a.u_magic.arq_rst;
    if (dut_a.u_rx_link.cnt == 16'd15 && a_rx.dvld && !dut_a.u_rx_link.filter_ok) n_filtered++;
    if (dut_a.u_target.valid && !dut_a.u_target.in_window && dut_a.u_target.ahead) n_ahead++;
    if (dut_a.u_target.valid && !(dut_a.u_target.in_window && !dut_a.u_target.rcv[dut_a.u_target.req_slot]) && !dut_a.u_target.ahead) n_dup_drop++;
  end
  always @(posedge b_rx_clk) if (!rst) begin
    if (dut_b.u_magic.host_update) n_host_update++;
    if (dut_b.u_magic.arq_rst && !b_rst_q) n_arq_rst++;
    b_rst_q <= dut_b.u_magic.arq_rst;
    if (dut_b.u_rx_link.cnt == 16'd15 && b_rx.dvld && !dut_b.u_rx_link.filter_ok) n_filtered++;
    if (dut_b.u_target.valid && !dut_b.u_target.in_window && dut_b.u_target.ahead) n_ahead++;
    if (dut_b.u_target.valid && !(dut_b.u_target.in_window && !dut_b.u_target.rcv[dut_b.u_target.req_slot]) && !dut_b.u_target.ahead) n_dup_drop++;
  end
  always @(posedge a_tx_clk) if (!rst) begin
    if (dut_a.u_master.tmr_expire) n_timeout++;
    if (dut_a.u_master.ack_hit) n_ack_hit++;
  end
  always @(posedge b_tx_clk) if (!rst) begin
    if (dut_b.u_loopback.tx_done) n_looped++;
    if (dut_b.u_master.tmr_expire) n_timeout++;
    if (dut_b.u_master.ack_hit) n_ack_hit++;
  end

  // ------------------------------------------------------ main sequence
  initial begin
    int t0;
    repeat (10) @(posedge a_tx_clk);
    rst = 0;
    check(a_host == 48'h02_00_00_00_00_01 && b_host == 48'h02_00_00_00_00_01,
          "both ends start with the default host address");
    // a frame from the peer before registration is filtered
    ch_ba.inject(MAC_B, ETH_TYPE_LINK, 0, 17 + PS);
    repeat (3 * (PS + 40)) @(posedge a_tx_clk);
    // register each end's peer with a magic packet
    ch_ba.inject(MAC_B, ETH_TYPE_MAGIC, 1, 60);
    ch_ab.inject(MAC_A, ETH_TYPE_MAGIC, 1, 60);
    repeat (3 * (PS + 40)) @(posedge a_tx_clk);
    check(a_host == MAC_B && b_host == MAC_A, "magic packets registered the peers");
    go = 1;
    // B's reader stalls for a while once traffic runs
    wait (rd_b.cnt >= 2);
    stall_b = 1;
    repeat (2000) @(posedge b_rx_clk);
    stall_b = 0;
    // a foreign frame in the middle of the traffic
    ch_ab.inject(FOREIGN, ETH_TYPE_LINK, 0, 17 + PS);
    t0 = 0;
    while (!(rd_a.cnt == NPKT && rd_b.cnt == NPKT && dut_a.u_master.fill == 0 && dut_b.u_master.fill == 0)) begin
      @(posedge a_tx_clk);
      t0++;
    end
    $display("all %0d packets delivered both ways after %0d cycles", NPKT, t0);
    check(rd_a.cnt == NPKT && rd_b.cnt == NPKT, "every packet delivered");
    check(rd_a.n_bad == 0 && rd_b.n_bad == 0, "no corrupted payload delivered");
    repeat (4 * (PS + 40)) @(posedge a_tx_clk);
    check(rd_a.cnt == NPKT && rd_b.cnt == NPKT, "no packet delivered twice");
    n_corrupt = ch_ab.n_corrupt + ch_ba.n_corrupt;
    n_lost = ch_ab.n_lost + ch_ba.n_lost;
    n_ackonly = ch_ab.n_ackonly + ch_ba.n_ackonly;
    n_busy = ch_ab.n_busy + ch_ba.n_busy;
    n_window_full = wr_a.n_window_full + wr_b.n_window_full;
    $display("frames A->B %0d, B->A %0d, data %0d, ACK-only %0d, corrupted %0d, lost %0d",
             ch_ab.n_frames, ch_ba.n_frames, ch_ab.n_data + ch_ba.n_data,
             ch_ab.n_ackonly + ch_ba.n_ackonly, n_corrupt, n_lost);
    $display("magic %0d, ARQ resets %0d, filtered %0d, timeouts %0d, duplicate drops %0d, ahead %0d, ACK hits %0d, window full %0d, MAC busy %0d",
             n_host_update, n_arq_rst, n_filtered, n_timeout, n_dup_drop, n_ahead, n_ack_hit,
             n_window_full, n_busy);
    // mode switch: B loops A's packets back; A checks what returns
    b_loopback = 1;
    repeat (8) @(posedge a_tx_clk);
    lb_phase = 1;
    t0 = 0;
    while (!(rd_l.cnt == NLB && dut_a.u_master.fill == 0 && dut_b.u_master.fill == 0)) begin
      @(posedge a_tx_clk);
      t0++;
    end
    $display("%0d packets looped back after %0d cycles", NLB, t0);
    check(n_looped == NLB && rd_l.cnt == NLB && rd_l.n_bad == 0,
          "loopback returned every packet intact");
    check(rd_b.cnt == NPKT, "loopback mode keeps packets from B's upper layer");
    // four packet lengths at least: received, read, written, sent
    check(t0 > 4 * PS, "loop round trip of at least four packet lengths");
    check(n_host_update == 2, "magic packet taken by both ends");
    check(n_arq_rst == 2, "ARQ reset by both magic packets");
    // two magic packets, one frame before registration, one foreign frame
    check(n_filtered >= 4, "frames filtered");
    check(n_corrupt > 0, "corrupted frame seen");
    check(n_lost > 0, "lost frame seen");
    check(n_timeout > 0, "master timeout and resend");
    check(n_dup_drop > 0, "duplicate dropped by a target");
    check(n_ahead > 0, "frame ahead of a target's window");
    check(n_ackonly > 0, "ACK-only frame sent");
    check(n_ack_hit > 0, "cumulative ACK retired packets");
    check(n_window_full > 0, "transmit window full");
    check(n_busy > 0, "MAC busy before taking a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
