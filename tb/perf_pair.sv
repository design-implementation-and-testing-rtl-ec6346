// perf_pair: testbench helper that measures the payload throughput of a link
// between two reliable_link ends for one configuration.
//
// Two ends, A and B, with the given PACKET_SIZE, WINDOW and TARGET_TIMEOUT
// are joined by two link_channel models. By default they lose and corrupt
// nothing (the busy wait before tx_ack and the 12-byte inter-frame gap
// remain); with PERR set, each channel corrupts PERR percent of the frames
// and loses another PERR percent, drawn from its own seed. Both ends
// use DEFAULT_HOST_MAC as their own address, so each accepts the other with
// no magic packet. The upper layers are ul_writer and ul_reader: fast enough
// not to limit the link, as in a throughput test. A sends NPKT packets to B;
// B sends NPKT packets to A too when DUPLEX is set, otherwise none (B then
// returns only ACK-only frames). With LOOPBACK set, B runs in loopback mode
// instead: its loopback unit is the upper layer and returns every packet
// from A, which A's reader then checks against what A sent.
//
// All clocks run at 125 MHz, so one byte per cycle is 1 Gbit/s. The rate of a
// direction is measured at the receiving upper layer, from the first to the
// last packet delivered: (packets - 1) x PACKET_SIZE bytes over that time,
// in MB/s (rate_ab from A to B, rate_ba from B to A; in loopback mode only
// rate_ba, the rate at which echoed packets return). finished goes high when
// every packet has been delivered.
module perf_pair
  import link_pkg::*;
#(
  parameter int unsigned PS     = 1500,
  parameter int unsigned W      = 16,
  parameter int unsigned TT     = 500,
  parameter int unsigned NPKT   = 32,
  parameter bit          DUPLEX = 1'b1,
  parameter bit          LOOPBACK = 1'b0,
  parameter int unsigned MT     = 125000,
  parameter int unsigned PERR   = 0,
  parameter int unsigned SEED_AB = 32'h3A5C,
  parameter int unsigned SEED_BA = 32'h7E11
) (
  input  logic rst,
  output logic finished
);

  localparam int unsigned UB  = 4;
  localparam int unsigned UW  = PS / UB;
  localparam int unsigned UPW = (UW > 1) ? $clog2(UW) : 1;
  localparam mac_addr_t   PEER = 48'h02_00_00_00_00_01;

  real rate_ab = 0.0, rate_ba = 0.0;
  int  n_bad;

  logic a_rx_clk = 0, a_tx_clk = 0, b_rx_clk = 0, b_tx_clk = 0;
  initial begin
    #1.0 forever #4 a_tx_clk = ~a_tx_clk;
  end
  initial begin
    #2.0 forever #4 b_rx_clk = ~b_rx_clk;
  end
  initial begin
    #3.0 forever #4 b_tx_clk = ~b_tx_clk;
  end
  initial begin
    #0.5 forever #4 a_rx_clk = ~a_rx_clk;
  end

  mac_rx_t  a_rx, b_rx;
  logic [7:0] a_txd, b_txd;
  logic a_tx_dvld, b_tx_dvld, a_tx_ack, b_tx_ack;
  mac_addr_t a_host, b_host;
  logic a_ul_rx_valid, b_ul_rx_valid, a_ul_rx_done, b_ul_rx_done;
  logic [UPW-1:0] a_ul_rx_pos, b_ul_rx_pos, a_ul_tx_pos, b_ul_tx_pos;
  logic [8*UB-1:0] a_ul_rx_rdata, b_ul_rx_rdata, a_ul_tx_wdata, b_ul_tx_wdata;
  logic a_ul_tx_ready, b_ul_tx_ready, a_ul_tx_we, b_ul_tx_we, a_ul_tx_done, b_ul_tx_done;

  reliable_link #(.PACKET_SIZE(PS), .WINDOW(W), .UL_BYTES(UB), .TARGET_TIMEOUT(TT),
                  .MASTER_TIMEOUT(MT), .LOCAL_MAC(PEER)) dut_a (
    .rx_clk(a_rx_clk), .rx_rst(rst), .mac_rx(a_rx),
    .ul_rx_valid(a_ul_rx_valid), .ul_rx_pos(a_ul_rx_pos), .ul_rx_rdata(a_ul_rx_rdata),
    .ul_rx_done(a_ul_rx_done), .host_mac(a_host), .loopback_en(1'b0),
    .tx_clk(a_tx_clk), .tx_rst(rst), .mac_txd(a_txd), .mac_tx_dvld(a_tx_dvld),
    .mac_tx_ack(a_tx_ack), .ul_tx_ready(a_ul_tx_ready), .ul_tx_pos(a_ul_tx_pos),
    .ul_tx_we(a_ul_tx_we), .ul_tx_wdata(a_ul_tx_wdata), .ul_tx_done(a_ul_tx_done));

  reliable_link #(.PACKET_SIZE(PS), .WINDOW(W), .UL_BYTES(UB), .TARGET_TIMEOUT(TT),
                  .MASTER_TIMEOUT(MT), .LOCAL_MAC(PEER)) dut_b (
    .rx_clk(b_rx_clk), .rx_rst(rst), .mac_rx(b_rx),
    .ul_rx_valid(b_ul_rx_valid), .ul_rx_pos(b_ul_rx_pos), .ul_rx_rdata(b_ul_rx_rdata),
    .ul_rx_done(b_ul_rx_done), .host_mac(b_host), .loopback_en(LOOPBACK),
    .tx_clk(b_tx_clk), .tx_rst(rst), .mac_txd(b_txd), .mac_tx_dvld(b_tx_dvld),
    .mac_tx_ack(b_tx_ack), .ul_tx_ready(b_ul_tx_ready), .ul_tx_pos(b_ul_tx_pos),
    .ul_tx_we(b_ul_tx_we), .ul_tx_wdata(b_ul_tx_wdata), .ul_tx_done(b_ul_tx_done));

  link_channel #(.SEED(SEED_AB), .PCORRUPT(PERR), .PLOST(PERR),
                 .FORCE_CORRUPT(32'hFFFF_FFFF), .FORCE_LOST(32'hFFFF_FFFF)) ch_ab (
    .tx_clk(a_tx_clk), .tx_dvld(a_tx_dvld && !rst), .txd(a_txd), .tx_ack(a_tx_ack),
    .rx_clk(b_rx_clk), .rx(b_rx));
  link_channel #(.SEED(SEED_BA), .PCORRUPT(PERR), .PLOST(PERR),
                 .FORCE_CORRUPT(32'hFFFF_FFFF), .FORCE_LOST(32'hFFFF_FFFF)) ch_ba (
    .tx_clk(b_tx_clk), .tx_dvld(b_tx_dvld && !rst), .txd(b_txd), .tx_ack(b_tx_ack),
    .rx_clk(a_rx_clk), .rx(a_rx));

  logic go = 0;
  ul_writer #(.DIR(0), .UW(UW), .UB(UB), .NPKT(NPKT)) wr_a (
    .clk(a_tx_clk), .go(go), .ready(a_ul_tx_ready), .we(a_ul_tx_we), .pos(a_ul_tx_pos),
    .wdata(a_ul_tx_wdata), .done(a_ul_tx_done));
  ul_writer #(.DIR(1), .UW(UW), .UB(UB), .NPKT((DUPLEX && !LOOPBACK) ? NPKT : 0)) wr_b (
    .clk(b_tx_clk), .go(go), .ready(b_ul_tx_ready), .we(b_ul_tx_we), .pos(b_ul_tx_pos),
    .wdata(b_ul_tx_wdata), .done(b_ul_tx_done));
  ul_reader #(.DIR(0), .UW(UW), .UB(UB)) rd_b (
    .clk(b_rx_clk), .valid(b_ul_rx_valid), .stall(1'b0), .pos(b_ul_rx_pos),
    .rdata(b_ul_rx_rdata), .done(b_ul_rx_done));
  ul_reader #(.DIR(LOOPBACK ? 0 : 1), .UW(UW), .UB(UB)) rd_a (
    .clk(a_rx_clk), .valid(a_ul_rx_valid), .stall(1'b0), .pos(a_ul_rx_pos),
    .rdata(a_ul_rx_rdata), .done(a_ul_rx_done));

  // delivery times, in cycles of the receiving clock
  int t_b = 0, t_a = 0, first_b = -1, last_b = -1, first_a = -1, last_a = -1;
  always @(posedge b_rx_clk) if (!rst) begin
    t_b++;
    if (b_ul_rx_done) begin
      if (first_b < 0) first_b = t_b;
      last_b = t_b;
    end
  end
  always @(posedge a_rx_clk) if (!rst) begin
    t_a++;
    if (a_ul_rx_done) begin
      if (first_a < 0) first_a = t_a;
      last_a = t_a;
    end
  end

  function automatic real mbps(int n, int t0, int t1);
    if (n < 2 || t1 <= t0) return 0.0;
    // bytes per cycle x 125 MHz
    return real'((n - 1) * PS) / real'(t1 - t0) * 125.0;
  endfunction

  initial begin
    finished = 0;
    wait (!rst);
    repeat (20) @(posedge a_tx_clk);
    go = 1;
    if (LOOPBACK) wait (rd_a.cnt >= NPKT);
    else wait (rd_b.cnt >= NPKT && (!DUPLEX || rd_a.cnt >= NPKT));
    repeat (4) @(posedge a_tx_clk);
    rate_ab = mbps(rd_b.cnt, first_b, last_b);
    rate_ba = mbps(rd_a.cnt, first_a, last_a);
    n_bad = rd_a.n_bad + rd_b.n_bad;
    if (LOOPBACK)
      $display("PS %5d  W %2d  loopback: A->B->A %6.1f MB/s", PS, W, rate_ba);
    else if (DUPLEX)
      $display("PS %5d  W %2d  duplex : A->B %6.1f MB/s  B->A %6.1f MB/s", PS, W, rate_ab, rate_ba);
    else
      $display("PS %5d  W %2d  one way: A->B %6.1f MB/s", PS, W, rate_ab);
    finished = 1;
  end

endmodule
