// reliable_link: FPGA end of a reliable, full-duplex packet link over
// Gigabit Ethernet, between the client interface of an Ethernet MAC and an
// upper-layer application.
//
// Structure (receive clock domain on the left, transmit domain on the right):
//
//   MAC rx --> rx_link ----------> arq_target          arq_master <--- upper layer tx
//     |           | payload            |  ul_valid          |  ul_ready
//     |           v                    v                    v
//     |        rx_buffer ---------> upper layer rx       tx_buffer ---> tx_link ---> MAC tx
//     +--> magic_packet     loopback (optional: upper layer rx -> upper layer tx)
//
//   crossings (cdc_word_sync): received ACK numbers rx_link -> arq_master,
//   ACK number and ACK requests arq_target -> tx_link, registered host
//   address magic_packet -> tx_link; the magic packet's ARQ reset reaches the
//   master through a two-flip-flop synchroniser.
//
// rx_link filters, samples and stores incoming frames under the direction of
// arq_target; arq_target hands complete packets to the upper layer in order
// and acknowledges them. The upper layer fills tx_buffer slots handed out by
// arq_master, which numbers, sends (through tx_link), retires on ACK and
// resends on timeout. tx_link builds data frames (carrying the latest ACK
// number too) and ACK-only frames. magic_packet lets a host register itself
// and reset the ARQ over the wire.
//
// Loopback mode (loopback_en high, receive domain, change it only while the
// link is idle): the upper-layer ports are disconnected and a loopback unit
// sends every received packet straight back to the host, so a host can check
// the link end to end with no application on the FPGA.
//
// Upper-layer interfaces. Receive (rx_clk): ul_rx_valid says a packet is
// ready; read its UL_BYTES-wide words by position ul_rx_pos (data one cycle
// later on ul_rx_rdata) and pulse ul_rx_done. Transmit (tx_clk): when
// ul_tx_ready, write PACKET_SIZE/UL_BYTES words with ul_tx_we/ul_tx_pos/
// ul_tx_wdata and pulse ul_tx_done. The buffer slot is chosen by the ARQ and
// is not visible to the upper layer.
//
// MAC interfaces follow the Virtex-5 embedded MAC client: receive byte, data
// valid, good/bad frame strobes; transmit byte, data valid and ack. The MAC
// itself (FCS, padding, GMII) and the PHY are outside this design.
//
// The partition into these blocks, the protocol and the frame format follow
// the document. Timeout values, the MAC addresses and the upper-layer word
// width are this design's defaults. Resets are synchronous, active high, one
// per clock domain, and should be asserted together at power-up.
module reliable_link
  import link_pkg::*;
#(
  parameter int unsigned PACKET_SIZE      = 1500,
  parameter int unsigned WINDOW           = 16,
  parameter int unsigned UL_BYTES         = 4,
  parameter int unsigned MASTER_TIMEOUT   = 125000,
  parameter int unsigned TARGET_TIMEOUT   = 500,
  parameter mac_addr_t   LOCAL_MAC        = 48'h02_00_00_00_00_A5,
  parameter mac_addr_t   DEFAULT_HOST_MAC = 48'h02_00_00_00_00_01,
  localparam int unsigned UL_WORDS = PACKET_SIZE / UL_BYTES,
  localparam int unsigned UPOS_W   = (UL_WORDS > 1) ? $clog2(UL_WORDS) : 1
) (
  // receive clock domain
  input  logic                  rx_clk,
  input  logic                  rx_rst,
  input  mac_rx_t               mac_rx,
  output logic                  ul_rx_valid,
  input  logic [UPOS_W-1:0]     ul_rx_pos,
  output logic [8*UL_BYTES-1:0] ul_rx_rdata,
  input  logic                  ul_rx_done,
  output mac_addr_t             host_mac,
  input  logic                  loopback_en,
  // transmit clock domain
  input  logic                  tx_clk,
  input  logic                  tx_rst,
  output logic [7:0]            mac_txd,
  output logic                  mac_tx_dvld,
  input  logic                  mac_tx_ack,
  output logic                  ul_tx_ready,
  input  logic [UPOS_W-1:0]     ul_tx_pos,
  input  logic                  ul_tx_we,
  input  logic [8*UL_BYTES-1:0] ul_tx_wdata,
  input  logic                  ul_tx_done
);

  localparam int unsigned SLOT_W = (WINDOW > 1) ? $clog2(WINDOW) : 1;
  localparam int unsigned NPOS_W = $clog2(PACKET_SIZE);

  // ============================================================ rx domain
  logic              host_update, arq_rst_rx, tgt_rst;
  logic              tgt_valid, tgt_next, tgt_write, tgt_drop, tgt_writenext;
  logic [7:0]        tgt_seq;
  logic [SLOT_W-1:0] tgt_writebuf, rx_ul_slot;
  logic              rxb_we;
  logic [NPOS_W-1:0] rxb_pos;
  logic [7:0]        rxb_wdata;
  logic              rx_ack_valid;
  logic [7:0]        rx_ack_num;
  logic [7:0]        tgt_ack_num;
  logic              tgt_ack_update, tgt_ack_req;
  // upper-layer receive interface as seen by the target and rx_buffer
  logic              rx_valid_i, rx_done_i;
  logic [UPOS_W-1:0] rx_pos_i;
  logic              lb_rx_done;
  logic [UPOS_W-1:0] lb_rx_pos;

  magic_packet #(
    .DEFAULT_HOST_MAC(DEFAULT_HOST_MAC)
  ) u_magic (
    .clk        (rx_clk),
    .rst        (rx_rst),
    .rx         (mac_rx),
    .host_mac   (host_mac),
    .host_update(host_update),
    .arq_rst    (arq_rst_rx)
  );

  assign tgt_rst = rx_rst | arq_rst_rx;

  rx_link #(
    .PACKET_SIZE(PACKET_SIZE)
  ) u_rx_link (
    .clk          (rx_clk),
    .rst          (rx_rst),
    .rx           (mac_rx),
    .host_mac     (host_mac),
    .tgt_valid    (tgt_valid),
    .tgt_seq      (tgt_seq),
    .tgt_next     (tgt_next),
    .tgt_write    (tgt_write),
    .tgt_drop     (tgt_drop),
    .tgt_writenext(tgt_writenext),
    .buf_we       (rxb_we),
    .buf_pos      (rxb_pos),
    .buf_wdata    (rxb_wdata),
    .ack_valid    (rx_ack_valid),
    .ack_num      (rx_ack_num)
  );

  arq_target #(
    .WINDOW        (WINDOW),
    .TARGET_TIMEOUT(TARGET_TIMEOUT)
  ) u_target (
    .clk       (rx_clk),
    .rst       (tgt_rst),
    .valid     (tgt_valid),
    .seq       (tgt_seq),
    .next      (tgt_next),
    .write     (tgt_write),
    .drop      (tgt_drop),
    .writebuf  (tgt_writebuf),
    .writenext (tgt_writenext),
    .ul_valid  (rx_valid_i),
    .ul_slot   (rx_ul_slot),
    .ul_done   (rx_done_i),
    .ack_num   (tgt_ack_num),
    .ack_update(tgt_ack_update),
    .ack_req   (tgt_ack_req)
  );

  packet_buffer #(
    .WINDOW     (WINDOW),
    .PACKET_SIZE(PACKET_SIZE),
    .UL_BYTES   (UL_BYTES),
    .NET_WRITES (1'b1)
  ) u_rx_buffer (
    .net_clk  (rx_clk),
    .net_slot (tgt_writebuf),
    .net_pos  (rxb_pos),
    .net_we   (rxb_we),
    .net_wdata(rxb_wdata),
    .net_rdata(),
    .ul_clk   (rx_clk),
    .ul_slot  (rx_ul_slot),
    .ul_pos   (rx_pos_i),
    .ul_we    (1'b0),
    .ul_wdata ('0),
    .ul_rdata (ul_rx_rdata)
  );

  // in loopback mode the received packets go to the loopback unit, not out
  assign ul_rx_valid = rx_valid_i & ~loopback_en;
  assign rx_done_i   = loopback_en ? lb_rx_done : ul_rx_done;
  assign rx_pos_i    = loopback_en ? lb_rx_pos  : ul_rx_pos;

  // ====================================================== domain crossings
  logic       m_ack_valid;
  logic [7:0] m_ack_num;
  logic       tx_tgt_valid, tx_tgt_flag;
  logic [7:0] tx_tgt_ack;
  logic       tx_host_valid;
  mac_addr_t  tx_host_word;
  logic [1:0] arq_rst_sync;
  logic       master_rst;
  logic [1:0] lb_en_sync;

  cdc_word_sync #(.WIDTH(8)) u_sync_rx_ack (
    .src_clk(rx_clk), .src_rst(rx_rst),
    .src_valid(rx_ack_valid), .src_data(rx_ack_num), .src_flag(1'b0),
    .dst_clk(tx_clk), .dst_rst(tx_rst),
    .dst_valid(m_ack_valid), .dst_data(m_ack_num), .dst_flag()
  );

  // the target's ACK number restarts at 255 after an ARQ reset, so the reset
  // value on the tx side matches
  cdc_word_sync #(.WIDTH(8), .RESET_VALUE(8'hFF)) u_sync_tgt_ack (
    .src_clk(rx_clk), .src_rst(rx_rst),
    .src_valid(tgt_ack_update | tgt_ack_req | arq_rst_rx),
    .src_data(arq_rst_rx ? 8'hFF : tgt_ack_num), .src_flag(tgt_ack_req),
    .dst_clk(tx_clk), .dst_rst(tx_rst),
    .dst_valid(tx_tgt_valid), .dst_data(tx_tgt_ack), .dst_flag(tx_tgt_flag)
  );

  cdc_word_sync #(.WIDTH(48), .RESET_VALUE(DEFAULT_HOST_MAC)) u_sync_host (
    .src_clk(rx_clk), .src_rst(rx_rst),
    .src_valid(host_update), .src_data(host_mac), .src_flag(1'b0),
    .dst_clk(tx_clk), .dst_rst(tx_rst),
    .dst_valid(tx_host_valid), .dst_data(tx_host_word), .dst_flag()
  );

  always_ff @(posedge tx_clk) begin
    if (tx_rst) begin
      arq_rst_sync <= '0;
      lb_en_sync   <= '0;
    end else begin
      arq_rst_sync <= {arq_rst_sync[0], arq_rst_rx};
      lb_en_sync   <= {lb_en_sync[0], loopback_en};
    end
  end
  assign master_rst = tx_rst | arq_rst_sync[1];

  // ============================================================ tx domain
  logic              m_valid, m_next;
  logic [7:0]        m_seq;
  logic [SLOT_W-1:0] m_readbuf, tx_ul_slot;
  logic [NPOS_W-1:0] txb_pos;
  logic [7:0]        txb_rdata;
  // upper-layer transmit interface as seen by the master and tx_buffer
  logic                  tx_ready_i, tx_done_i, tx_we_i;
  logic [UPOS_W-1:0]     tx_pos_i;
  logic [8*UL_BYTES-1:0] tx_wdata_i;
  logic                  lb_tx_done, lb_tx_we;
  logic [UPOS_W-1:0]     lb_tx_pos;
  logic [8*UL_BYTES-1:0] lb_tx_wdata;

  assign ul_tx_ready = tx_ready_i & ~lb_en_sync[1];
  assign tx_done_i   = lb_en_sync[1] ? lb_tx_done  : ul_tx_done;
  assign tx_we_i     = lb_en_sync[1] ? lb_tx_we    : ul_tx_we;
  assign tx_pos_i    = lb_en_sync[1] ? lb_tx_pos   : ul_tx_pos;
  assign tx_wdata_i  = lb_en_sync[1] ? lb_tx_wdata : ul_tx_wdata;

  arq_master #(
    .WINDOW        (WINDOW),
    .MASTER_TIMEOUT(MASTER_TIMEOUT)
  ) u_master (
    .clk      (tx_clk),
    .rst      (master_rst),
    .ul_ready (tx_ready_i),
    .ul_slot  (tx_ul_slot),
    .ul_done  (tx_done_i),
    .valid    (m_valid),
    .seq      (m_seq),
    .readbuf  (m_readbuf),
    .next     (m_next),
    .ack_valid(m_ack_valid),
    .ack_num  (m_ack_num)
  );

  packet_buffer #(
    .WINDOW     (WINDOW),
    .PACKET_SIZE(PACKET_SIZE),
    .UL_BYTES   (UL_BYTES),
    .NET_WRITES (1'b0)
  ) u_tx_buffer (
    .net_clk  (tx_clk),
    .net_slot (m_readbuf),
    .net_pos  (txb_pos),
    .net_we   (1'b0),
    .net_wdata('0),
    .net_rdata(txb_rdata),
    .ul_clk   (tx_clk),
    .ul_slot  (tx_ul_slot),
    .ul_pos   (tx_pos_i),
    .ul_we    (tx_we_i),
    .ul_wdata (tx_wdata_i),
    .ul_rdata ()
  );

  tx_link #(
    .PACKET_SIZE(PACKET_SIZE),
    .LOCAL_MAC  (LOCAL_MAC)
  ) u_tx_link (
    .clk      (tx_clk),
    .rst      (tx_rst),
    .m_valid  (m_valid),
    .m_seq    (m_seq),
    .m_next   (m_next),
    .ack_num  (tx_tgt_ack),
    .ack_req  (tx_tgt_valid & tx_tgt_flag),
    .host_mac (tx_host_word),
    .buf_pos  (txb_pos),
    .buf_rdata(txb_rdata),
    .txd      (mac_txd),
    .tx_dvld  (mac_tx_dvld),
    .tx_ack   (mac_tx_ack)
  );

  // ======================================================== loopback mode
  loopback #(
    .PACKET_SIZE(PACKET_SIZE),
    .UL_BYTES   (UL_BYTES)
  ) u_loopback (
    .rx_clk  (rx_clk),
    .rx_rst  (rx_rst),
    .rx_valid(rx_valid_i & loopback_en),
    .rx_pos  (lb_rx_pos),
    .rx_rdata(ul_rx_rdata),
    .rx_done (lb_rx_done),
    .tx_clk  (tx_clk),
    .tx_rst  (tx_rst),
    .tx_ready(tx_ready_i & lb_en_sync[1]),
    .tx_pos  (lb_tx_pos),
    .tx_we   (lb_tx_we),
    .tx_wdata(lb_tx_wdata),
    .tx_done (lb_tx_done)
  );

  // tx_host_valid only marks an update; the word itself is held by the sync
  logic unused_tx_host_valid;
  assign unused_tx_host_valid = tx_host_valid;

endmodule
