// link_pkg: constants and types shared by the reliable-link modules.
//
// Frame layout seen by the network layer (the MAC adds preamble, pad and FCS
// on transmit and removes them on receive):
//
//   byte  0..5   destination MAC address
//   byte  6..11  source MAC address
//   byte 12..13  Type/Length field, 0x8899 for link traffic, 0x0F0F for the
//                magic (reset / host registration) packet
//   byte 14      SEQ number of the packet
//   byte 15      ACK number (cumulative: this and every older SEQ arrived)
//   byte 16      seqv: non-zero when the frame carries payload, zero for an
//                ACK-only frame
//   byte 17..    payload, PACKET_SIZE bytes, written to position 0.. of a
//                packet-buffer slot
//
// The 17-byte header, the two Type values and the "RESET" codeword follow the
// document; the seqv encoding (0x01 / 0x00) is this design's choice.
package link_pkg;

  localparam int unsigned ETH_HDR_BYTES  = 14;
  localparam int unsigned LINK_HDR_BYTES = 17;

  localparam logic [15:0] ETH_TYPE_LINK  = 16'h8899;
  localparam logic [15:0] ETH_TYPE_MAGIC = 16'h0F0F;

  // Codeword carried in the first payload bytes of a magic packet: ASCII "RESET".
  localparam int unsigned MAGIC_LEN = 5;
  localparam logic [8*MAGIC_LEN-1:0] MAGIC_WORD = 40'h52_45_53_45_54;

  localparam logic [7:0] SEQV_DATA = 8'h01;
  localparam logic [7:0] SEQV_ACK  = 8'h00;

  typedef logic [47:0] mac_addr_t;

  // Client side of the MAC receive interface (driven entirely by the MAC).
  typedef struct packed {
    logic [7:0] data;       // received byte
    logic       dvld;       // byte valid, high for the whole frame
    logic       goodframe;  // one-cycle pulse after the frame: FCS correct
    logic       badframe;   // one-cycle pulse after the frame: FCS wrong
  } mac_rx_t;

endpackage
