// packet_buffer: dual-port, dual-clock packet memory shared by the ARQ, the
// network layer and the upper layer.
//
// The memory holds WINDOW slots of PACKET_SIZE bytes. An access names a slot W
// (supplied by the ARQ from its sliding window) and a position P inside the
// slot (supplied by the network layer or the upper layer); the physical
// address is W * PACKET_SIZE + P. Neither the network layer nor the upper
// layer needs to know the window size or where the window currently is.
//
// Port "net" is byte wide and faces the network layer; port "ul" is UL_BYTES
// bytes wide and faces the upper layer. Each port has its own clock, so the
// two sides may run at different rates and widths. NET_WRITES selects the
// direction: 1 gives the rx_buffer (network writes, upper layer reads), 0 the
// tx_buffer (upper layer writes, network reads). Reads have one cycle of
// latency, like a Virtex-5 block RAM. The upper-layer position counts
// UL_BYTES-byte words; byte k of a word is at byte position UL_BYTES*P + k and
// sits in bits [8k+7:8k].
//
// Slot/position addressing, dual-port operation and the two directions follow
// the document; the word width of the upper-layer port and the little-endian
// byte order inside a word are this design's choices.
module packet_buffer #(
  parameter int unsigned WINDOW      = 16,
  parameter int unsigned PACKET_SIZE = 1500,
  parameter int unsigned UL_BYTES    = 4,
  parameter bit          NET_WRITES  = 1'b1,
  localparam int unsigned SLOT_W  = (WINDOW > 1) ? $clog2(WINDOW) : 1,
  localparam int unsigned NPOS_W  = $clog2(PACKET_SIZE),
  localparam int unsigned UL_WORDS = PACKET_SIZE / UL_BYTES,
  localparam int unsigned UPOS_W  = (UL_WORDS > 1) ? $clog2(UL_WORDS) : 1
) (
  // network-layer side, byte wide
  input  logic                    net_clk,
  input  logic [SLOT_W-1:0]       net_slot,
  input  logic [NPOS_W-1:0]       net_pos,
  input  logic                    net_we,
  input  logic [7:0]              net_wdata,
  output logic [7:0]              net_rdata,
  // upper-layer side, UL_BYTES wide
  input  logic                    ul_clk,
  input  logic [SLOT_W-1:0]       ul_slot,
  input  logic [UPOS_W-1:0]       ul_pos,
  input  logic                    ul_we,
  input  logic [8*UL_BYTES-1:0]   ul_wdata,
  output logic [8*UL_BYTES-1:0]   ul_rdata
);

  localparam int unsigned DEPTH  = WINDOW * UL_WORDS;
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned LANE_W = (UL_BYTES > 1) ? $clog2(UL_BYTES) : 1;

  initial begin
    assert (PACKET_SIZE % UL_BYTES == 0)
      else $error("packet_buffer: PACKET_SIZE must be a multiple of UL_BYTES");
  end

  logic [8*UL_BYTES-1:0] mem [DEPTH];

  // (W, P) -> word address and byte lane
  logic [ADDR_W-1:0] net_addr, ul_addr;
  logic [LANE_W-1:0] net_lane;

  always_comb begin
    net_addr = ADDR_W'(32'(net_slot) * UL_WORDS + 32'(net_pos) / UL_BYTES);
    net_lane = LANE_W'(32'(net_pos) % UL_BYTES);
    ul_addr  = ADDR_W'(32'(ul_slot) * UL_WORDS + 32'(ul_pos));
  end

  logic [8*UL_BYTES-1:0] net_word_q;
  logic [LANE_W-1:0]     net_lane_q;

  if (NET_WRITES) begin : g_rx_buffer
    // network side writes single bytes, upper layer reads whole words
    always_ff @(posedge net_clk) begin
      if (net_we) mem[net_addr][8*net_lane +: 8] <= net_wdata;
    end
    always_ff @(posedge ul_clk) begin
      ul_rdata <= mem[ul_addr];
    end
    assign net_word_q = '0;
    assign net_lane_q = '0;
    assign net_rdata  = '0;
  end else begin : g_tx_buffer
    // upper layer writes whole words, network side reads single bytes
    always_ff @(posedge ul_clk) begin
      if (ul_we) mem[ul_addr] <= ul_wdata;
    end
    always_ff @(posedge net_clk) begin
      net_word_q <= mem[net_addr];
      net_lane_q <= net_lane;
    end
    assign net_rdata = net_word_q[8*net_lane_q +: 8];
    assign ul_rdata  = '0;
  end

endmodule
