// cdc_word_sync: carries a word, plus a sticky flag bit, from one clock
// domain to another with a toggle request/acknowledge handshake.
//
// The receive and transmit halves of the link run on unrelated clocks, and
// only a few values cross between them: received ACK numbers (rx_link to the
// ARQ master), the target's ACK number and ACK requests (to tx_link), the
// registered host address and the ARQ reset. All of them are "latest value"
// quantities, so this unit keeps only the newest word written while a
// transfer is in flight; the flag is ORed over all words it merges, so a
// request is never lost.
//
// Source side: src_valid with src_data/src_flag loads the word. When no
// transfer is in flight the word is copied into a holding register and a
// request toggle flips; the holding register stays stable until the
// destination has taken it. Destination side: the toggle passes two flip-flops,
// then dst_data/dst_flag are loaded from the holding register and dst_valid
// pulses for one cycle; an acknowledge toggle goes back through two
// flip-flops. Latency about three destination plus three source cycles per
// word. Both resets are synchronous, active high, and must overlap.
//
// The document keeps the rx and tx sides in separate clock domains and asks
// for as little, and careful, crossing as possible; this handshake is this
// design's way of doing it.
module cdc_word_sync #(
  parameter int unsigned WIDTH = 8,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             src_clk,
  input  logic             src_rst,
  input  logic             src_valid,
  input  logic [WIDTH-1:0] src_data,
  input  logic             src_flag,
  input  logic             dst_clk,
  input  logic             dst_rst,
  output logic             dst_valid,
  output logic [WIDTH-1:0] dst_data,
  output logic             dst_flag
);

  // ---------------------------------------------------------- source side
  logic             pend, pend_flag, busy, req_tgl;
  logic [WIDTH-1:0] pend_data, hold_data;
  logic             hold_flag;
  logic [1:0]       ack_sync;
  logic             ack_tgl;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      pend      <= 1'b0;
      pend_flag <= 1'b0;
      pend_data <= RESET_VALUE;
      hold_data <= RESET_VALUE;
      hold_flag <= 1'b0;
      busy      <= 1'b0;
      req_tgl   <= 1'b0;
      ack_sync  <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_tgl};
      if (busy && ack_sync[1] == req_tgl) busy <= 1'b0;
      if (!busy && (pend || src_valid)) begin
        hold_data <= src_valid ? src_data : pend_data;
        hold_flag <= pend_flag | (src_valid & src_flag);
        req_tgl   <= ~req_tgl;
        busy      <= 1'b1;
        pend      <= 1'b0;
        pend_flag <= 1'b0;
      end else if (src_valid) begin
        pend      <= 1'b1;
        pend_data <= src_data;
        pend_flag <= pend_flag | src_flag;
      end
    end
  end

  // ----------------------------------------------------- destination side
  logic [1:0] req_sync;

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      req_sync  <= '0;
      ack_tgl   <= 1'b0;
      dst_valid <= 1'b0;
      dst_data  <= RESET_VALUE;
      dst_flag  <= 1'b0;
    end else begin
      req_sync  <= {req_sync[0], req_tgl};
      dst_valid <= 1'b0;
      if (req_sync[1] != ack_tgl) begin
        ack_tgl   <= req_sync[1];
        dst_data  <= hold_data;
        dst_flag  <= hold_flag;
        dst_valid <= 1'b1;
      end
    end
  end

endmodule
