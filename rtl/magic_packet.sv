// magic_packet: recognises the "magic packet" that registers a host and
// resets the ARQ remotely.
//
// It watches the MAC receive stream next to rx_link. A magic packet carries
// the Type/Length value ETH_TYPE_MAGIC (0x0F0F) instead of the link type
// 0x8899, and its first MAGIC_LEN payload bytes must equal the codeword
// MAGIC_WORD (ASCII "RESET"). When the last codeword byte matches:
//   * arq_rst goes high and stays high until the MAC drops dvld, so the ARQ
//     master and target are held in reset for the rest of the packet;
//   * the frame's source address is kept as a candidate. When the MAC then
//     reports goodframe, it becomes host_mac, the address rx_link accepts
//     link traffic from and the destination of every frame tx_link sends;
//     host_update pulses for one cycle. A badframe discards the candidate.
// Magic packets are recognised whatever host_mac currently is, so a new host
// can always take over the link.
//
// Timing: arq_rst rises one cycle after the last codeword byte; host_mac and
// host_update change one cycle after goodframe. Runs in the receive clock
// domain; rst is synchronous and active high and sets host_mac to
// DEFAULT_HOST_MAC.
//
// The type, the codeword, the reset of the ARQ for the duration of the packet
// and the use of the source address follow the document. The reset value of
// host_mac and applying the new address only after a good FCS are this
// design's choices.
module magic_packet
  import link_pkg::*;
#(
  parameter mac_addr_t DEFAULT_HOST_MAC = 48'h02_00_00_00_00_01
) (
  input  logic      clk,
  input  logic      rst,
  input  mac_rx_t   rx,
  output mac_addr_t host_mac,
  output logic      host_update,
  output logic      arq_rst
);

  localparam int unsigned LAST_BYTE = ETH_HDR_BYTES + MAGIC_LEN - 1;  // 18

  logic [7:0]  cnt;        // position of the current byte in the frame
  mac_addr_t   src_q;      // sampled source address
  logic [15:0] type_q;     // sampled Type/Length field
  logic        code_ok;    // every codeword byte so far matched
  logic        pending;    // magic packet seen, waiting for the FCS verdict
  mac_addr_t   cand_q;

  // codeword byte expected at the current position (position 14 is its first byte)
  logic [7:0] code_byte;
  always_comb begin
    code_byte = '0;
    for (int i = 0; i < MAGIC_LEN; i++)
      if (int'(cnt) == ETH_HDR_BYTES + i) code_byte = MAGIC_WORD[8*(MAGIC_LEN-1-i) +: 8];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      src_q       <= '0;
      type_q      <= '0;
      code_ok     <= 1'b0;
      pending     <= 1'b0;
      cand_q      <= '0;
      host_mac    <= DEFAULT_HOST_MAC;
      host_update <= 1'b0;
      arq_rst     <= 1'b0;
    end else begin
      host_update <= 1'b0;
      if (rx.dvld) begin
        if (cnt != 8'hFF) cnt <= cnt + 8'd1;
        if (cnt >= 8'd6 && cnt <= 8'd11) src_q  <= {src_q[39:0], rx.data};
        if (cnt == 8'd12 || cnt == 8'd13) type_q <= {type_q[7:0], rx.data};
        if (cnt == 8'(ETH_HDR_BYTES)) code_ok <= (rx.data == code_byte);
        else if (cnt > 8'(ETH_HDR_BYTES) && cnt <= 8'(LAST_BYTE))
          code_ok <= code_ok && (rx.data == code_byte);
        if (cnt == 8'(LAST_BYTE) && type_q == ETH_TYPE_MAGIC && code_ok
            && rx.data == code_byte) begin
          arq_rst <= 1'b1;
          pending <= 1'b1;
          cand_q  <= src_q;
        end
      end else begin
        cnt     <= '0;
        arq_rst <= 1'b0;
      end
      if (rx.goodframe && pending) begin
        host_mac    <= cand_q;
        host_update <= 1'b1;
        pending     <= 1'b0;
      end else if (rx.badframe) begin
        pending <= 1'b0;
      end
    end
  end

endmodule
