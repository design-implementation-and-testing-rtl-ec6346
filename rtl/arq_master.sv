// arq_master: transmit side of the sliding-window ARQ.
//
// The master owns the tx_buffer's slot coordinate and the SEQ numbers of
// outgoing packets. The window holds up to WINDOW packets, from base (the
// oldest packet not yet acknowledged) onwards:
//
//   base ... base+sent-1      sent, waiting for an ACK
//   base+sent ... base+fill-1 written by the upper layer, not sent yet
//   base+fill ...             free: the upper layer may write the next one
//
// Upper layer: ul_ready says a slot is free and ul_slot selects it; the upper
// layer writes the payload through the buffer's other port and pulses
// ul_done. Network: while a written packet is unsent the master raises valid
// with its seq and readbuf (the slot) and holds them until tx_link pulses
// next after the frame went to the MAC. ACKs are cumulative: an ACK number a
// received from the far target retires every sent packet up to and including
// a, so a lost ACK is covered by any later one.
//
// One timer of MASTER_TIMEOUT cycles watches the oldest unacknowledged packet:
// it starts when a packet is sent with none outstanding and restarts whenever
// an ACK moves base. If it expires, the master goes back to base and resends
// every outstanding packet (a request already handed to tx_link is finished
// first). An ACK for any packet sent at least once is accepted, also while
// the resend round has not reached that packet again.
//
// Follows the document: the valid/seq/readbuf/next handshake with no time
// limit, slot pointers for the upper layer, cumulative ACKs and resend after a
// fixed number of cycles. The single timer and the go-back-to-base resend are
// this design's choices where the document gives no internals. Transmit clock
// domain, synchronous active-high reset.
//
// Assertion: a request to tx_link holds valid, seq and readbuf until next.
module arq_master #(
  parameter int unsigned WINDOW         = 16,
  parameter int unsigned MASTER_TIMEOUT = 125000,
  localparam int unsigned SLOT_W = (WINDOW > 1) ? $clog2(WINDOW) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // upper layer
  output logic              ul_ready,
  output logic [SLOT_W-1:0] ul_slot,
  input  logic              ul_done,
  // send requests to tx_link
  output logic              valid,
  output logic [7:0]        seq,
  output logic [SLOT_W-1:0] readbuf,
  input  logic              next,
  // ACK numbers received by rx_link
  input  logic              ack_valid,
  input  logic [7:0]        ack_num
);

  localparam int unsigned TMR_W = $clog2(MASTER_TIMEOUT + 1);
  localparam int unsigned CNT_W = $clog2(WINDOW + 1);

  initial begin
    assert (WINDOW >= 1 && WINDOW <= 127)
      else $error("arq_master: WINDOW must be 1..127 with 8-bit SEQ numbers");
  end

  logic [7:0]        base;
  logic [SLOT_W-1:0] base_slot;
  logic [CNT_W-1:0]  fill;       // packets written by the upper layer, from base
  logic [CNT_W-1:0]  sent;       // packets sent in the current round, from base
  logic [CNT_W-1:0]  hi;         // packets sent at least once, from base
  logic [TMR_W-1:0]  tmr;
  logic              tmr_run;
  logic              rewind;     // timeout seen while a request was in flight

  function automatic logic [SLOT_W-1:0] slot_add(logic [SLOT_W-1:0] s, int unsigned off);
    return SLOT_W'((int'(s) + off) % WINDOW);
  endfunction

  // ACK classification: number of packets it retires. Any packet that has
  // been sent at least once may be acknowledged, also while a resend round
  // has not reached it yet.
  logic [7:0]       ack_off;
  logic             ack_hit;
  logic [CNT_W-1:0] n_ret;
  always_comb begin
    ack_off = ack_num - base;
    ack_hit = ack_valid && (32'(ack_off) < 32'(hi));
    n_ret   = ack_hit ? CNT_W'(ack_off) + CNT_W'(1) : '0;
  end

  assign ul_ready = 32'(fill) < WINDOW;
  assign ul_slot  = slot_add(base_slot, 32'(fill));

  logic tmr_expire;
  assign tmr_expire = tmr_run && (tmr <= TMR_W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      base      <= '0;
      base_slot <= '0;
      fill      <= '0;
      sent      <= '0;
      hi        <= '0;
      valid     <= 1'b0;
      seq       <= '0;
      readbuf   <= '0;
      tmr       <= '0;
      tmr_run   <= 1'b0;
      rewind    <= 1'b0;
    end else begin
      logic [CNT_W-1:0] sent_n, fill_n, hi_n;
      logic [7:0]       base_n, done_off;
      logic             do_rewind;
      base_n = base + 8'(n_ret);
      sent_n = (sent > n_ret) ? sent - n_ret : '0;
      hi_n   = hi - n_ret;
      fill_n = fill - n_ret + CNT_W'(ul_done && ul_ready);

      // a finished request extends the sent range if it was the next packet
      // in order and is still in the window (or triggers a deferred resend)
      do_rewind = 1'b0;
      done_off  = seq - base_n;
      if (valid && next) begin
        valid <= 1'b0;
        if (rewind || tmr_expire) do_rewind = 1'b1;
        else if (done_off == 8'(sent_n)) sent_n = sent_n + CNT_W'(1);
      end else if (tmr_expire && !valid) begin
        do_rewind = 1'b1;
      end
      if (do_rewind) sent_n = '0;
      if (sent_n > hi_n) hi_n = sent_n;
      rewind <= valid && !next && (rewind || tmr_expire);

      // new request: next unsent packet of this round
      if (!valid && sent_n < fill_n) begin
        valid   <= 1'b1;
        seq     <= base_n + 8'(sent_n);
        readbuf <= slot_add(base_slot, 32'(n_ret) + 32'(sent_n));
      end

      base      <= base_n;
      base_slot <= slot_add(base_slot, 32'(n_ret));
      sent      <= sent_n;
      hi        <= hi_n;
      fill      <= fill_n;

      // timer for the oldest outstanding packet
      if (do_rewind || tmr_expire) begin
        tmr_run <= 1'b0;
      end else if (ack_hit || (!tmr_run && hi_n != '0)) begin
        tmr_run <= (hi_n != '0);
        tmr     <= TMR_W'(MASTER_TIMEOUT);
      end else if (tmr_run) begin
        tmr <= tmr - 1'b1;
      end
    end
  end

  // request rule towards tx_link: a request stays up, unchanged, until
  // tx_link closes it with next
  a_req_hold: assert property (@(posedge clk) disable iff (rst)
    valid && !next |=> valid && $stable(seq) && $stable(readbuf));

endmodule
