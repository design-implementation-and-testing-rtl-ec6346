// arq_target: receive side of the sliding-window ARQ (automatic repeat request).
//
// The target owns the rx_buffer's slot coordinate. For every data frame that
// passed the network filter, rx_link presents its SEQ number (valid, seq).
// One cycle later the target answers with next and either
//   write  - seq lies inside the receive window and its slot is still free;
//            writebuf selects that slot and stays there until the next request
//   drop   - seq was already received (a retransmit of an acknowledged packet),
//            or lies ahead of the window; in the latter case the target also
//            asks for an ACK-only frame (a retransmit request) at once.
// A request changes nothing by itself: only writenext, which rx_link gives
// after the MAC has confirmed the FCS, marks the slot as received. A corrupted
// frame therefore leaves no trace.
//
// The window starts at rd_base, the oldest packet the upper layer has not yet
// read, and spans WINDOW sequence numbers. exp_seq is the oldest SEQ not yet
// received; everything before it arrived in order, so the cumulative ACK
// number is exp_seq - 1 (ack_num, with ack_update pulsing when it moves).
// The upper layer sees ul_valid with ul_slot when the oldest packet is in
// the buffer, reads it through the buffer's other port at its own pace and
// pulses ul_done, which frees the slot and moves the window.
//
// A timer of TARGET_TIMEOUT cycles starts when a packet is committed
// (writenext) or a duplicate arrives and no timer is running; when it expires
// ack_req pulses so that tx_link sends an ACK-only frame carrying the ACK
// number of that moment. Starting at the commit rather than at the request
// matters: a request comes at byte 17 of the frame, and a timer started there
// could expire before the packet it should acknowledge is complete. SEQ numbers are 8 bits; a window of up to 127 keeps
// "ahead of the window" and "already acknowledged" apart.
//
// Follows the document: the request/next/write/drop/writebuf/writenext
// handshake with its one-cycle answer, slot management, in-order hand-over to
// the upper layer, cumulative ACKs and the ACK timeout. The document does not
// give the internals; the counters and the received-bit per slot are this
// design's simplest way to do the job. Receive clock domain, synchronous
// active-high reset.
//
// Assertions: each request is answered in the next cycle, with exactly one
// of write and drop.
module arq_target #(
  parameter int unsigned WINDOW         = 16,
  parameter int unsigned TARGET_TIMEOUT = 500,
  localparam int unsigned SLOT_W = (WINDOW > 1) ? $clog2(WINDOW) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // request interface from rx_link
  input  logic              valid,
  input  logic [7:0]        seq,
  output logic              next,
  output logic              write,
  output logic              drop,
  output logic [SLOT_W-1:0] writebuf,
  input  logic              writenext,
  // upper layer
  output logic              ul_valid,
  output logic [SLOT_W-1:0] ul_slot,
  input  logic              ul_done,
  // acknowledgements, towards tx_link
  output logic [7:0]        ack_num,
  output logic              ack_update,
  output logic              ack_req
);

  localparam int unsigned TMR_W = $clog2(TARGET_TIMEOUT + 1);

  initial begin
    assert (WINDOW >= 1 && WINDOW <= 127)
      else $error("arq_target: WINDOW must be 1..127 with 8-bit SEQ numbers");
  end

  logic [7:0]        rd_base, exp_seq;
  logic [SLOT_W-1:0] rd_slot, pend_slot;
  logic [WINDOW-1:0] rcv;
  logic [TMR_W-1:0]  tmr;
  logic              tmr_run;

  function automatic logic [SLOT_W-1:0] slot_add(logic [SLOT_W-1:0] s, logic [7:0] off);
    int unsigned v;
    v = (int'(s) + int'(off)) % WINDOW;
    return SLOT_W'(v);
  endfunction

  // classification of the requested SEQ number
  logic [7:0]        req_off, exp_off;
  logic [SLOT_W-1:0] req_slot, exp_slot;
  logic              in_window, ahead;
  always_comb begin
    req_off   = seq - rd_base;
    req_slot  = slot_add(rd_slot, req_off);
    in_window = 32'(req_off) < WINDOW;
    ahead     = !in_window && req_off < 8'd128;
    exp_off   = exp_seq - rd_base;
    exp_slot  = slot_add(rd_slot, exp_off);
  end

  assign ul_slot  = rd_slot;
  assign ul_valid = rcv[rd_slot] && (rd_base != exp_seq);
  assign ack_num  = exp_seq - 8'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      next       <= 1'b0;
      write      <= 1'b0;
      drop       <= 1'b0;
      writebuf   <= '0;
      rd_base    <= '0;
      rd_slot    <= '0;
      exp_seq    <= '0;
      pend_slot  <= '0;
      rcv        <= '0;
      tmr        <= '0;
      tmr_run    <= 1'b0;
      ack_update <= 1'b0;
      ack_req    <= 1'b0;
    end else begin
      next       <= 1'b0;
      write      <= 1'b0;
      drop       <= 1'b0;
      ack_update <= 1'b0;
      ack_req    <= 1'b0;

      // answer a request in the next cycle
      if (valid) begin
        next <= 1'b1;
        if (in_window && !rcv[req_slot]) begin
          write     <= 1'b1;
          writebuf  <= req_slot;
          pend_slot <= req_slot;
        end else begin
          drop <= 1'b1;
          if (ahead) ack_req <= 1'b1;
        end
      end

      // commit a stored packet
      if (writenext) rcv[pend_slot] <= 1'b1;

      // advance the cumulative ACK over packets that arrived in order
      if (rcv[exp_slot] && 32'(exp_off) < WINDOW) begin
        exp_seq    <= exp_seq + 8'd1;
        ack_update <= 1'b1;
      end

      // upper layer has read the oldest packet
      if (ul_done && ul_valid) begin
        rcv[rd_slot] <= 1'b0;
        rd_base      <= rd_base + 8'd1;
        rd_slot      <= slot_add(rd_slot, 8'd1);
      end

      // ACK timeout
      if (tmr_run) begin
        if (tmr <= TMR_W'(1)) begin
          tmr_run <= 1'b0;
          ack_req <= 1'b1;
        end else begin
          tmr <= tmr - 1'b1;
        end
      end else if (writenext || (valid && !ahead && !(in_window && !rcv[req_slot]))) begin
        // a packet stored, or a duplicate whose sender missed our ACK
        tmr_run <= 1'b1;
        tmr     <= TMR_W'(TARGET_TIMEOUT);
      end
    end
  end

  // request rule towards rx_link: every request is answered in the next
  // cycle, and an answer is exactly one of write and drop
  a_answer: assert property (@(posedge clk) disable iff (rst) valid |=> next);
  a_one_of: assert property (@(posedge clk) disable iff (rst)
    (next || write || drop) |-> next && (write != drop));

endmodule
