// tx_link: transmit half of the network layer, between the ARQ master and
// target, the tx_buffer and the MAC transmit client interface.
//
// Two state machines share a byte counter:
//
// Transmitter FSM (control signals towards the ARQ and the MAC)
//   READY         wait for a request: the master's valid (a data frame) or a
//                 pending ACK request from the target (an ACK-only frame).
//                 Latch the frame's SEQ, ACK number and destination, raise
//                 tx_dvld with the first byte on txd
//   WAIT_FOR_ACK  hold the first byte until the MAC answers tx_ack (the wire
//                 is free); then start the counter and tell the framebuilder
//   WRITE         one byte per cycle until the framebuilder reports the last
//   DELAY         one cycle with tx_dvld low: close the session, pulse m_next
//                 to the master for a data frame, clear the counter
//
// Framebuilder FSM (what goes on txd), stepped by the counter:
//   HDR      bytes 0..13: destination (the registered host), LOCAL_MAC,
//            Type 0x8899
//   SEQ, ACK bytes 14 and 15 from the registers latched at the request
//            (SEQ is 0 in an ACK-only frame)
//   SEQV     byte 16: SEQV_DATA for a data frame, SEQV_ACK for an ACK-only frame
//   PAYLOAD  bytes 17..17+PACKET_SIZE-1 from the tx_buffer slot the master
//            selects on readbuf (data frames only)
// An ACK-only frame ends after byte 16; the MAC pads it to the Ethernet
// minimum. If the master and the target ask at the same time, a data frame
// goes out: it carries the current ACK number as well, so the target's request
// is satisfied and cleared.
//
// Timing: txd is decoded from the counter in the same cycle; the buffer has
// one cycle of read latency, so its position is issued one byte ahead. A data
// frame occupies 1 + (17 + PACKET_SIZE) + 1 cycles after tx_ack, an ACK-only
// frame 1 + 17 + 1. Transmit clock domain, synchronous active-high reset.
//
// Follows the document: the two FSMs and their states, the counter, the
// header registers, the seqv rule and the priority of data frames. Byte
// orders on the wire (most significant byte first) and the one-cycle-ahead
// buffer addressing are this design's choices.
//
// Assertions: tx_dvld and the first byte are held until tx_ack; m_next
// comes only after the frame has ended.
module tx_link
  import link_pkg::*;
#(
  parameter int unsigned PACKET_SIZE = 1500,
  parameter mac_addr_t   LOCAL_MAC   = 48'h02_00_00_00_00_A5,
  localparam int unsigned NPOS_W = $clog2(PACKET_SIZE)
) (
  input  logic              clk,
  input  logic              rst,
  // ARQ master
  input  logic              m_valid,
  input  logic [7:0]        m_seq,
  output logic              m_next,
  // ARQ target (already in this clock domain)
  input  logic [7:0]        ack_num,
  input  logic              ack_req,
  // destination of outgoing frames
  input  mac_addr_t         host_mac,
  // tx_buffer, network side (slot comes from the master's readbuf)
  output logic [NPOS_W-1:0] buf_pos,
  input  logic [7:0]        buf_rdata,
  // MAC transmit client interface
  output logic [7:0]        txd,
  output logic              tx_dvld,
  input  logic              tx_ack
);

  typedef enum logic [1:0] {READY, WAIT_FOR_ACK, WRITE, DELAY} tx_state_e;
  typedef enum logic [2:0] {FB_IDLE, FB_HDR, FB_SEQ, FB_ACK, FB_SEQV, FB_PAYLOAD} fb_state_e;

  localparam int unsigned CNT_W = $clog2(LINK_HDR_BYTES + PACKET_SIZE + 1);
  localparam logic [CNT_W-1:0] LAST_DATA = CNT_W'(LINK_HDR_BYTES + PACKET_SIZE - 1);

  tx_state_e        tx_state;
  fb_state_e        fb_state;
  logic [CNT_W-1:0] cnt;
  logic             fb_last;     // framebuilder -> transmitter: last byte on txd
  logic             ack_pend;    // target asked for an ACK-only frame
  logic             is_data;
  logic [7:0]       seq_q, ack_q;
  mac_addr_t        dst_q;

  // ---------------------------------------------------- transmitter FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      tx_state <= READY;
      cnt      <= '0;
      tx_dvld  <= 1'b0;
      m_next   <= 1'b0;
      ack_pend <= 1'b0;
      is_data  <= 1'b0;
      seq_q    <= '0;
      ack_q    <= '0;
      dst_q    <= '0;
    end else begin
      m_next <= 1'b0;
      if (ack_req) ack_pend <= 1'b1;
      unique case (tx_state)
        READY: begin
          if (m_valid || ack_pend) begin
            is_data  <= m_valid;
            seq_q    <= m_valid ? m_seq : 8'h00;
            ack_q    <= ack_num;
            dst_q    <= host_mac;
            cnt      <= '0;
            tx_dvld  <= 1'b1;
            tx_state <= WAIT_FOR_ACK;
            // both kinds of frame carry the ACK number latched here, which
            // answers any ACK request seen so far
            ack_pend <= 1'b0;
          end
        end
        WAIT_FOR_ACK: begin
          if (tx_ack) begin
            cnt      <= cnt + 1'b1;
            tx_state <= WRITE;
          end
        end
        WRITE: begin
          if (fb_last) begin
            tx_dvld  <= 1'b0;
            m_next   <= is_data;
            cnt      <= '0;
            tx_state <= DELAY;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DELAY: tx_state <= READY;
        default: tx_state <= READY;
      endcase
    end
  end

  // --------------------------------------------------- framebuilder FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      fb_state <= FB_IDLE;
    end else begin
      unique case (fb_state)
        FB_IDLE:    if (tx_state == READY && (m_valid || ack_pend)) fb_state <= FB_HDR;
        FB_HDR:     if (cnt == CNT_W'(ETH_HDR_BYTES - 1) && tx_state == WRITE) fb_state <= FB_SEQ;
        FB_SEQ:     fb_state <= FB_ACK;
        FB_ACK:     fb_state <= FB_SEQV;
        FB_SEQV:    fb_state <= is_data ? FB_PAYLOAD : FB_IDLE;
        FB_PAYLOAD: if (fb_last) fb_state <= FB_IDLE;
        default:    fb_state <= FB_IDLE;
      endcase
    end
  end

  assign fb_last = (tx_state == WRITE) &&
                   ((fb_state == FB_SEQV && !is_data) ||
                    (fb_state == FB_PAYLOAD && cnt == LAST_DATA));

  // byte multiplexer
  always_comb begin
    txd = '0;
    unique case (fb_state)
      FB_HDR: begin
        if (cnt < CNT_W'(6))       txd = dst_q[8*(5 - int'(cnt)) +: 8];
        else if (cnt < CNT_W'(12)) txd = LOCAL_MAC[8*(11 - int'(cnt)) +: 8];
        else if (cnt == CNT_W'(12)) txd = ETH_TYPE_LINK[15:8];
        else                       txd = ETH_TYPE_LINK[7:0];
      end
      FB_SEQ:     txd = seq_q;
      FB_ACK:     txd = ack_q;
      FB_SEQV:    txd = is_data ? SEQV_DATA : SEQV_ACK;
      FB_PAYLOAD: txd = buf_rdata;
      default:    txd = '0;
    endcase
  end

  // tx_buffer position of the byte that goes out in the next cycle
  always_comb begin
    buf_pos = '0;
    if (cnt >= CNT_W'(LINK_HDR_BYTES - 1) && cnt < LAST_DATA)
      buf_pos = NPOS_W'(cnt - CNT_W'(LINK_HDR_BYTES - 1));
  end

  // MAC rule: until tx_ack, tx_dvld stays high with the first byte on txd
  a_hold_first: assert property (@(posedge clk) disable iff (rst)
    tx_state == WAIT_FOR_ACK && !tx_ack |=> tx_dvld && $stable(txd));
  // the master's request is closed only once its frame has gone out
  a_next_after_frame: assert property (@(posedge clk) disable iff (rst)
    m_next |-> tx_state == DELAY && !tx_dvld);

endmodule
