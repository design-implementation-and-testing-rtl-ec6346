// rx_link: receive half of the network layer, between the MAC receive client
// interface and the ARQ target / rx_buffer.
//
// The MAC drives its interface on its own and cannot be stalled, so rx_link
// does not buffer frames: it decides what to do with a frame while the frame
// streams in. A byte counter gives the position of the current byte; the FSM
// only watches the counter and enables small sampling processes:
//
//   IDLE         wait for dvld; byte 0 starts the counter
//   SAMPLE_HDR   bytes 0..13, destination, source and Type/Length into registers
//   SAMPLE_SEQ   byte 14, SEQ number
//   SAMPLE_ACK   byte 15, ACK number; the Ethernet-header filter is decided
//                here: source address == host_mac and Type == 0x8899, else the
//                frame goes to SLEEP and the ARQ never hears of it
//   WAIT_WRITE   byte 16, seqv. Non-zero: request the target (tgt_valid with
//                tgt_seq). Zero: ACK-only frame, go to WAIT_CRC
//   REQUEST      tgt_valid is high for this one cycle
//   WAIT_NEXT    the target must answer with tgt_next in the cycle after the
//                request; tgt_write starts WRITING, tgt_drop or no answer
//                (fail-safe) discards the payload and goes to WAIT_CRC, since
//                the frame's ACK number is still good news for the master
//   WRITING      payload byte k (frame byte 17+k) goes to position k of the
//                slot the target selects on its writebuf output
//   WAIT_CRC     the MAC reports goodframe/badframe after the last byte
//   SLEEP        ignore the rest of the frame
//
// On goodframe the frame's ACK number goes to the ARQ master (ack_valid pulse)
// and, for a data frame written completely, tgt_writenext pulses so the target
// commits the slot. A badframe or a frame shorter than the header plus
// PACKET_SIZE bytes leaves the ARQ untouched, so the packet is simply lost and
// recovered by a retransmit.
//
// Timing: the payload is written through a one-byte delay stage, so the byte
// that arrives while the request is pending is not lost. tgt_valid is high
// for the cycle after the seqv byte; tgt_next is expected one cycle later.
// Synchronous active-high reset, receive clock domain.
//
// Follows the document: the counter-driven FSM and its states, the 17-byte
// offset, the source/type filter, the one-cycle fail-safe and the drop of
// frames the MAC marks bad. This design's choices: the delay stage, passing
// ACK numbers only after the FCS check, and the handling of short frames.
module rx_link
  import link_pkg::*;
#(
  parameter int unsigned PACKET_SIZE = 1500,
  localparam int unsigned NPOS_W = $clog2(PACKET_SIZE)
) (
  input  logic             clk,
  input  logic             rst,
  // MAC receive client interface
  input  mac_rx_t          rx,
  // filter address, from the magic packet unit
  input  mac_addr_t        host_mac,
  // ARQ target
  output logic             tgt_valid,
  output logic [7:0]       tgt_seq,
  input  logic             tgt_next,
  input  logic             tgt_write,
  input  logic             tgt_drop,
  output logic             tgt_writenext,
  // rx_buffer, network side (slot comes from the target's writebuf)
  output logic             buf_we,
  output logic [NPOS_W-1:0] buf_pos,
  output logic [7:0]       buf_wdata,
  // received ACK numbers, to the ARQ master
  output logic             ack_valid,
  output logic [7:0]       ack_num
);

  typedef enum logic [3:0] {
    IDLE, SAMPLE_HDR, SAMPLE_SEQ, SAMPLE_ACK, WAIT_WRITE, REQUEST, WAIT_NEXT,
    WRITING, WAIT_CRC, SLEEP
  } rx_state_e;

  localparam int unsigned CNT_W = 16;
  localparam logic [CNT_W-1:0] LAST_BYTE = CNT_W'(LINK_HDR_BYTES + PACKET_SIZE - 1);

  rx_state_e        state;
  logic [CNT_W-1:0] cnt;        // index of the byte on rx.data while dvld
  // one-byte delay stage for the buffer write
  logic [7:0]       data_d;
  logic [CNT_W-1:0] cnt_d;
  logic             dvld_d;
  // sampled header
  mac_addr_t        dst_q, src_q;
  logic [15:0]      type_q;
  logic [7:0]       seq_q, ackn_q;
  logic             is_data;    // frame is a data frame accepted by the target
  logic             complete;   // all PACKET_SIZE payload bytes were written

  logic filter_ok;
  assign filter_ok = (src_q == host_mac) && (type_q == ETH_TYPE_LINK);

  // ---------------------------------------------------------------- counter
  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      cnt_d  <= '0;
      data_d <= '0;
      dvld_d <= 1'b0;
    end else begin
      if (rx.dvld) begin
        if (cnt != '1) cnt <= cnt + 1'b1;
      end else begin
        cnt <= '0;
      end
      cnt_d  <= cnt;
      data_d <= rx.data;
      dvld_d <= rx.dvld;
    end
  end

  // ------------------------------------------------------ header sampling
  always_ff @(posedge clk) begin
    if (rst) begin
      dst_q  <= '0;
      src_q  <= '0;
      type_q <= '0;
      seq_q  <= '0;
      ackn_q <= '0;
    end else if (rx.dvld) begin
      if (cnt <= 16'd5)                    dst_q  <= {dst_q[39:0], rx.data};
      if (cnt >= 16'd6 && cnt <= 16'd11)   src_q  <= {src_q[39:0], rx.data};
      if (cnt == 16'd12 || cnt == 16'd13)  type_q <= {type_q[7:0], rx.data};
      if (cnt == 16'd14)                   seq_q  <= rx.data;
      if (cnt == 16'd15)                   ackn_q <= rx.data;
    end
  end

  // ------------------------------------------------------------------ FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= IDLE;
      tgt_valid     <= 1'b0;
      tgt_seq       <= '0;
      tgt_writenext <= 1'b0;
      ack_valid     <= 1'b0;
      ack_num       <= '0;
      is_data       <= 1'b0;
      complete      <= 1'b0;
    end else begin
      tgt_valid     <= 1'b0;
      tgt_writenext <= 1'b0;
      ack_valid     <= 1'b0;
      unique case (state)
        IDLE: begin
          is_data  <= 1'b0;
          complete <= 1'b0;
          if (rx.dvld) state <= SAMPLE_HDR;
        end
        SAMPLE_HDR: begin
          if (!rx.dvld)                state <= IDLE;
          else if (cnt == 16'd13)      state <= SAMPLE_SEQ;
        end
        SAMPLE_SEQ: begin
          if (!rx.dvld) state <= IDLE;
          else          state <= SAMPLE_ACK;
        end
        SAMPLE_ACK: begin
          if (!rx.dvld)       state <= IDLE;
          else if (!filter_ok) state <= SLEEP;
          else                 state <= WAIT_WRITE;
        end
        WAIT_WRITE: begin
          if (!rx.dvld) begin
            state <= IDLE;
          end else if (rx.data != SEQV_ACK) begin
            tgt_valid <= 1'b1;
            tgt_seq   <= seq_q;
            state     <= REQUEST;
          end else begin
            state <= WAIT_CRC;          // ACK-only frame
          end
        end
        REQUEST: state <= WAIT_NEXT;
        WAIT_NEXT: begin
          if (tgt_next && tgt_write && !tgt_drop) begin
            is_data <= 1'b1;
            state   <= WRITING;
          end else begin
            state <= WAIT_CRC;          // dropped, or no answer in time
          end
        end
        WRITING, WAIT_CRC: begin
          if (dvld_d && cnt_d == LAST_BYTE) complete <= 1'b1;
          if (rx.goodframe) begin
            ack_valid     <= 1'b1;
            ack_num       <= ackn_q;
            tgt_writenext <= is_data && (complete || (dvld_d && cnt_d == LAST_BYTE));
            state         <= IDLE;
          end else if (rx.badframe) begin
            state <= IDLE;
          end else if (!rx.dvld) begin
            state <= WAIT_CRC;
          end
        end
        SLEEP: begin
          if (!rx.dvld) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // ---------------------------------------------------- rx_buffer writes
  // Frame byte 17+k is written to slot position k, one cycle after it arrived.
  always_comb begin
    buf_wdata = data_d;
    buf_pos   = NPOS_W'(cnt_d - CNT_W'(LINK_HDR_BYTES));
    buf_we    = 1'b0;
    if (dvld_d && cnt_d >= CNT_W'(LINK_HDR_BYTES) && cnt_d <= LAST_BYTE) begin
      if (state == WRITING) buf_we = 1'b1;
      if (state == WAIT_NEXT && tgt_next && tgt_write && !tgt_drop) buf_we = 1'b1;
    end
  end

  // dst_q is sampled for completeness of the header registers; the filter
  // in this design keys on source address and type only.
  logic unused_dst;
  assign unused_dst = ^dst_q;

endmodule
