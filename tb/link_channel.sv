// link_channel: testbench model of one direction of the path between two
// reliable_link ends: the sending MAC's client transmit interface, the wire,
// and the receiving MAC's client receive interface.
//
// Transmit side (tx_clk): when tx_dvld rises, tx_ack is given after a wait of
// 0..5 cycles (a busy wire), then one byte is taken per cycle until tx_dvld
// falls. The frame is padded to 60 bytes, as a MAC does, and queued.
// Receive side (rx_clk): queued frames are delivered one byte per cycle with
// dvld, followed one cycle later by a goodframe strobe, a badframe strobe (the
// frame was corrupted on the way) or nothing at all (the frame was lost), and
// an inter-frame gap of 12 cycles. The fate of each frame comes from a
// 16-bit LFSR, with frame FORCE_CORRUPT corrupted and FORCE_LOST lost for
// certain. inject() queues a frame built by the testbench itself.
module link_channel
  import link_pkg::*;
#(
  parameter int unsigned SEED          = 32'hACE1,
  parameter int unsigned PCORRUPT      = 5,   // percent of frames corrupted
  parameter int unsigned PLOST         = 5,   // percent of frames lost
  parameter int unsigned FORCE_CORRUPT = 12,
  parameter int unsigned FORCE_LOST    = 17
) (
  input  logic       tx_clk,
  input  logic       tx_dvld,
  input  logic [7:0] txd,
  output logic       tx_ack,
  input  logic       rx_clk,
  output mac_rx_t    rx
);

  typedef struct { logic [7:0] bytes [$]; int fate; } entry_t;  // 0 good, 1 corrupt, 2 lost
  entry_t q [$];
  int n_frames = 0, n_corrupt = 0, n_lost = 0, n_ackonly = 0, n_data = 0, n_busy = 0;
  logic [15:0] lfsr = 16'(SEED);

  function automatic int next_rand();
    lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    return int'(lfsr);
  endfunction

  function automatic int pick_fate(int idx);
    int r;
    if (idx == FORCE_CORRUPT) return 1;
    if (idx == FORCE_LOST) return 2;
    r = next_rand() % 100;
    if (r < PCORRUPT) return 1;
    if (r < PCORRUPT + PLOST) return 2;
    return 0;
  endfunction

  // queue a frame built here: dst broadcast, src, type, then either the magic
  // codeword or a link header of SEQ 0 / ACK 1 / seqv 1, filler up to len
  function automatic void inject(mac_addr_t src, logic [15:0] typ, bit magic, int len);
    entry_t e;
    for (int i = 0; i < 6; i++) e.bytes.push_back(8'hFF);
    for (int i = 0; i < 6; i++) e.bytes.push_back(src[8*(5-i) +: 8]);
    e.bytes.push_back(typ[15:8]);
    e.bytes.push_back(typ[7:0]);
    for (int i = 0; i < 5; i++) e.bytes.push_back(magic ? MAGIC_WORD[8*(4-i) +: 8] : 8'h01);
    while (e.bytes.size() < len) e.bytes.push_back(8'h5A);
    e.fate = 0;
    q.push_back(e);
  endfunction

  // transmit side
  initial begin
    tx_ack = 0;
    forever begin
      @(posedge tx_clk);
      if (tx_dvld) begin
        automatic entry_t e;
        automatic int wt;
        wt = next_rand() % 6;
        if (wt > 0) n_busy++;
        repeat (wt) @(negedge tx_clk);
        @(negedge tx_clk) tx_ack = 1;
        @(posedge tx_clk);
        e.bytes.push_back(txd);
        @(negedge tx_clk) tx_ack = 0;
        forever begin
          @(posedge tx_clk);
          if (!tx_dvld) break;
          e.bytes.push_back(txd);
        end
        if (e.bytes.size() > 16) begin
          if (e.bytes[16] == SEQV_ACK) n_ackonly++;
          else                         n_data++;
        end
        while (e.bytes.size() < 60) e.bytes.push_back(8'h00);
        e.fate = pick_fate(n_frames);
        n_frames++;
        q.push_back(e);
      end
    end
  end

  // receive side
  initial begin
    rx = '0;
    forever begin
      @(negedge rx_clk);
      if (q.size() != 0) begin
        automatic entry_t e;
        e = q.pop_front();
        if (e.fate == 2) begin
          n_lost++;
        end else begin
          foreach (e.bytes[i]) begin
            rx.dvld = 1; rx.data = e.bytes[i];
            @(negedge rx_clk);
          end
          rx.dvld = 0; rx.data = 0;
          rx.goodframe = (e.fate == 0); rx.badframe = (e.fate == 1);
          if (e.fate == 1) n_corrupt++;
          @(negedge rx_clk);
          rx.goodframe = 0; rx.badframe = 0;
          repeat (12) @(negedge rx_clk);
        end
      end
    end
  end

endmodule
