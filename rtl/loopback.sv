// loopback: test upper layer that returns every packet it receives.
//
// It reads one packet from the receive side of the link into a memory array
// of PACKET_SIZE/UL_BYTES words and, once the transmit side offers a free
// slot, writes the packet back. Only one packet is held at a time, so a
// packet crosses the loop in four packet lengths at best: received, read,
// written, sent. The link then checks the data end to end: the host sends a
// file and compares what comes back.
//
// The receive interface runs on rx_clk and the transmit interface on tx_clk,
// like those of reliable_link. Ownership of the memory passes between the
// two sides with a pair of toggles, each through a two-flip-flop
// synchroniser: the receive side flips fill_tgl after storing a packet, the
// transmit side flips drain_tgl after writing it out; the memory holds a
// packet while the two differ.
//
// Receive timing: positions 0..UW-1 are issued on consecutive cycles, each
// word is stored one cycle later (the buffer's read latency), then rx_done
// pulses. Transmit: one word per cycle with tx_we, then tx_done pulses.
// Resets are synchronous and active high.
//
// The behaviour (one packet in a memory array, read then written back)
// follows the document; the toggle handshake is this design's choice.
module loopback #(
  parameter int unsigned PACKET_SIZE = 1500,
  parameter int unsigned UL_BYTES    = 4,
  localparam int unsigned UW  = PACKET_SIZE / UL_BYTES,
  localparam int unsigned UPW = (UW > 1) ? $clog2(UW) : 1
) (
  // receive side of the link's upper-layer interface
  input  logic                  rx_clk,
  input  logic                  rx_rst,
  input  logic                  rx_valid,
  output logic [UPW-1:0]        rx_pos,
  input  logic [8*UL_BYTES-1:0] rx_rdata,
  output logic                  rx_done,
  // transmit side of the link's upper-layer interface
  input  logic                  tx_clk,
  input  logic                  tx_rst,
  input  logic                  tx_ready,
  output logic [UPW-1:0]        tx_pos,
  output logic                  tx_we,
  output logic [8*UL_BYTES-1:0] tx_wdata,
  output logic                  tx_done
);

  localparam int unsigned IW = $clog2(UW + 1);

  logic [8*UL_BYTES-1:0] mem [UW];

  // ----------------------------------------------------------- receive side
  logic          fill_tgl, rx_busy;
  logic [1:0]    drain_sync;
  logic [IW-1:0] ri;         // word index being issued
  logic          drain_tgl;

  always_ff @(posedge rx_clk) begin
    if (rx_rst) begin
      fill_tgl   <= 1'b0;
      rx_busy    <= 1'b0;
      drain_sync <= '0;
      ri         <= '0;
      rx_done    <= 1'b0;
    end else begin
      drain_sync <= {drain_sync[0], drain_tgl};
      rx_done    <= 1'b0;
      if (!rx_busy) begin
        // memory is free when every stored packet has been sent
        if (rx_valid && !rx_done && fill_tgl == drain_sync[1]) begin
          rx_busy <= 1'b1;
          ri      <= '0;
        end
      end else begin
        if (ri != '0) mem[UPW'(ri - 1'b1)] <= rx_rdata;
        if (ri == IW'(UW)) begin
          rx_busy  <= 1'b0;
          rx_done  <= 1'b1;
          fill_tgl <= ~fill_tgl;
        end else begin
          ri <= ri + 1'b1;
        end
      end
    end
  end

  assign rx_pos = UPW'(ri);

  // ---------------------------------------------------------- transmit side
  logic          tx_busy;
  logic [1:0]    fill_sync;
  logic [IW-1:0] ti;

  always_ff @(posedge tx_clk) begin
    if (tx_rst) begin
      drain_tgl <= 1'b0;
      fill_sync <= '0;
      tx_busy   <= 1'b0;
      ti        <= '0;
      tx_done   <= 1'b0;
    end else begin
      fill_sync <= {fill_sync[0], fill_tgl};
      tx_done   <= 1'b0;
      if (!tx_busy) begin
        if (tx_ready && !tx_done && fill_sync[1] != drain_tgl) begin
          tx_busy <= 1'b1;
          ti      <= '0;
        end
      end else if (ti == IW'(UW - 1)) begin
        tx_busy   <= 1'b0;
        tx_done   <= 1'b1;
        drain_tgl <= ~drain_tgl;
      end else begin
        ti <= ti + 1'b1;
      end
    end
  end

  assign tx_we    = tx_busy;
  assign tx_pos   = UPW'(ti);
  assign tx_wdata = mem[UPW'(ti)];

endmodule
