// ul_writer: testbench model of an upper layer that sends NPKT numbered
// packets through reliable_link's transmit upper-layer interface. Whenever
// ul_tx_ready is high it writes one packet, PACKET_SIZE/UB words on
// consecutive cycles, then pulses done. Byte k of packet n in direction DIR
// is (n*131 + k*7 + DIR*50 + n/8) mod 256. Counts packets written (cnt) and
// cycles spent waiting for a free slot (n_window_full).
module ul_writer #(
  parameter int unsigned DIR  = 0,
  parameter int unsigned UW   = 16,
  parameter int unsigned UB   = 4,
  parameter int unsigned NPKT = 10,
  localparam int unsigned UPW = (UW > 1) ? $clog2(UW) : 1
) (
  input  logic            clk,
  input  logic            go,
  input  logic            ready,
  output logic            we,
  output logic [UPW-1:0]  pos,
  output logic [8*UB-1:0] wdata,
  output logic            done
);
  int cnt = 0, n_window_full = 0;

  function automatic logic [7:0] pat(int n, int k);
    return 8'(n * 131 + k * 7 + DIR * 50 + (n >> 3));
  endfunction

  initial begin
    we = 0; done = 0; pos = '0; wdata = '0;
    wait (go);
    while (cnt < NPKT) begin
      @(negedge clk);
      if (!ready) begin
        n_window_full++;
      end else begin
        for (int w = 0; w < UW; w++) begin
          we = 1; pos = UPW'(w);
          for (int k = 0; k < UB; k++) wdata[8*k +: 8] = pat(cnt, UB * w + k);
          @(negedge clk);
        end
        we = 0;
        done = 1;
        @(negedge clk) done = 0;
        cnt++;
      end
    end
  end
endmodule
