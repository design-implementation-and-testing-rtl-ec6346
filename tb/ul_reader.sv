// ul_reader: testbench model of an upper layer that receives numbered
// packets through reliable_link's receive upper-layer interface. Whenever
// ul_rx_valid is high and stall is low it reads the packet word by word (data
// one cycle after the position), compares each byte with the pattern of
// ul_writer for the next packet number and pulses done. Counts packets read
// (cnt) and packets whose contents differ (n_bad).
module ul_reader #(
  parameter int unsigned DIR = 0,
  parameter int unsigned UW  = 16,
  parameter int unsigned UB  = 4,
  localparam int unsigned UPW = (UW > 1) ? $clog2(UW) : 1
) (
  input  logic            clk,
  input  logic            valid,
  input  logic            stall,
  output logic [UPW-1:0]  pos,
  input  logic [8*UB-1:0] rdata,
  output logic            done
);
  int cnt = 0, n_bad = 0;

  function automatic logic [7:0] pat(int n, int k);
    return 8'(n * 131 + k * 7 + DIR * 50 + (n >> 3));
  endfunction

  initial begin
    done = 0; pos = '0;
    forever begin
      @(negedge clk);
      if (valid && !stall) begin
        bit ok;
        ok = 1;
        for (int w = 0; w < UW; w++) begin
          pos = UPW'(w);
          @(negedge clk);
          for (int k = 0; k < UB; k++)
            if (rdata[8*k +: 8] !== pat(cnt, UB * w + k)) ok = 0;
        end
        if (!ok) begin
          n_bad++;
          $display("direction %0d: packet %0d corrupted", DIR, cnt);
        end
        done = 1;
        @(negedge clk) done = 0;
        cnt++;
      end
    end
  end
endmodule
