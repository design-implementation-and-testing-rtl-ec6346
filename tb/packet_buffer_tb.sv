// packet_buffer_tb: self-checking test of packet_buffer in both directions.
//
// rx_buffer direction: bytes are written through the byte port at every
// (slot, position) and read back as words through the upper-layer port, which
// runs on a different clock. tx_buffer direction: words are written through
// the upper-layer port and read back byte by byte. Expected data come from a
// formula of slot and position; the read latency of one cycle is checked by
// sampling exactly one clock after the address is applied.
module packet_buffer_tb;
  localparam int unsigned W  = 4;
  localparam int unsigned PS = 12;
  localparam int unsigned UB = 4;
  localparam int unsigned UW = PS / UB;

  int checks = 0, failures = 0;
  logic nclk = 0, uclk = 0;
  always #5 nclk = ~nclk;
  always #7 uclk = ~uclk;

  function automatic logic [7:0] pat(int s, int p, int salt);
    return 8'((s * 37 + p * 11 + salt) ^ 8'h5A);
  endfunction

  // rx_buffer instance
  logic [1:0] r_nslot, r_uslot;
  logic [3:0] r_npos;
  logic [1:0] r_upos;
  logic       r_nwe;
  logic [7:0] r_nwdata, r_nrdata;
  logic [31:0] r_urdata;
  packet_buffer #(.WINDOW(W), .PACKET_SIZE(PS), .UL_BYTES(UB), .NET_WRITES(1'b1)) u_rx (
    .net_clk(nclk), .net_slot(r_nslot), .net_pos(r_npos), .net_we(r_nwe),
    .net_wdata(r_nwdata), .net_rdata(r_nrdata),
    .ul_clk(uclk), .ul_slot(r_uslot), .ul_pos(r_upos), .ul_we(1'b0),
    .ul_wdata('0), .ul_rdata(r_urdata));

  // tx_buffer instance
  logic [1:0] t_nslot, t_uslot;
  logic [3:0] t_npos;
  logic [1:0] t_upos;
  logic       t_uwe;
  logic [31:0] t_uwdata, t_urdata;
  logic [7:0]  t_nrdata;
  packet_buffer #(.WINDOW(W), .PACKET_SIZE(PS), .UL_BYTES(UB), .NET_WRITES(1'b0)) u_tx (
    .net_clk(nclk), .net_slot(t_nslot), .net_pos(t_npos), .net_we(1'b0),
    .net_wdata('0), .net_rdata(t_nrdata),
    .ul_clk(uclk), .ul_slot(t_uslot), .ul_pos(t_upos), .ul_we(t_uwe),
    .ul_wdata(t_uwdata), .ul_rdata(t_urdata));

  initial begin
    repeat (20000) @(posedge nclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_w;
    r_nwe = 0; r_nslot = 0; r_npos = 0; r_nwdata = 0; r_uslot = 0; r_upos = 0;
    t_uwe = 0; t_uslot = 0; t_upos = 0; t_uwdata = 0; t_nslot = 0; t_npos = 0;
    // ---- rx direction: byte writes, slots in reverse order
    for (int s = W - 1; s >= 0; s--)
      for (int p = 0; p < PS; p++) begin
        @(negedge nclk);
        r_nwe = 1; r_nslot = 2'(s); r_npos = 4'(p); r_nwdata = pat(s, p, 1);
      end
    @(negedge nclk) r_nwe = 0;
    for (int s = 0; s < W; s++)
      for (int w = 0; w < UW; w++) begin
        @(negedge uclk);
        r_uslot = 2'(s); r_upos = 2'(w);
        @(posedge uclk); #1;
        for (int k = 0; k < UB; k++) exp_w[8*k +: 8] = pat(s, UB * w + k, 1);
        checks++;
        if (r_urdata !== exp_w) begin
          failures++;
          $display("rx_buffer slot %0d word %0d: got %h expected %h", s, w, r_urdata, exp_w);
        end
      end
    // ---- tx direction: word writes, bytes read back
    for (int s = 0; s < W; s++)
      for (int w = 0; w < UW; w++) begin
        @(negedge uclk);
        t_uwe = 1; t_uslot = 2'(s); t_upos = 2'(w);
        for (int k = 0; k < UB; k++) t_uwdata[8*k +: 8] = pat(s, UB * w + k, 2);
      end
    @(negedge uclk) t_uwe = 0;
    for (int s = W - 1; s >= 0; s--)
      for (int p = 0; p < PS; p++) begin
        @(negedge nclk);
        t_nslot = 2'(s); t_npos = 4'(p);
        @(posedge nclk); #1;
        checks++;
        if (t_nrdata !== pat(s, p, 2)) begin
          failures++;
          $display("tx_buffer slot %0d pos %0d: got %h expected %h", s, p, t_nrdata, pat(s, p, 2));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
