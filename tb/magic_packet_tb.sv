// magic_packet_tb: self-checking test of the magic packet unit.
//
// Frames are streamed byte by byte as the MAC would deliver them, followed by
// a goodframe or badframe strobe. Checked: ordinary link frames and frames
// with a wrong codeword change nothing; a magic packet holds arq_rst high
// from the cycle after its last codeword byte to the cycle after the frame
// (length - 18 cycles) and, after goodframe, makes its source address the
// host address with exactly one host_update pulse; a magic packet with a bad
// FCS resets the ARQ but leaves the host address alone. Also: a codeword
// wrong in its first byte, and a frame that ends inside the codeword, change
// nothing; arq_rst rises exactly one cycle after the last codeword byte;
// host_update follows goodframe by one cycle; a magic packet longer than the
// byte counter's range still holds the reset exactly to its end.
module magic_packet_tb;
  import link_pkg::*;

  localparam mac_addr_t DEF = 48'h02_00_00_00_00_01;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  mac_rx_t   rx;
  mac_addr_t host_mac;
  logic      host_update, arq_rst;
  int        rst_cycles, upd_count;

  magic_packet #(.DEFAULT_HOST_MAC(DEF)) dut (
    .clk(clk), .rst(rst), .rx(rx), .host_mac(host_mac),
    .host_update(host_update), .arq_rst(arq_rst));

  // byte_i: bytes of the current frame sampled so far; first_rst: value of
  // byte_i when arq_rst was first seen high; gf_cyc/hu_cyc: cycle of the
  // last goodframe and host_update
  int cyc = 0, byte_i = 0, first_rst = -1, gf_cyc = -1, hu_cyc = -1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (arq_rst) rst_cycles++;
    if (arq_rst && first_rst < 0) first_rst = byte_i;
    if (host_update) begin upd_count++; hu_cyc = cyc; end
    if (rx.goodframe) gf_cyc = cyc;
    byte_i = rx.dvld ? byte_i + 1 : 0;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // stream one frame: dst, src, type, codeword-or-other, filler to len bytes
  task automatic send(mac_addr_t src, logic [15:0] typ, logic [39:0] code, int len, bit good);
    logic [7:0] b;
    for (int i = 0; i < len; i++) begin
      if (i < 6)       b = 8'hFF;
      else if (i < 12) b = src[8*(11-i) +: 8];
      else if (i < 14) b = typ[8*(13-i) +: 8];
      else if (i < 19) b = code[8*(18-i) +: 8];
      else             b = 8'(i);
      @(negedge clk);
      rx.dvld = 1; rx.data = b;
    end
    @(negedge clk);
    rx.dvld = 0; rx.data = 0; rx.goodframe = good; rx.badframe = !good;
    @(negedge clk);
    rx.goodframe = 0; rx.badframe = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    rx = '0;
    rst_cycles = 0; upd_count = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(host_mac == DEF, "reset value of host_mac");

    send(48'h11_22_33_44_55_66, ETH_TYPE_LINK, MAGIC_WORD, 64, 1);
    check(rst_cycles == 0 && upd_count == 0 && host_mac == DEF, "link frame ignored");

    send(48'h11_22_33_44_55_66, ETH_TYPE_MAGIC, 40'h52_45_53_45_58, 64, 1);
    check(rst_cycles == 0 && upd_count == 0 && host_mac == DEF, "wrong codeword ignored");

    send(48'h11_22_33_44_55_66, ETH_TYPE_MAGIC, 40'h58_45_53_45_54, 64, 1);
    check(rst_cycles == 0 && upd_count == 0 && host_mac == DEF, "first codeword byte wrong: ignored");

    send(48'h11_22_33_44_55_66, ETH_TYPE_MAGIC, MAGIC_WORD, 17, 1);
    check(rst_cycles == 0 && upd_count == 0 && host_mac == DEF, "frame ending inside the codeword ignored");

    send(48'hA0_A1_A2_A3_A4_A5, ETH_TYPE_MAGIC, MAGIC_WORD, 64, 0);
    check(first_rst == 19, $sformatf("arq_rst first seen while byte %0d is sampled, expected 19", first_rst));
    check(rst_cycles == 64 - 18, $sformatf("bad magic: arq_rst cycles %0d", rst_cycles));
    check(upd_count == 0 && host_mac == DEF, "bad magic: host unchanged");

    rst_cycles = 0;
    send(48'hDE_AD_BE_EF_00_42, ETH_TYPE_MAGIC, MAGIC_WORD, 80, 1);
    check(rst_cycles == 80 - 18, $sformatf("magic: arq_rst cycles %0d", rst_cycles));
    check(upd_count == 1, "magic: one host_update");
    check(host_mac == 48'hDE_AD_BE_EF_00_42, $sformatf("magic: host_mac %h", host_mac));
    check(hu_cyc == gf_cyc + 1, "host_update one cycle after goodframe");

    // a minimum-length magic packet from another host takes over
    rst_cycles = 0;
    send(48'h02_12_34_56_78_9A, ETH_TYPE_MAGIC, MAGIC_WORD, 60, 1);
    check(rst_cycles == 60 - 18 && upd_count == 2 && host_mac == 48'h02_12_34_56_78_9A,
          "second magic packet");

    // longer than the 8-bit byte counter can count
    rst_cycles = 0;
    send(48'h02_12_34_56_78_9B, ETH_TYPE_MAGIC, MAGIC_WORD, 300, 1);
    check(rst_cycles == 300 - 18 && upd_count == 3 && host_mac == 48'h02_12_34_56_78_9B,
          $sformatf("300-byte magic packet: arq_rst cycles %0d", rst_cycles));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
