// rx_link_tb: self-checking test of the receive half of the network layer.
//
// The testbench plays the MAC (byte stream plus goodframe/badframe strobe)
// and the ARQ target (answers each request one cycle later with write or
// drop, or not at all), and records every rx_buffer write. Checked per frame:
// number and SEQ of target requests, the cycle the request appears (the cycle
// after the seqv byte), payload bytes and their positions, writenext and the
// ACK number handed to the master. Frames cover the filter (wrong source,
// wrong type), ACK-only frames, target drops, a missing target answer, bad
// FCS and a frame that ends too early.
module rx_link_tb;
  import link_pkg::*;

  localparam int unsigned PS = 20;
  localparam mac_addr_t HOST = 48'h0A_0B_0C_0D_0E_0F;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  mac_rx_t rx;
  logic tgt_valid, tgt_next, tgt_write, tgt_drop, tgt_writenext;
  logic [7:0] tgt_seq;
  logic buf_we;
  logic [4:0] buf_pos;
  logic [7:0] buf_wdata;
  logic ack_valid;
  logic [7:0] ack_num;

  rx_link #(.PACKET_SIZE(PS)) dut (
    .clk(clk), .rst(rst), .rx(rx), .host_mac(HOST),
    .tgt_valid(tgt_valid), .tgt_seq(tgt_seq), .tgt_next(tgt_next),
    .tgt_write(tgt_write), .tgt_drop(tgt_drop), .tgt_writenext(tgt_writenext),
    .buf_we(buf_we), .buf_pos(buf_pos), .buf_wdata(buf_wdata),
    .ack_valid(ack_valid), .ack_num(ack_num));

  // ARQ target model: 0 = write, 1 = drop, 2 = no answer
  int mode;
  always @(posedge clk) begin
    tgt_next  <= tgt_valid && mode != 2;
    tgt_write <= tgt_valid && mode == 0;
    tgt_drop  <= tgt_valid && mode == 1;
  end

  // observers
  int n_req, n_writes, n_wnext, n_ack, req_cycle, cyc, seqv_cycle;
  logic [7:0] last_seq, last_ack;
  logic [7:0] mem [PS];
  always @(posedge clk) begin
    cyc++;
    if (tgt_valid) begin n_req++; last_seq = tgt_seq; req_cycle = cyc; end
    if (buf_we) begin
      n_writes++;
      if (buf_pos < PS) mem[buf_pos] = buf_wdata;
      else begin failures++; $display("write outside the slot: %0d", buf_pos); end
    end
    if (tgt_writenext) n_wnext++;
    if (ack_valid) begin n_ack++; last_ack = ack_num; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] payload(int seq, int k);
    return 8'(seq * 7 + k * 3 + 1);
  endfunction

  task automatic send(mac_addr_t src, logic [15:0] typ, logic [7:0] seq, logic [7:0] ack,
                      logic [7:0] seqv, int len, bit good);
    logic [7:0] b;
    n_req = 0; n_writes = 0; n_wnext = 0; n_ack = 0;
    for (int k = 0; k < PS; k++) mem[k] = 8'hEE;
    for (int i = 0; i < len; i++) begin
      if (i < 6)        b = LOCAL_ADDR[8*(5-i) +: 8];
      else if (i < 12)  b = src[8*(11-i) +: 8];
      else if (i < 14)  b = typ[8*(13-i) +: 8];
      else if (i == 14) b = seq;
      else if (i == 15) b = ack;
      else if (i == 16) b = seqv;
      else              b = payload(seq, i - 17);
      @(negedge clk);
      rx.dvld = 1; rx.data = b;
      if (i == 16) seqv_cycle = cyc + 1;
    end
    @(negedge clk);
    rx.dvld = 0; rx.data = 0; rx.goodframe = good; rx.badframe = !good;
    @(negedge clk);
    rx.goodframe = 0; rx.badframe = 0;
    repeat (12) @(negedge clk);
  endtask

  localparam mac_addr_t LOCAL_ADDR = 48'h02_00_00_00_00_A5;
  localparam int FULL = 17 + PS;

  task automatic check_payload(int seq, string what);
    bit ok = 1;
    for (int k = 0; k < PS; k++) if (mem[k] !== payload(seq, k)) ok = 0;
    check(ok, {what, ": payload in buffer"});
  endtask

  initial begin
    rx = '0; mode = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // 1: accepted data frame
    mode = 0;
    send(HOST, ETH_TYPE_LINK, 8'd5, 8'd200, SEQV_DATA, FULL, 1);
    check(n_req == 1 && last_seq == 8'd5, "data: one request with SEQ 5");
    check(req_cycle == seqv_cycle + 1, $sformatf("data: request %0d cycles after seqv byte",
                                                 req_cycle - seqv_cycle));
    check(n_writes == PS, $sformatf("data: %0d writes", n_writes));
    check_payload(5, "data");
    check(n_wnext == 1, "data: writenext");
    check(n_ack == 1 && last_ack == 8'd200, "data: ACK number to master");

    // 2: longer frame (trailing bytes ignored)
    send(HOST, ETH_TYPE_LINK, 8'd6, 8'd201, SEQV_DATA, FULL + 9, 1);
    check(n_writes == PS && n_wnext == 1, "long frame: only PACKET_SIZE bytes written");
    check_payload(6, "long frame");

    // 3: target drops it
    mode = 1;
    send(HOST, ETH_TYPE_LINK, 8'd7, 8'd202, SEQV_DATA, FULL, 1);
    check(n_req == 1 && n_writes == 0 && n_wnext == 0, "drop: nothing written");
    check(n_ack == 1 && last_ack == 8'd202, "drop: ACK still passed on");

    // 4: target does not answer in time
    mode = 2;
    send(HOST, ETH_TYPE_LINK, 8'd8, 8'd203, SEQV_DATA, FULL, 1);
    check(n_req == 1 && n_writes == 0 && n_wnext == 0, "no answer: frame dropped");
    mode = 0;

    // 5: filter: wrong source, wrong type
    send(48'h0A_0B_0C_0D_0E_10, ETH_TYPE_LINK, 8'd9, 8'd204, SEQV_DATA, FULL, 1);
    check(n_req == 0 && n_writes == 0 && n_ack == 0, "wrong source filtered");
    send(HOST, 16'h0800, 8'd9, 8'd205, SEQV_DATA, FULL, 1);
    check(n_req == 0 && n_writes == 0 && n_ack == 0, "wrong type filtered");

    // 6: ACK-only frame padded to 60 bytes
    send(HOST, ETH_TYPE_LINK, 8'd0, 8'd77, SEQV_ACK, 60, 1);
    check(n_req == 0 && n_writes == 0 && n_wnext == 0, "ACK-only: target not asked");
    check(n_ack == 1 && last_ack == 8'd77, "ACK-only: ACK number to master");

    // 7: bad FCS
    send(HOST, ETH_TYPE_LINK, 8'd10, 8'd99, SEQV_DATA, FULL, 0);
    check(n_req == 1 && n_wnext == 0 && n_ack == 0, "bad frame: no writenext, no ACK");

    // 8: frame ends before the payload is complete
    send(HOST, ETH_TYPE_LINK, 8'd11, 8'd98, SEQV_DATA, FULL - 4, 1);
    check(n_wnext == 0 && n_ack == 1, "short frame: no writenext");

    // 9: back to normal after all that
    send(HOST, ETH_TYPE_LINK, 8'd12, 8'd97, SEQV_DATA, FULL, 1);
    check(n_wnext == 1 && n_writes == PS, "recovery frame stored");
    check_payload(12, "recovery frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
