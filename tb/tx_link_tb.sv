// tx_link_tb: self-checking test of the transmit half of the network layer.
//
// The testbench plays the ARQ master (valid/seq held until next), the
// target (ACK number and one-cycle ACK requests), the tx_buffer (byte memory
// with one cycle of read latency) and the MAC (answers tx_dvld with a one-cycle
// tx_ack after a variable wait, then takes one byte per cycle). Every frame
// the MAC takes is compared byte for byte with a frame built independently
// here. Also checked: the frame length in cycles after tx_ack, that the first
// byte is held while the MAC is busy, that next pulses once per data frame and
// never for an ACK-only frame, and that a data frame satisfies a simultaneous
// ACK request.
module tx_link_tb;
  import link_pkg::*;

  localparam int unsigned PS = 24;
  localparam mac_addr_t LOCAL = 48'h02_00_00_00_00_A5;
  localparam mac_addr_t HOST  = 48'h3C_97_0E_11_22_33;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic       m_valid, m_next, ack_req, tx_dvld, tx_ack;
  logic [7:0] m_seq, ack_num, txd, buf_rdata;
  logic [1:0] slot;
  logic [4:0] buf_pos;

  tx_link #(.PACKET_SIZE(PS), .LOCAL_MAC(LOCAL)) dut (
    .clk(clk), .rst(rst), .m_valid(m_valid), .m_seq(m_seq), .m_next(m_next),
    .ack_num(ack_num), .ack_req(ack_req), .host_mac(HOST),
    .buf_pos(buf_pos), .buf_rdata(buf_rdata),
    .txd(txd), .tx_dvld(tx_dvld), .tx_ack(tx_ack));

  function automatic logic [7:0] pay(int s, int p);
    return 8'(s * 29 + p * 5 + 3);
  endfunction

  // tx_buffer model
  always @(posedge clk) buf_rdata <= pay(int'(slot), int'(buf_pos));

  // MAC model
  int        ack_wait;
  logic [7:0] frame [$];
  int        frames_done, ack_to_end, n_next, held_ok;
  always @(posedge clk) if (m_next && !rst) n_next++;

  initial begin
    tx_ack = 0;
    frames_done = 0;
    forever begin
      @(posedge clk);
      if (tx_dvld && !rst) begin
        logic [7:0] first;
        int t;
        first = txd;
        held_ok = 1;
        repeat (ack_wait) begin
          @(negedge clk);
          if (!tx_dvld || txd !== first) held_ok = 0;
        end
        @(negedge clk) tx_ack = 1;
        @(posedge clk);
        frame.delete();
        frame.push_back(txd);
        @(negedge clk) tx_ack = 0;
        t = 1;
        forever begin
          @(posedge clk);
          if (!tx_dvld) break;
          frame.push_back(txd);
          t++;
        end
        ack_to_end = t;
        frames_done++;
      end
    end
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

  task automatic check_frame(bit data, logic [7:0] seq, logic [7:0] ack, int s, string what);
    logic [7:0] exp [$];
    bit ok;
    for (int i = 0; i < 6; i++) exp.push_back(HOST[8*(5-i) +: 8]);
    for (int i = 0; i < 6; i++) exp.push_back(LOCAL[8*(5-i) +: 8]);
    exp.push_back(8'h88); exp.push_back(8'h99);
    exp.push_back(data ? seq : 8'h00);
    exp.push_back(ack);
    exp.push_back(data ? 8'h01 : 8'h00);
    if (data) for (int p = 0; p < PS; p++) exp.push_back(pay(s, p));
    ok = (frame.size() == exp.size());
    if (ok) foreach (exp[i]) if (frame[i] !== exp[i]) begin
      ok = 0;
      $display("%s: byte %0d got %h expected %h", what, i, frame[i], exp[i]);
    end
    check(ok, $sformatf("%s: frame contents (%0d bytes, expected %0d)", what, frame.size(), exp.size()));
    check(ack_to_end == exp.size(), $sformatf("%s: %0d cycles from tx_ack to the end", what, ack_to_end));
  endtask

  task automatic wait_frames(int n);
    while (frames_done < n) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin
    m_valid = 0; m_seq = 0; ack_num = 8'd42; ack_req = 0; slot = 0; ack_wait = 0;
    n_next = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);

    // 1: data frame, MAC answers at once
    m_valid = 1; m_seq = 8'd17; slot = 2'd2;
    while (!m_next) @(negedge clk);
    m_valid = 0;
    wait_frames(1);
    check_frame(1, 8'd17, 8'd42, 2, "data frame");
    check(n_next == 1, "one next per data frame");

    // 2: ACK-only frame, MAC busy for 20 cycles
    ack_wait = 20; ack_num = 8'd99;
    @(negedge clk) ack_req = 1;
    @(negedge clk) ack_req = 0;
    wait_frames(2);
    check_frame(0, 8'd0, 8'd99, 0, "ACK-only frame");
    check(held_ok == 1, "first byte held while the MAC is busy");
    check(n_next == 1, "no next for an ACK-only frame");

    // 3: simultaneous requests: one data frame carries the ACK
    ack_wait = 3; ack_num = 8'd7;
    @(negedge clk);
    ack_req = 1; m_valid = 1; m_seq = 8'd200; slot = 2'd1;
    @(negedge clk) ack_req = 0;
    while (!m_next) @(negedge clk);
    m_valid = 0;
    wait_frames(3);
    check_frame(1, 8'd200, 8'd7, 1, "data frame with ACK request");
    repeat (40) @(negedge clk);
    check(frames_done == 3, "no extra ACK-only frame");

    // 4: back-to-back data frames from two slots
    ack_wait = 1; ack_num = 8'd8;
    m_valid = 1; m_seq = 8'd201; slot = 2'd3;
    while (!m_next) @(negedge clk);
    m_seq = 8'd202; slot = 2'd0;
    @(negedge clk);
    while (!m_next) @(negedge clk);
    m_valid = 0;
    wait_frames(5);
    check_frame(1, 8'd202, 8'd8, 0, "second of two data frames");
    check(n_next == 4, "next count after back-to-back frames");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
