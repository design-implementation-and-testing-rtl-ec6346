// arq_master_tb: self-checking test of the transmit side of the ARQ.
//
// The testbench plays the upper layer (fills the slot it is given and pulses
// ul_done), tx_link (takes each request and pulses next a few cycles later,
// logging SEQ and slot) and the far target (cumulative ACK numbers). Checked:
// slots handed out in order and withheld when the window is full; packets
// sent in SEQ order from the right slot; a cumulative ACK frees every packet
// up to it while a stale ACK frees none; after MASTER_TIMEOUT cycles without
// progress every outstanding packet is sent again, oldest first; once all are
// acknowledged nothing more is sent.
module arq_master_tb;
  localparam int unsigned W  = 4;
  localparam int unsigned TO = 60;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic       ul_ready, ul_done, valid, next, ack_valid;
  logic [1:0] ul_slot, readbuf;
  logic [7:0] seq, ack_num;

  arq_master #(.WINDOW(W), .MASTER_TIMEOUT(TO)) dut (
    .clk(clk), .rst(rst), .ul_ready(ul_ready), .ul_slot(ul_slot), .ul_done(ul_done),
    .valid(valid), .seq(seq), .readbuf(readbuf), .next(next),
    .ack_valid(ack_valid), .ack_num(ack_num));

  // tx_link model: finish each request after 6 cycles
  int sent_seq [$], sent_slot [$], sent_cyc [$];
  int cyc, ack_cyc;
  always @(posedge clk) cyc++;
  initial begin
    next = 0;
    forever begin
      @(negedge clk);
      if (valid) begin
        sent_seq.push_back(int'(seq));
        sent_slot.push_back(int'(readbuf));
        sent_cyc.push_back(cyc);
        repeat (5) @(negedge clk);
        next = 1;
        @(negedge clk) next = 0;
      end
    end
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
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fill_one(int expect_slot);
    check(ul_ready == 1, "slot available");
    check(int'(ul_slot) == expect_slot, $sformatf("upper layer gets slot %0d, expected %0d", ul_slot, expect_slot));
    ul_done = 1;
    @(negedge clk) ul_done = 0;
  endtask

  task automatic ack(logic [7:0] a);
    ack_valid = 1; ack_num = a;
    @(negedge clk) ack_valid = 0;
    @(negedge clk);
  endtask

  task automatic expect_sent(int idx, int s, int sl);
    check(sent_seq.size() > idx, $sformatf("send #%0d happened", idx));
    if (sent_seq.size() > idx)
      check(sent_seq[idx] == s && sent_slot[idx] == sl,
            $sformatf("send #%0d: seq %0d slot %0d, expected seq %0d slot %0d",
                      idx, sent_seq[idx], sent_slot[idx], s, sl));
  endtask

  initial begin
    ul_done = 0; ack_valid = 0; ack_num = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(ul_ready && ul_slot == 0 && !valid, "reset state");

    for (int i = 0; i < W; i++) fill_one(i);
    @(negedge clk);
    check(ul_ready == 0, "window full: no slot for the upper layer");
    repeat (30) @(negedge clk);
    for (int i = 0; i < W; i++) expect_sent(i, i, i);
    check(sent_seq.size() == W, "exactly one send per packet");

    ack_cyc = cyc;
    ack(8'd1);                      // retires 0 and 1, restarts the timer
    check(ul_ready == 1 && ul_slot == 0, "ACK 1 frees two slots, next slot wraps to 0");
    fill_one(0);
    ack(8'd0);                      // stale
    fill_one(1);
    @(negedge clk);
    check(ul_ready == 0, "stale ACK frees nothing");
    repeat (20) @(negedge clk);
    expect_sent(4, 4, 0);
    expect_sent(5, 5, 1);

    // no ACKs now: time out and resend 2, 3, 4, 5
    repeat (TO + 40) @(negedge clk);
    expect_sent(6, 2, 2);
    expect_sent(7, 3, 3);
    expect_sent(8, 4, 0);
    expect_sent(9, 5, 1);
    if (sent_cyc.size() > 6)
      check(sent_cyc[6] - ack_cyc >= TO && sent_cyc[6] - ack_cyc <= TO + 4,
            $sformatf("resend %0d cycles after the last ACK", sent_cyc[6] - ack_cyc));

    // everything acknowledged: window empties and stays quiet
    ack(8'd5);
    begin
      int n;
      n = sent_seq.size();
      repeat (2 * TO) @(negedge clk);
      check(sent_seq.size() == n, "no resends after the final ACK");
    end
    for (int i = 0; i < W; i++) fill_one((2 + i) % W);
    repeat (40) @(negedge clk);
    // a second resend round may have begun before the final ACK; the newest
    // send must be the first new packet
    check(sent_seq[$] == 9 && sent_slot[$] == 1, $sformatf("newest send: seq %0d slot %0d",
          sent_seq[$], sent_slot[$]));
    check(sent_seq[$-3] == 6 && sent_slot[$-3] == 2, "new packets start at seq 6 in slot 2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
