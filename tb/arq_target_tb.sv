// arq_target_tb: self-checking test of the receive side of the ARQ.
//
// The testbench plays rx_link (requests with a SEQ number, writenext after a
// stored frame) and the upper layer (ul_done after reading). Expected answers
// come from the sliding-window rules written out by hand below: in-window and
// new -> write into slot (rd_slot + seq - rd_base) mod WINDOW; already stored
// -> drop; ahead of the window -> drop plus an immediate ACK request; behind
// the window -> drop only. Checked as well: the answer comes exactly one cycle
// after the request, the cumulative ACK number only moves over packets that
// arrived in order, the upper layer gets packets in SEQ order, a request
// without writenext leaves the slot free, and the ACK timer fires
// TARGET_TIMEOUT cycles after a packet is committed or a duplicate arrives,
// not after a bare request.
module arq_target_tb;
  localparam int unsigned W  = 4;
  localparam int unsigned TO = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;

  logic       valid, next, write, drop, writenext, ul_valid, ul_done;
  logic       ack_update, ack_req;
  logic [7:0] seq, ack_num;
  logic [1:0] writebuf, ul_slot;

  arq_target #(.WINDOW(W), .TARGET_TIMEOUT(TO)) dut (
    .clk(clk), .rst(rst), .valid(valid), .seq(seq), .next(next), .write(write),
    .drop(drop), .writebuf(writebuf), .writenext(writenext),
    .ul_valid(ul_valid), .ul_slot(ul_slot), .ul_done(ul_done),
    .ack_num(ack_num), .ack_update(ack_update), .ack_req(ack_req));

  int n_ackreq, cyc, last_ackreq_cyc;
  always @(posedge clk) begin
    cyc++;
    if (ack_req) begin n_ackreq++; last_ackreq_cyc = cyc; end
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

  // one request; expect_write / expect_slot / expect_req: immediate ACK request
  task automatic request(logic [7:0] s, bit expect_write, int expect_slot, bit expect_req,
                         bit commit);
    @(negedge clk);
    valid = 1; seq = s;
    @(negedge clk);
    valid = 0;
    check(ack_req == expect_req, $sformatf("seq %0d: immediate ACK request", s));
    check(next == 1, $sformatf("seq %0d: next one cycle after the request", s));
    check(write == expect_write && drop == !expect_write,
          $sformatf("seq %0d: write=%0b drop=%0b", s, write, drop));
    if (expect_write)
      check(int'(writebuf) == expect_slot, $sformatf("seq %0d: slot %0d, expected %0d", s, writebuf, expect_slot));
    @(negedge clk);
    check(next == 0, "next is a single pulse");
    if (commit) begin
      writenext = 1;
      @(negedge clk) writenext = 0;
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic read_one(int expect_slot);
    check(ul_valid == 1, "upper layer: packet ready");
    check(int'(ul_slot) == expect_slot, $sformatf("upper layer: slot %0d expected %0d", ul_slot, expect_slot));
    ul_done = 1;
    @(negedge clk) ul_done = 0;
    @(negedge clk);
  endtask

  initial begin
    valid = 0; seq = 0; writenext = 0; ul_done = 0; n_ackreq = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(ack_num == 8'd255 && ul_valid == 0, "reset: nothing received, ACK 255");

    request(8'd0, 1, 0, 0, 1);
    check(ack_num == 8'd0 && ul_valid == 1 && ul_slot == 0, "seq 0 stored and acknowledged");
    request(8'd2, 1, 2, 0, 1);
    check(ack_num == 8'd0, "seq 2 out of order: ACK stays 0");
    request(8'd1, 1, 1, 0, 1);
    check(ack_num == 8'd2, "seq 1 fills the gap: ACK 2");
    request(8'd1, 0, 0, 0, 0);   // duplicate
    request(8'd4, 0, 0, 1, 0);   // ahead of window 0..3
    request(8'd250, 0, 0, 0, 0); // behind the window
    // upper layer reads 0, 1, 2 in order
    read_one(0);
    read_one(1);
    read_one(2);
    check(ul_valid == 0, "nothing more to read");
    // window is now 3..6, slot of 3 is 3, of 4 is 0
    request(8'd4, 1, 0, 0, 0);   // not committed (bad frame)
    check(ack_num == 8'd2, "uncommitted frame changes nothing");
    request(8'd4, 1, 0, 0, 1);   // retransmission, committed
    check(ack_num == 8'd2, "seq 4 stored but 3 missing: ACK 2");
    request(8'd3, 1, 3, 0, 1);
    check(ack_num == 8'd4, "seq 3 arrives: ACK 4");
    read_one(3);
    read_one(0);

    // ACK timer: wait for any running timer to expire, then time a fresh one
    repeat (TO + 5) @(negedge clk);
    begin
      int t0, n0;
      n0 = n_ackreq;
      @(negedge clk) valid = 1; seq = 8'd5;
      @(negedge clk) valid = 0;
      // the payload takes a while: no timer runs before the commit
      repeat (TO + 10) @(negedge clk);
      check(n_ackreq == n0, "no ACK request before the packet is committed");
      writenext = 1;
      t0 = cyc;
      @(negedge clk) writenext = 0;
      repeat (TO + 5) @(negedge clk);
      check(n_ackreq == n0 + 1, "one ACK request from the timer");
      // writenext is registered at edge t0+1; ack_req is high in the cycle
      // that follows edge t0+1+TO and is counted at the edge after it
      check(last_ackreq_cyc - t0 == TO + 2,
            $sformatf("ACK timer: %0d cycles after the commit", last_ackreq_cyc - t0));
      check(ack_num == 8'd5, "ACK 5 sent by the timer");
      // a duplicate means our ACK was lost: it starts the timer too
      n0 = n_ackreq;
      @(negedge clk) valid = 1; seq = 8'd5;
      @(negedge clk) valid = 0;
      check(drop == 1, "duplicate dropped");
      repeat (TO + 5) @(negedge clk);
      check(n_ackreq == n0 + 1, "duplicate starts the ACK timer");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
