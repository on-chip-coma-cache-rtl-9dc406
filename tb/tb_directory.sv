// tb_directory: self-checking test of the group directory (group 1).
//
// Directed scenarios, each a message put on one ring of the directory; the
// testbench then collects everything the directory sends out on either ring
// and compares it with the expected message, ring and flags. The sequence
// walks one line through the states IN -> SH -> EX -> IN and covers: a group
// read that must go up, its reply coming down, a read that then stays in the
// group (filtered), foreign requests that must come down or pass by, a
// read-exclusive upgrading the group to EX, an unanswered read leaving the
// group, a second-tour request marked for memory, write-backs, foreign
// replies leaving the group, messages deflected by other nodes (untouched),
// a same-set clash (the message from above is deflected) and a full crossing
// queue (the message from below is deflected).
module tb_directory;
  import coma_pkg::*;

  localparam int GRP = 1, SETS = 4, WAYS = 2, XQ = 2;
  localparam logic [NODE_W-1:0] MY_ID = 8'hF1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ring_msg_t l1_in, l1_out, l2_in, l2_out;
  logic ev_up, ev_down, ev_filtered, ev_deflect;

  directory #(.GRP(GRP), .SETS(SETS), .WAYS(WAYS), .XQ(XQ)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // everything that leaves the directory
  ring_msg_t got1 [$], got2 [$];
  int n_up = 0, n_down = 0, n_filt = 0, n_defl = 0;
  always @(posedge clk) if (rst_n) begin
    if (l1_out.valid) got1.push_back(l1_out);
    if (l2_out.valid) got2.push_back(l2_out);
    n_up   += int'(ev_up);
    n_down += int'(ev_down);
    n_filt += int'(ev_filtered);
    n_defl += int'(ev_deflect);
  end

  function automatic ring_msg_t mk(req_e k, int la, int grp, bit lap = 0, bit up = 0, bit mem = 0);
    ring_msg_t m;
    m = MSG_NONE;
    m.valid = 1'b1; m.kind = k; m.addr = line_addr_t'(la);
    m.src_grp = GRP_W'(grp); m.src_idx = IDX_W'(2);
    m.lap = lap; m.up_done = up; m.mem = mem;
    m.data = {8{32'(la * 7 + grp)}};
    return m;
  endfunction

  // put one message on a ring for one cycle, let the directory settle
  task automatic send(bit above, ring_msg_t m);
    @(negedge clk);
    if (above) l2_in = m; else l1_in = m;
    @(negedge clk);
    l1_in = MSG_NONE; l2_in = MSG_NONE;
    repeat (4) @(negedge clk);
  endtask

  // exactly one message out, on the expected ring, equal to e
  task automatic expect_out(bit above, ring_msg_t e, string what);
    check(got1.size() + got2.size() == 1,
          $sformatf("%s: %0d messages out", what, got1.size() + got2.size()));
    if (above) begin
      check(got2.size() == 1 && got2[0] == e, $sformatf("%s: on the level-2 ring as expected", what));
    end else begin
      check(got1.size() == 1 && got1[0] == e, $sformatf("%s: on the level-1 ring as expected", what));
    end
    got1.delete(); got2.delete();
  endtask

  initial begin
    ring_msg_t m, e;
    l1_in = MSG_NONE; l2_in = MSG_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1 group read of an unknown line goes up, marked as on its tour
    m = mk(R_RS, 'h10, GRP);
    send(0, m);
    e = m; e.up_done = 1'b1;
    expect_out(1, e, "group RS on IN line");
    check(n_up == 1, "ev_up counted");
    // 2 its reply comes down (line becomes SH)
    m = mk(R_SR, 'h10, GRP, 0, 1);
    send(1, m);
    expect_out(0, m, "group SR from above");
    check(n_down == 1, "ev_down counted");
    // 3 a second group read stays in the group
    m = mk(R_RS, 'h10, GRP);
    send(0, m);
    expect_out(0, m, "group RS on SH line");
    check(n_filt == 1, "filtered request counted");
    // 4 a foreign read of the SH line comes down
    m = mk(R_RS, 'h10, 0, 0, 1);
    send(1, m);
    expect_out(0, m, "foreign RS on SH line");
    // 5 a foreign read of an unknown line passes by
    m = mk(R_RS, 'h23, 2, 0, 1);
    send(1, m);
    expect_out(1, m, "foreign RS on IN line");
    // 6 a group RE on the SH line goes up and makes the group EX
    m = mk(R_RE, 'h10, GRP);
    send(0, m);
    e = m; e.up_done = 1'b1;
    expect_out(1, e, "group RE on SH line");
    // 7 the next group RE stays in the group (EX)
    m = mk(R_RE, 'h10, GRP);
    send(0, m);
    expect_out(0, m, "group RE on EX line");
    // 8 a group IV on the EX line stays as well
    m = mk(R_IV, 'h10, GRP);
    send(0, m);
    expect_out(0, m, "group IV on EX line");
    // 9 a group RS that went round the group unanswered leaves it (line IN)
    m = mk(R_RS, 'h10, GRP, 1, 0);
    send(0, m);
    e = m; e.lap = 1'b0; e.up_done = 1'b1;
    expect_out(1, e, "unanswered group RS");
    // 10 ... so a new group RS for it goes up again
    m = mk(R_RS, 'h10, GRP);
    send(0, m);
    e = m; e.up_done = 1'b1;
    expect_out(1, e, "group RS after the line left");
    // 11 a request unanswered after its level-2 tour is marked for memory
    m = mk(R_RS, 'h10, GRP, 1, 1);
    send(0, m);
    e = m; e.lap = 1'b0; e.mem = 1'b1;
    expect_out(1, e, "second-tour RS goes to memory");
    // 12 write-back goes up unchanged
    m = mk(R_WB, 'h31, GRP);
    send(0, m);
    expect_out(1, m, "write-back");
    // 13 a foreign reply leaves the group, and the group holds the line (SH):
    //    a foreign RS for it then comes down
    m = mk(R_SR, 'h22, 0, 0, 1);
    send(0, m);
    expect_out(1, m, "foreign SR from below");
    m = mk(R_RS, 'h22, 2, 0, 1);
    send(1, m);
    expect_out(0, m, "foreign RS after a foreign SR left");
    // 14 a foreign ER leaves the group, which then holds nothing of the line
    m = mk(R_ER, 'h22, 2, 0, 1);
    send(0, m);
    expect_out(1, m, "foreign ER from below");
    m = mk(R_RS, 'h22, 0, 0, 1);
    send(1, m);
    expect_out(1, m, "foreign RS after the line left the group");
    // 15 messages deflected by another node pass untouched on both rings
    m = mk(R_RS, 'h10, GRP); m.defl = 1'b1; m.defl_id = 8'h12;
    send(0, m);
    expect_out(0, m, "deflected message on the level-1 ring");
    m = mk(R_SR, 'h10, GRP, 0, 1); m.defl = 1'b1; m.defl_id = 8'hF2;
    send(1, m);
    expect_out(1, m, "deflected message on the level-2 ring");
    // 16 same-set clash: the message from above goes round again
    @(negedge clk);
    l1_in = mk(R_RS, 'h14, GRP);               // set 0, goes up
    l2_in = mk(R_SR, 'h18, GRP, 0, 1);         // set 0, would come down
    @(negedge clk);
    l1_in = MSG_NONE; l2_in = MSG_NONE;
    repeat (4) @(negedge clk);
    e = mk(R_SR, 'h18, GRP, 0, 1); e.defl = 1'b1; e.defl_id = MY_ID;
    check(got2.size() == 2 && got2[0] == e, "same-set clash deflects the message from above");
    check(got1.size() == 0, "nothing came down during the clash");
    got1.delete(); got2.delete();
    // the deflected message comes back to us and now goes down
    e.defl = 1'b1;
    send(1, e);
    e.defl = 1'b0; e.defl_id = MY_ID;
    expect_out(0, e, "deflected message accepted on its return");
    // 17 full crossing queue: through traffic on the level-2 ring keeps the
    //    up queue from draining; the third message up is deflected
    @(negedge clk);
    for (int i = 0; i < XQ + 1; i++) begin
      l1_in = mk(R_WB, 'h40 + i, GRP);
      l2_in = mk(R_SR, 'h50 + i, 2, 0, 1);     // foreign reply: passes by
      @(negedge clk);
    end
    l1_in = MSG_NONE;
    l2_in = mk(R_SR, 'h5F, 2, 0, 1);
    @(negedge clk);
    l2_in = MSG_NONE;
    repeat (6) @(negedge clk);
    e = mk(R_WB, 'h40 + XQ, GRP); e.defl = 1'b1; e.defl_id = MY_ID;
    check(got1.size() == 1 && got1[0] == e, "third message up deflected on the level-1 ring");
    check(got2.size() == XQ + 2 + XQ, $sformatf("level-2 ring carried %0d messages", got2.size()));
    got1.delete(); got2.delete();
    check(n_defl == 2, $sformatf("deflections counted %0d", n_defl));

    $display("up=%0d down=%0d filtered=%0d deflected=%0d", n_up, n_down, n_filt, n_defl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
