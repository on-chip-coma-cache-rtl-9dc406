// tb_attraction_cache: self-checking test of one attraction cache (group 0,
// index 1) with the rest of its level-1 ring played by the testbench.
//
// The testbench drives local requests (as the snoop bus would) and ring
// messages (as the other caches and the directory would), collects the
// cache's ring output and local answers, and compares them with what the
// protocol requires. One line is taken through I -> RP -> S -> WP -> M -> O ->
// I, with requests parked on the pending line and served in order, a remote
// read served with data, a remote read-exclusive taking the line (and the L1
// copies) away, an unanswered read sent round again with its lap flag, a full
// suspended queue deflecting a ring request, a lost write race (the loser
// yields and turns its returning IV into RE) and an eviction of a modified
// line (write-back). The hit latency (one cycle) is checked too.
module tb_attraction_cache;
  import coma_pkg::*;

  localparam int GRP = 0, IDX = 1, SETS = 4, WAYS = 2, QDEPTH = 4, OUTQ = 4;
  localparam logic [NODE_W-1:0] MY_ID = 8'h01;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ring_msg_t ring_in, ring_out;
  loc_req_t  loc_req;
  logic      loc_req_ready;
  loc_rsp_t  loc_rsp;
  logic [1:0]           inv_valid;
  logic [1:0][LA_W-1:0] inv_addr;
  logic ev_queued, ev_deflect, ev_evict_wb, ev_yield;

  attraction_cache #(.GRP(GRP), .IDX(IDX), .SETS(SETS), .WAYS(WAYS), .QDEPTH(QDEPTH),
                     .OUTQ(OUTQ)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ monitors
  ring_msg_t outs [$];
  loc_rsp_t  rsps [$];
  line_addr_t invs [$];
  int n_queued = 0, n_defl = 0, n_wb = 0, n_yield = 0;
  longint cyc = 0;
  longint rsp_cyc [$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ring_out.valid) outs.push_back(ring_out);
    if (loc_rsp.valid) begin rsps.push_back(loc_rsp); rsp_cyc.push_back(cyc); end
    for (int i = 0; i < 2; i++) if (inv_valid[i]) invs.push_back(inv_addr[i]);
    n_queued += int'(ev_queued);
    n_defl   += int'(ev_deflect);
    n_wb     += int'(ev_evict_wb);
    n_yield  += int'(ev_yield);
  end

  function automatic line_t dline(int k);
    line_t l;
    for (int w = 0; w < WORDS; w++) l[w*WORD_W +: WORD_W] = 32'hD000_0000 | (k << 8) | w;
    return l;
  endfunction

  function automatic ring_msg_t mk(req_e k, int la, int grp, int idx, line_t d = '0);
    ring_msg_t m;
    m = MSG_NONE;
    m.valid = 1'b1; m.kind = k; m.addr = line_addr_t'(la);
    m.src_grp = GRP_W'(grp); m.src_idx = IDX_W'(idx); m.data = d;
    return m;
  endfunction

  // a local request, held until accepted; returns the acceptance cycle
  task automatic lreq(bit we, int la, int wo, word_t wd, int tag, output longint acc);
    @(negedge clk);
    loc_req = '0;
    loc_req.valid = 1'b1; loc_req.we = we;
    loc_req.addr = {LA_W'(la), WOFF_W'(wo), 2'b00};
    loc_req.wdata = wd; loc_req.rtag = RTAG_W'(tag); loc_req.pid = PID_W'(tag % 4);
    #1;
    while (!loc_req_ready) begin @(negedge clk); #1; end
    acc = cyc + 1;
    @(negedge clk);
    loc_req = '0;
  endtask

  task automatic ring(ring_msg_t m);
    @(negedge clk);
    ring_in = m;
    @(negedge clk);
    ring_in = MSG_NONE;
  endtask

  task automatic settle();
    repeat (6) @(negedge clk);
  endtask

  // the next ring output must be e (all fields)
  task automatic expect_out(ring_msg_t e, string what);
    if (outs.size() == 0) check(1'b0, {what, ": nothing on the ring"});
    else begin
      ring_msg_t g;
      g = outs.pop_front();
      check(g == e, $sformatf("%s: got %s %h src %0d.%0d lap %b defl %b", what, g.kind.name(),
                              g.addr, g.src_grp, g.src_idx, g.lap, g.defl));
    end
  endtask

  task automatic expect_rsp(int tag, bit we, word_t d, string what);
    if (rsps.size() == 0) check(1'b0, {what, ": no local answer"});
    else begin
      loc_rsp_t r;
      r = rsps.pop_front();
      void'(rsp_cyc.pop_front());
      check(r.rtag == RTAG_W'(tag) && r.we == we && r.rdata == d,
            $sformatf("%s: answer tag %0d data %h (want tag %0d data %h)", what, r.rtag, r.rdata,
                      tag, d));
    end
  endtask

  task automatic expect_quiet(string what);
    check(outs.size() == 0 && rsps.size() == 0,
          $sformatf("%s: %0d ring messages, %0d answers left", what, outs.size(), rsps.size()));
    outs.delete(); rsps.delete(); rsp_cyc.delete();
  endtask

  initial begin
    ring_msg_t e;
    line_t d;
    longint acc;
    loc_req = '0; ring_in = MSG_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- 1 read miss: RS out, a second read of the line is parked
    lreq(0, 'h10, 2, 0, 1, acc);
    lreq(0, 'h10, 3, 0, 2, acc);
    settle();
    expect_out(mk(R_RS, 'h10, GRP, IDX), "read miss sends RS");
    check(n_queued == 2, $sformatf("both reads parked (%0d)", n_queued));
    expect_quiet("waiting for the reply");
    // ---- 2 the reply arrives: both reads answered in order, line S
    ring(mk(R_SR, 'h10, GRP, IDX, dline(1)));
    settle();
    expect_rsp(1, 0, dline(1)[2*WORD_W +: WORD_W], "first parked read");
    expect_rsp(2, 0, dline(1)[3*WORD_W +: WORD_W], "second parked read");
    expect_quiet("reply consumed");
    // ---- 3 a read hit answers one cycle after acceptance
    lreq(0, 'h10, 5, 0, 3, acc);
    settle();
    check(rsp_cyc.size() == 1 && rsp_cyc[0] == acc + 1,
          $sformatf("hit latency %0d cycles", rsp_cyc.size() ? rsp_cyc[0] - acc : -1));
    expect_rsp(3, 0, dline(1)[5*WORD_W +: WORD_W], "read hit");
    expect_quiet("hit stays local");
    // ---- 4 a remote read of the S line is answered with the data
    ring(mk(R_RS, 'h10, 0, 2));
    settle();
    expect_out(mk(R_SR, 'h10, 0, 2, dline(1)), "remote RS answered by S line");
    expect_quiet("remote read");
    // ---- 5 write to the S line: IV out, our IV returns (DE), line M
    lreq(1, 'h10, 0, 32'hCAFE_0001, 4, acc);
    settle();
    expect_out(mk(R_IV, 'h10, GRP, IDX), "write to S sends IV");
    ring(mk(R_IV, 'h10, GRP, IDX));
    settle();
    expect_rsp(4, 1, 32'hCAFE_0001, "write done after IV returned");
    expect_quiet("IV consumed");
    // ---- 6 a remote read of the M line gets the new data (line O)
    d = dline(1); d[0 +: WORD_W] = 32'hCAFE_0001;
    ring(mk(R_RS, 'h10, 1, 0));
    settle();
    expect_out(mk(R_SR, 'h10, 1, 0, d), "remote RS answered by M line");
    // O line still answers reads locally
    lreq(0, 'h10, 0, 0, 5, acc);
    settle();
    expect_rsp(5, 0, 32'hCAFE_0001, "read hit in O");
    expect_quiet("O line");
    // ---- 7 a remote RE takes the line: ER with data, L1 copies invalidated
    invs.delete();
    ring(mk(R_RE, 'h10, 0, 2));
    settle();
    expect_out(mk(R_ER, 'h10, 0, 2, d), "remote RE answered with ER");
    check(invs.size() == 1 && invs[0] == line_addr_t'('h10), "L1 copies invalidated");
    expect_quiet("line given away");
    // ---- 8 read again: RS; it comes back unanswered and goes round again
    lreq(0, 'h10, 1, 0, 6, acc);
    settle();
    expect_out(mk(R_RS, 'h10, GRP, IDX), "read miss after losing the line");
    ring(mk(R_RS, 'h10, GRP, IDX));
    settle();
    e = mk(R_RS, 'h10, GRP, IDX); e.lap = 1'b1;
    expect_out(e, "unanswered RS goes round with lap");
    // ---- 9 foreign IVs reach the pending line: parked until the queue
    //        (4 entries, one held by the read) is full, then deflected
    for (int i = 0; i < 4; i++) ring(mk(R_IV, 'h10, 2, i));
    settle();
    e = mk(R_IV, 'h10, 2, 3); e.defl = 1'b1; e.defl_id = MY_ID;
    expect_out(e, "IV deflected by a full queue");
    check(n_defl == 1, "deflection counted");
    expect_quiet("queue full");
    // the reply: the read is answered first, then the parked IVs leave in
    // order and the line is invalidated
    ring(mk(R_SR, 'h10, GRP, IDX, dline(2)));
    settle();
    expect_rsp(6, 0, dline(2)[1*WORD_W +: WORD_W], "parked read served first");
    for (int i = 0; i < 3; i++) expect_out(mk(R_IV, 'h10, 2, i), "parked IV released in order");
    expect_quiet("queue drained");
    // ---- 10 a lost write race: our IV is pending when the IV of cache 0.0
    //         passes; we yield, and our returning IV becomes an RE
    lreq(0, 'h20, 0, 0, 7, acc);
    settle();
    expect_out(mk(R_RS, 'h20, GRP, IDX), "read miss on line 0x20");
    ring(mk(R_SR, 'h20, GRP, IDX, dline(3)));
    settle();
    expect_rsp(7, 0, dline(3)[0 +: WORD_W], "line 0x20 read");
    lreq(1, 'h20, 4, 32'hBEEF_0004, 8, acc);
    settle();
    expect_out(mk(R_IV, 'h20, GRP, IDX), "write to S sends IV");
    ring(mk(R_IV, 'h20, 0, 0));
    settle();
    expect_out(mk(R_IV, 'h20, 0, 0), "winner's IV passed on");
    check(n_yield == 1, "yield counted");
    ring(mk(R_IV, 'h20, GRP, IDX));
    settle();
    expect_out(mk(R_RE, 'h20, GRP, IDX), "returning IV of the loser becomes RE");
    d = dline(4);
    ring(mk(R_ER, 'h20, GRP, IDX, d));
    settle();
    expect_rsp(8, 1, 32'hBEEF_0004, "loser's write done after ER");
    expect_quiet("race over");
    // ---- 11 the winner's data plus our write is what we now hold; two more
    //         lines of set 0 evict the modified line with a write-back
    d[4*WORD_W +: WORD_W] = 32'hBEEF_0004;
    lreq(0, 'h24, 0, 0, 9, acc);              // set 0, other way (line 0x10 is I)
    settle();
    expect_out(mk(R_RS, 'h24, GRP, IDX), "read miss on 0x24");
    ring(mk(R_SR, 'h24, GRP, IDX, dline(5)));
    settle();
    expect_rsp(9, 0, dline(5)[0 +: WORD_W], "line 0x24 read");
    lreq(0, 'h28, 0, 0, 10, acc);             // set 0 full: a victim goes
    lreq(0, 'h2C, 0, 0, 11, acc);             // and another
    settle();
    begin
      int n_wbmsg = 0, n_rs = 0;
      while (outs.size() != 0) begin
        ring_msg_t g;
        g = outs.pop_front();
        if (g.kind == R_WB) begin
          n_wbmsg++;
          check(g.addr == line_addr_t'('h20) && g.data == d, "write-back carries the M line");
        end else if (g.kind == R_RS) n_rs++;
      end
      check(n_wbmsg == 1 && n_rs == 2, $sformatf("evictions: %0d WB, %0d RS", n_wbmsg, n_rs));
      check(n_wb == 1, "write-back counted");
    end
    $display("queued=%0d deflected=%0d writebacks=%0d yields=%0d", n_queued, n_defl, n_wb, n_yield);
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
