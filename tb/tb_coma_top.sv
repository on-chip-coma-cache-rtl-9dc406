// tb_coma_top: end-to-end test of the whole on-chip COMA at its default size
// (3 groups x 3 attraction caches x 4 processors).
//
// Every processor runs a list of loads and stores, several in flight at
// once. The test goes in phases; inside a phase no word is both written and
// read, so every load has one right answer, which a reference memory
// (gold) in the testbench predicts. Between phases the test waits until all
// answers are back. The phases:
//   1 all processors read the same 8 lines (cold misses off chip, then
//     sharing across groups, parked loads on pending lines)
//   2 every processor writes its own line twice (write miss, then hit in M)
//   3 other processors read those lines (data moves from an M owner)
//   4 four processors in different groups write different words of one
//     shared line at the same time (invalidation race), one processor writes
//     another shared line
//   5 everybody reads the lines of phase 4
//   6 one processor writes 6 lines of one cache set (evictions, write-back),
//     then a processor of another group reads them
//   7 two caches of one group take turns writing one line (exclusive group:
//     the directory keeps the traffic inside the group)
// Each mechanism is counted from the design's event outputs and must have
// happened at least once.
module tb_coma_top;
  import coma_pkg::*;

  localparam int NG = 3, APG = 3, NP = 4;
  localparam int NPROC = NG * APG * NP;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  loc_req_t [NG-1:0][APG-1:0][NP-1:0] proc_req;
  logic     [NG-1:0][APG-1:0][NP-1:0] proc_req_ready;
  loc_rsp_t [NG-1:0][APG-1:0][NP-1:0] proc_rsp;
  mem_req_t mem_req;
  logic     mem_req_ready;
  mem_rsp_t mem_rsp;
  logic [NG-1:0][APG-1:0][NP-1:0] ev_l1_hit;
  logic [NG-1:0][APG-1:0] ev_ac_queued, ev_ac_deflect, ev_ac_evict_wb, ev_ac_yield;
  logic [NG-1:0] ev_dir_up, ev_dir_down, ev_dir_filtered, ev_dir_deflect;
  logic ev_offchip, ev_root_deflect;
  int   n_reads, n_writes;

  coma_top dut (.*);

  offchip_mem #(.LAT(30)) u_mem (
    .clk, .rst_n, .mem_req, .mem_req_ready, .mem_rsp, .n_reads, .n_writes
  );

  // ------------------------------------------------------------ checking
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic word_t init_word(logic [ADDR_W-1:0] a);
    return a ^ 32'hA5A5_0000;
  endfunction

  word_t gold [logic [ADDR_W-1:0]];
  function automatic word_t gold_rd(logic [ADDR_W-1:0] a);
    return gold.exists(a) ? gold[a] : init_word(a);
  endfunction

  // ------------------------------------------------------ processor drivers
  typedef struct {
    bit                 we;
    logic [ADDR_W-1:0]  addr;
    word_t              data;
  } op_t;

  op_t   ops [NPROC][$];
  word_t expect_rd [NPROC][int];
  bit    expect_we [NPROC][int];
  int    n_issued [NPROC];
  int    n_done   [NPROC];
  bit    pend_acc [NPROC];
  int    tag_ctr = 0;

  function automatic int pidx(int g, int c, int p);
    return (g * APG + c) * NP + p;
  endfunction

  task automatic add_op(int pi, bit we, logic [ADDR_W-1:0] a, word_t d);
    op_t o;
    o.we = we; o.addr = a; o.data = d;
    ops[pi].push_back(o);
  endtask

  initial begin
    proc_req = '0;
    for (int i = 0; i < NPROC; i++) begin
      n_issued[i] = 0; n_done[i] = 0; pend_acc[i] = 0;
    end
  end

  // drive and collect on the falling edge, when everything is settled
  always @(negedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < NG; g++)
        for (int c = 0; c < APG; c++)
          for (int p = 0; p < NP; p++) begin
            automatic int pi = pidx(g, c, p);
            // answers
            if (proc_rsp[g][c][p].valid) begin
              automatic int t = int'(proc_rsp[g][c][p].rtag);
              if (!expect_we[pi].exists(t))
                check(0, $sformatf("proc %0d: answer with unknown tag %0d", pi, t));
              else begin
                if (!expect_we[pi][t])
                  check(proc_rsp[g][c][p].rdata == expect_rd[pi][t],
                        $sformatf("proc %0d read %h: got %h want %h", pi,
                                  proc_rsp[g][c][p].addr, proc_rsp[g][c][p].rdata,
                                  expect_rd[pi][t]));
                expect_we[pi].delete(t);
                expect_rd[pi].delete(t);
                n_done[pi]++;
              end
            end
            // requests
            if (pend_acc[pi]) begin
              pend_acc[pi] = 0;
              proc_req[g][c][p] = '0;
            end
            if (!proc_req[g][c][p].valid && ops[pi].size() != 0) begin
              automatic op_t o = ops[pi].pop_front();
              automatic int t = tag_ctr % 65536;
              tag_ctr++;
              proc_req[g][c][p] = '{valid: 1'b1, we: o.we, addr: o.addr, wdata: o.data,
                                    pid: '0, rtag: RTAG_W'(t)};
              expect_we[pi][t] = o.we;
              if (o.we) gold[o.addr] = o.data;
              else      expect_rd[pi][t] = gold_rd(o.addr);
              n_issued[pi]++;
            end
          end
      // sample the handshake once the new requests have settled
      #1;
      for (int g = 0; g < NG; g++)
        for (int c = 0; c < APG; c++)
          for (int p = 0; p < NP; p++)
            if (proc_req[g][c][p].valid && proc_req_ready[g][c][p]) pend_acc[pidx(g, c, p)] = 1;
    end
  end

  function automatic bit all_done();
    for (int i = 0; i < NPROC; i++)
      if (ops[i].size() != 0 || n_done[i] != n_issued[i] || pend_acc[i]) return 0;
    return 1;
  endfunction

  task automatic run_phase(string name);
    longint t0 = cycle;
    repeat (2) @(posedge clk);
    while (!all_done() && cycle - t0 < 100000) @(posedge clk);
    check(all_done(), $sformatf("phase %s completes", name));
    $display("phase %-28s done in %0d cycles", name, cycle - t0);
    repeat (50) @(posedge clk);   // let write-backs and replies settle
  endtask

  // ------------------------------------------------------- event counters
  int c_hit, c_queued, c_defl, c_wb, c_yield, c_up, c_down, c_filt, c_off, c_ddefl;
  initial begin
    c_hit = 0; c_queued = 0; c_defl = 0; c_wb = 0; c_yield = 0;
    c_up = 0; c_down = 0; c_filt = 0; c_off = 0; c_ddefl = 0;
  end
  always @(posedge clk) if (rst_n) begin
    c_hit    += $countones(ev_l1_hit);
    c_queued += $countones(ev_ac_queued);
    c_defl   += $countones(ev_ac_deflect) + $countones(ev_dir_deflect) + int'(ev_root_deflect);
    c_wb     += $countones(ev_ac_evict_wb);
    c_yield  += $countones(ev_ac_yield);
    c_up     += $countones(ev_dir_up);
    c_down   += $countones(ev_dir_down);
    c_filt   += $countones(ev_dir_filtered);
    c_off    += int'(ev_offchip);
  end

  // ----------------------------------------------------------- watchdog
  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- phases
  localparam logic [ADDR_W-1:0] SHR = 32'h1000_0000;  // shared lines
  localparam logic [ADDR_W-1:0] OWN = 32'h2000_0000;  // one line per processor
  localparam logic [ADDR_W-1:0] EVB = 32'h3000_0000;  // one cache set
  localparam logic [ADDR_W-1:0] GRPX = 32'h4000_0000; // group-exclusive line

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // 1: everybody reads the same 8 lines
    for (int pi = 0; pi < NPROC; pi++)
      for (int j = 0; j < 8; j++)
        add_op(pi, 0, SHR + 32'((((j + pi) % 8) * 32) + 4 * (pi % 8)), '0);
    run_phase("1 shared cold reads");

    // 2: own line written twice
    for (int pi = 0; pi < NPROC; pi++) begin
      add_op(pi, 1, OWN + 32'(pi * 32), 32'hC000_0000 + 32'(pi));
      add_op(pi, 1, OWN + 32'(pi * 32 + 4), 32'hD000_0000 + 32'(pi));
    end
    run_phase("2 private writes");

    // 3: read somebody else's line
    for (int pi = 0; pi < NPROC; pi++) begin
      add_op(pi, 0, OWN + 32'(((pi + 13) % NPROC) * 32), '0);
      add_op(pi, 0, OWN + 32'(((pi + 13) % NPROC) * 32 + 4), '0);
    end
    run_phase("3 remote reads of M lines");

    // 4: concurrent writes to one shared line from four groups' caches
    add_op(pidx(0, 0, 0), 1, SHR + 0,  32'h1111_0000);
    add_op(pidx(1, 1, 0), 1, SHR + 4,  32'h2222_0000);
    add_op(pidx(2, 2, 0), 1, SHR + 8,  32'h3333_0000);
    add_op(pidx(2, 0, 1), 1, SHR + 12, 32'h4444_0000);
    add_op(pidx(1, 2, 3), 1, SHR + 32, 32'h5555_0000);
    run_phase("4 racing writes");

    // 5: everybody reads those words back
    for (int pi = 0; pi < NPROC; pi++) begin
      for (int k = 0; k < 4; k++) add_op(pi, 0, SHR + 32'(4 * k), '0);
      add_op(pi, 0, SHR + 32, '0);
    end
    run_phase("5 read back after race");

    // 6: six dirty lines in one set of a 4-way cache, then read elsewhere
    for (int k = 0; k < 6; k++)
      add_op(pidx(0, 1, 2), 1, EVB + 32'(k * 256 * 32), 32'hE000_0000 + 32'(k));
    run_phase("6a fill one set");
    for (int k = 0; k < 6; k++)
      add_op(pidx(2, 1, 0), 0, EVB + 32'(k * 256 * 32), '0);
    run_phase("6b read evicted lines");

    // 7: one group shares a line exclusively
    for (int k = 0; k < 4; k++) begin
      add_op(pidx(1, 0, 0), 1, GRPX + 32'(4 * k), 32'h7000_0000 + 32'(k));
      run_phase("7 group-exclusive write a");
      add_op(pidx(1, 2, 1), 1, GRPX + 32'(4 * k + 16), 32'h7100_0000 + 32'(k));
      run_phase("7 group-exclusive write b");
    end
    for (int k = 0; k < 8; k++) add_op(pidx(1, 1, 3), 0, GRPX + 32'(4 * k), '0);
    for (int k = 0; k < 8; k++) add_op(pidx(0, 2, 3), 0, GRPX + 32'(4 * k), '0);
    run_phase("7 read back");

    $display("events: l1_hit=%0d queued=%0d deflect=%0d evict_wb=%0d yield=%0d",
             c_hit, c_queued, c_defl, c_wb, c_yield);
    $display("events: dir_up=%0d dir_down=%0d dir_filtered=%0d offchip=%0d mem_rd=%0d mem_wr=%0d",
             c_up, c_down, c_filt, c_off, n_reads, n_writes);
    check(c_hit    > 0, "an L1 hit happened");
    check(c_queued > 0, "a request was parked in a suspended queue");
    check(c_wb     > 0, "an eviction wrote a dirty line back");
    check(c_yield  > 0, "a write race was resolved");
    check(c_up     > 0, "a directory sent a request up");
    check(c_down   > 0, "a directory sent a message down");
    check(c_filt   > 0, "a directory kept a request inside its group");
    check(c_off    > 0, "the root directory went off chip");
    check(n_writes > 0, "a write-back reached memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
