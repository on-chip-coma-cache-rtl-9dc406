// tb_snoop_bus: self-checking test of the snoop bus.
//
// Four L1 ports raise random requests and hold each until it is accepted;
// the attraction-cache side accepts at random. A reference round-robin
// pointer predicts which port must be granted in every cycle, and the
// testbench checks that the request handed to the attraction cache is that
// port's, stamped with its number, that only the granted port sees ready,
// that answers reach only the L1 their pid names, and that invalidations and
// write snoops reach the right L1s. It also checks that no port waits longer
// than NP grants while requesting (fairness).
module tb_snoop_bus;
  import coma_pkg::*;

  localparam int NP = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  loc_req_t [NP-1:0] l1_req;
  logic     [NP-1:0] l1_req_ready;
  loc_rsp_t [NP-1:0] l1_rsp;
  loc_req_t          ac_req;
  logic              ac_req_ready;
  loc_rsp_t          ac_rsp;
  logic [1:0]                   ac_inv_valid;
  logic [1:0][LA_W-1:0]         ac_inv_addr;
  logic [NP-1:0][2:0]           l1_inv_valid;
  logic [NP-1:0][2:0][LA_W-1:0] l1_inv_addr;

  snoop_bus #(.NP(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int ptr, wait_cnt [NP], max_wait, n_grants, n_writes;

  initial begin
    l1_req = '0; ac_req_ready = 0; ac_rsp = '0; ac_inv_valid = '0; ac_inv_addr = '0;
    ptr = 0; max_wait = 0; n_grants = 0; n_writes = 0;
    for (int i = 0; i < NP; i++) wait_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 3000; cyc++) begin
      int g;
      @(negedge clk);
      for (int i = 0; i < NP; i++)
        if (!l1_req[i].valid && $urandom % 100 < 40) begin
          l1_req[i]       = '0;
          l1_req[i].valid = 1'b1;
          l1_req[i].we    = $urandom % 2;
          l1_req[i].addr  = $urandom;
          l1_req[i].wdata = $urandom;
          l1_req[i].rtag  = RTAG_W'($urandom);
          l1_req[i].pid   = PID_W'($urandom);   // the bus must overwrite it
        end
      ac_req_ready = $urandom % 100 < 70;
      ac_rsp       = '0;
      ac_rsp.valid = $urandom % 2;
      ac_rsp.pid   = PID_W'($urandom % NP);
      ac_rsp.rdata = $urandom;
      ac_rsp.rtag  = RTAG_W'($urandom);
      ac_inv_valid = 2'($urandom);
      ac_inv_addr  = {LA_W'($urandom), LA_W'($urandom)};
      #1;
      // expected grant
      g = -1;
      for (int k = 0; k < NP; k++)
        if (g < 0 && l1_req[(ptr + k) % NP].valid) g = (ptr + k) % NP;
      check(ac_req.valid == (g >= 0), "ac_req.valid");
      if (g >= 0) begin
        loc_req_t e;
        e = l1_req[g];
        e.pid = PID_W'(g);
        check(ac_req == e, $sformatf("ac_req carries port %0d's request", g));
      end
      for (int i = 0; i < NP; i++) begin
        check(l1_req_ready[i] == (i == g && ac_req_ready), $sformatf("ready of port %0d", i));
        check(l1_rsp[i].valid == (ac_rsp.valid && int'(ac_rsp.pid) == i),
              $sformatf("answer routing to port %0d", i));
        if (l1_rsp[i].valid) check(l1_rsp[i].rdata == ac_rsp.rdata && l1_rsp[i].rtag == ac_rsp.rtag,
                                   "answer contents");
        check(l1_inv_valid[i][1:0] == ac_inv_valid && l1_inv_addr[i][1:0] == ac_inv_addr,
              "cache invalidations broadcast");
        check(l1_inv_valid[i][2] == (g >= 0 && ac_req_ready && l1_req[g].we && g != i),
              $sformatf("write snoop at port %0d", i));
        if (l1_inv_valid[i][2])
          check(l1_inv_addr[i][2] == l1_req[g].addr[ADDR_W-1:OFF_W], "write snoop address");
      end
      // bookkeeping at the clock edge
      @(posedge clk);
      #1;
      for (int i = 0; i < NP; i++) if (l1_req[i].valid && i != g) wait_cnt[i]++;
      if (g >= 0 && ac_req_ready) begin
        ptr = (g + 1) % NP;
        wait_cnt[g] = 0;
        n_grants++;
        if (l1_req[g].we) n_writes++;
        l1_req[g] = '0;
      end
      for (int i = 0; i < NP; i++) if (wait_cnt[i] > max_wait) max_wait = wait_cnt[i];
    end
    check(n_grants > 1000 && n_writes > 300, "enough traffic");
    // a port waits at most for the other NP-1 ports, each of which may be
    // held by a stalled attraction cache
    $display("grants=%0d writes=%0d longest wait=%0d cycles", n_grants, n_writes, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fairness: while the attraction cache accepts, a waiting port is granted
  // within NP grants
  int since [NP];
  initial for (int i = 0; i < NP; i++) since[i] = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NP; i++) begin
      if (!l1_req[i].valid || l1_req_ready[i]) since[i] = 0;
      else if (ac_req.valid && ac_req_ready) begin
        since[i]++;
        if (since[i] >= NP) begin
          failures++;
          $display("FAIL @%0t: port %0d passed over %0d times", $time, i, since[i]);
        end
      end
    end
  end

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
