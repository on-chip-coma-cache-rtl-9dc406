// tb_l1_cache: self-checking test of the level-1 cache.
//
// The testbench plays both the processor and the bus below the cache. The
// bus side answers every forwarded request after three cycles from a
// reference memory (writes update it). The processor issues one random read
// or write at a time over 64 lines, twice the cache's 32, so that lines
// conflict in the direct-mapped array; between requests the testbench
// sometimes invalidates a line, as the bus would. A shadow copy of the tag
// array predicts for every request whether it must hit (answered in the next
// cycle, nothing on the bus) or go to the bus, and every read's data is
// compared with the reference memory.
module tb_l1_cache;
  import coma_pkg::*;

  localparam int NINV = 3;
  localparam int LINES = 1024 / LINE_BYTES;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  loc_req_t proc_req, bus_req;
  loc_rsp_t proc_rsp, bus_rsp;
  logic     proc_req_ready, bus_req_ready;
  logic [NINV-1:0]           inv_valid;
  logic [NINV-1:0][LA_W-1:0] inv_addr;
  logic     ev_hit, ev_miss;

  l1_cache dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------- bus-side model
  line_t  mem [line_addr_t];
  function automatic line_t rd_line(line_addr_t la);
    line_t l;
    if (mem.exists(la)) return mem[la];
    for (int w = 0; w < WORDS; w++) l[w*WORD_W +: WORD_W] = {la[15:0], 16'(w)};
    return l;
  endfunction

  loc_req_t pend;
  int       pend_t;
  assign bus_req_ready = !pend.valid;
  always @(posedge clk) begin
    if (!rst_n) begin
      pend   <= '0;
      bus_rsp <= '0;
    end else begin
      bus_rsp <= '0;
      if (bus_req.valid && bus_req_ready) begin
        pend   <= bus_req;
        pend_t <= 3;
      end else if (pend.valid) begin
        if (pend_t == 1) begin
          line_addr_t la;
          line_t l;
          la = pend.addr[ADDR_W-1:OFF_W];
          l  = rd_line(la);
          if (pend.we) begin
            l[pend.addr[OFF_W-1:2]*WORD_W +: WORD_W] = pend.wdata;
            mem[la] = l;
          end
          bus_rsp <= '{valid: 1'b1, we: pend.we, addr: pend.addr,
                       rdata: l[pend.addr[OFF_W-1:2]*WORD_W +: WORD_W], line: l,
                       pid: pend.pid, rtag: pend.rtag};
          pend <= '0;
        end else
          pend_t <= pend_t - 1;
      end
    end
  end

  // ---------------------------------------------------- shadow tags
  logic       sv  [LINES];
  line_addr_t sla [LINES];
  int n_hits = 0, n_miss = 0, n_inv = 0, n_wr = 0, n_evhit = 0;
  always @(posedge clk) if (rst_n && ev_hit) n_evhit++;

  initial begin
    proc_req = '0;
    inv_valid = '0;
    inv_addr = '0;
    for (int i = 0; i < LINES; i++) sv[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 1500; n++) begin
      line_addr_t la;
      int ix, wo, lat;
      bit exp_hit;
      word_t exp;
      @(negedge clk);
      // sometimes invalidate a line first
      if ($urandom % 8 == 0) begin
        la = line_addr_t'(32'h400 + $urandom % 64);
        inv_valid = 3'b001 << ($urandom % 3);
        inv_addr = {3{la}};
        if (sv[int'(la) % LINES] && sla[int'(la) % LINES] == la) sv[int'(la) % LINES] = 1'b0;
        n_inv++;
        @(negedge clk);
        inv_valid = '0;
      end
      la = line_addr_t'(32'h400 + $urandom % 64);
      ix = int'(la) % LINES;
      wo = $urandom % WORDS;
      proc_req = '0;
      proc_req.valid = 1'b1;
      proc_req.we    = ($urandom % 3 == 0);
      proc_req.addr  = {la, 3'(wo), 2'b00};
      proc_req.wdata = $urandom;
      proc_req.rtag  = RTAG_W'(n);
      exp_hit = !proc_req.we && sv[ix] && sla[ix] == la;
      #1;
      check(bus_req.valid == !exp_hit, $sformatf("req %0d bus_req.valid=%b, hit expected %b",
                                                 n, bus_req.valid, exp_hit));
      check(proc_req_ready, "request accepted at once when the bus is idle");
      @(negedge clk);
      proc_req = '0;
      lat = 1;
      while (!proc_rsp.valid && lat < 50) begin @(negedge clk); lat++; end
      check(proc_rsp.valid && proc_rsp.rtag == RTAG_W'(n), $sformatf("answer to req %0d", n));
      exp = rd_line(la)[wo*WORD_W +: WORD_W];
      if (!proc_rsp.we)
        check(proc_rsp.rdata == exp, $sformatf("read %h: got %h want %h",
                                               {la, 3'(wo), 2'b00}, proc_rsp.rdata, exp));
      if (exp_hit) begin
        check(lat == 1, $sformatf("hit answered after %0d cycles", lat));
        n_hits++;
      end else if (proc_rsp.we) begin
        n_wr++;
      end else begin
        n_miss++;
        sv[ix] = 1'b1; sla[ix] = la;
      end
    end
    @(negedge clk);
    check(n_evhit == n_hits, $sformatf("ev_hit count %0d want %0d", n_evhit, n_hits));
    check(n_hits > 100 && n_miss > 100 && n_wr > 100 && n_inv > 50, "every case exercised");
    $display("hits=%0d misses=%0d writes=%0d invalidations=%0d", n_hits, n_miss, n_wr, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
