// tb_memory_controller: self-checking test of the memory controller.
//
// Random RS, RE and WB messages over 16 lines are offered on the request
// port, and the reply port is drained at random, with the behavioural
// off-chip memory (fixed read latency) behind the controller. Because the
// controller serves its queue in order, the testbench predicts each reply
// when it hands the request over: SR for RS, ER for RE, addressed to the
// requester, with the line as the latest earlier write-back left it (or the
// memory's initial pattern). Replies must come back in order, and the number
// of off-chip reads and writes must match the requests.
module tb_memory_controller;
  import coma_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ring_msg_t req, rsp;
  logic      req_ready, rsp_ready;
  mem_req_t  mem_req;
  logic      mem_req_ready;
  mem_rsp_t  mem_rsp;
  int        n_reads, n_writes;

  memory_controller #(.DEPTH(DEPTH)) dut (.*);
  offchip_mem #(.LAT(7)) u_mem (.clk, .rst_n, .mem_req, .mem_req_ready, .mem_rsp,
                                .n_reads, .n_writes);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  line_t     ref_mem [line_addr_t];
  ring_msg_t expq [$];
  int        n_rd = 0, n_wb = 0, n_rsp = 0, n_full = 0;

  function automatic line_t ref_line(line_addr_t la);
    line_t l;
    if (ref_mem.exists(la)) return ref_mem[la];
    for (int w = 0; w < WORDS; w++)
      l[w*WORD_W +: WORD_W] = {la, WOFF_W'(w), {(OFF_W-WOFF_W){1'b0}}} ^ 32'hA5A5_0000;
    return l;
  endfunction

  // replies
  always @(posedge clk) if (rst_n) begin
    if (rsp.valid && rsp_ready) begin
      n_rsp++;
      if (expq.size() == 0) check(1'b0, "reply with no request");
      else begin
        ring_msg_t e;
        e = expq.pop_front();
        check(rsp.kind == e.kind && rsp.addr == e.addr && rsp.src_grp == e.src_grp &&
              rsp.src_idx == e.src_idx, $sformatf("reply %0d kind/address/requester", n_rsp));
        check(rsp.data == e.data, $sformatf("reply %0d data", n_rsp));
        check(rsp.up_done && !rsp.mem && !rsp.lap && !rsp.defl, "reply flags");
      end
    end
    if (!req_ready) n_full++;
  end

  initial begin
    req = MSG_NONE; rsp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (!req.valid && $urandom % 100 < 60) begin
        int k;
        k = $urandom % 3;
        req = MSG_NONE;
        req.valid   = 1'b1;
        req.kind    = k == 0 ? R_RS : k == 1 ? R_RE : R_WB;
        req.addr    = line_addr_t'(32'h80 + $urandom % 16);
        req.src_grp = GRP_W'($urandom);
        req.src_idx = IDX_W'($urandom);
        req.up_done = 1'b1;
        req.mem     = 1'b1;
        req.data    = req.kind == R_WB ? {8{$urandom}} : '0;
      end
      rsp_ready = (cyc / 400) % 2 ? ($urandom % 100 < 20) : ($urandom % 100 < 90);
      @(posedge clk);
    end
    @(negedge clk);
    req = MSG_NONE;
    rsp_ready = 1'b1;
    repeat (200) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d replies missing", expq.size()));
    check(n_reads == n_rd, $sformatf("off-chip reads %0d want %0d", n_reads, n_rd));
    check(n_writes == n_wb, $sformatf("off-chip writes %0d want %0d", n_writes, n_wb));
    check(n_full > 0, "request queue ran full");
    $display("reads=%0d writebacks=%0d replies=%0d full cycles=%0d", n_rd, n_wb, n_rsp, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted requests: predict the reply, drop the request from the port
  always @(posedge clk) if (rst_n && req.valid && req_ready) begin
    if (req.kind == R_WB) begin
      ref_mem[req.addr] = req.data;
      n_wb++;
    end else begin
      ring_msg_t e;
      e = req;
      e.kind = req.kind == R_RS ? R_SR : R_ER;
      e.data = ref_line(req.addr);
      expq.push_back(e);
      n_rd++;
    end
    req <= MSG_NONE;
  end

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
