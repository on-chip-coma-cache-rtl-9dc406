// tb_root_directory: self-checking test of the root directory.
//
// Random level-2 traffic (RS, RE, IV, WB, replies, messages deflected by
// other nodes, requests marked mem) over six lines is fed to a small root
// directory (4 sets x 2 ways), while the memory-controller side accepts at
// random and offers replies at random. A reference model keeps the on-chip
// state of each line (IN / SH / EX) and the hold register and predicts, every
// cycle, what goes to the memory controller, what leaves on the ring (the
// message itself, the same message deflected back to the root, or a memory
// reply) and whether the reply is taken. A second phase fills one set past
// its ways and checks that the overflowed set then treats an unknown line as
// present on chip (no off-chip read).
module tb_root_directory;
  import coma_pkg::*;

  localparam int SETS = 4, WAYS = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  ring_msg_t l2_in, l2_out, mc_req, mc_rsp;
  logic      mc_req_ready, mc_rsp_ready, ev_offchip, ev_deflect;

  root_directory #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  dir_state_e st [line_addr_t];
  ring_msg_t  hold;
  int n_off = 0, n_offrd = 0, n_pass = 0, n_held = 0, n_defl = 0, n_inj = 0, n_evoff = 0;
  always @(posedge clk) if (rst_n && ev_offchip) n_evoff++;

  function automatic dir_state_e st_of(line_addr_t a);
    return st.exists(a) ? st[a] : D_IN;
  endfunction

  task automatic step(ring_msg_t in, bit rdy, ring_msg_t rsp);
    bit act, to_mem, take, held;
    dir_state_e s, ns;
    bit upd;
    ring_msg_t e_out, e_req;
    l2_in = in; mc_req_ready = rdy; mc_rsp = rsp;
    #1;
    s   = st_of(in.addr);
    act = in.valid && (!in.defl || in.defl_id == 8'hFF);
    to_mem = 1'b0; upd = 1'b0; ns = s;
    if (act) begin
      case (in.kind)
        R_RS: if (in.mem || s == D_IN) begin to_mem = 1; upd = 1; ns = s == D_EX ? D_EX : D_SH; end
        R_RE: begin to_mem = in.mem || s == D_IN; upd = 1; ns = D_EX; end
        R_IV: begin upd = 1; ns = D_EX; end
        R_WB: begin to_mem = 1; upd = 1; ns = D_IN; end
        default: ;
      endcase
    end
    take = to_mem && !hold.valid && rdy;
    held = to_mem && !take && !hold.valid && rsp.valid;
    // memory-controller port
    e_req = hold.valid ? hold : (to_mem ? in : MSG_NONE);
    e_req.defl = 1'b0;
    if (e_req.valid) check(mc_req == e_req, $sformatf("request to the memory controller %p / %p", mc_req, e_req));
    else             check(!mc_req.valid, "no request to the memory controller");
    // ring output
    if (in.valid && !take && !held) begin
      e_out = in;
      if (act) e_out.defl = 1'b0;
      if (to_mem) begin e_out.defl = 1'b1; e_out.defl_id = 8'hFF; n_defl++; end
      else n_pass++;
      check(l2_out == e_out, $sformatf("ring output for %s", in.kind.name()));
      check(!mc_rsp_ready, "reply waits while the ring slot is taken");
    end else if (rsp.valid) begin
      check(l2_out == rsp && mc_rsp_ready, "memory reply placed on the ring");
      n_inj++;
    end else
      check(!l2_out.valid, "ring slot empty");
    // commit
    @(posedge clk);
    if (hold.valid && rdy) hold = MSG_NONE;
    if (held) begin hold = in; hold.defl = 1'b0; n_held++; end
    if (upd && (take || held || !to_mem)) st[in.addr] = ns;
    if (take || held) n_off++;
    if ((take || held) && in.kind != R_WB) n_offrd++;
    #1;
  endtask

  initial begin
    ring_msg_t in, rsp;
    l2_in = MSG_NONE; mc_rsp = MSG_NONE; mc_req_ready = 0;
    hold = MSG_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      int k;
      in = MSG_NONE;
      if ($urandom % 100 < 80) begin
        k = $urandom % 10;
        in.valid   = 1'b1;
        in.kind    = k < 3 ? R_RS : k < 5 ? R_RE : k < 6 ? R_IV : k < 7 ? R_WB :
                     k < 8 ? R_SR : R_ER;
        in.addr    = line_addr_t'($urandom % 6);     // six lines over four sets
        in.src_grp = GRP_W'($urandom % 3);
        in.src_idx = IDX_W'($urandom % 3);
        in.up_done = 1'b1;
        in.mem     = ($urandom % 8 == 0);
        in.data    = {8{$urandom}};
        if ($urandom % 10 == 0) begin in.defl = 1'b1; in.defl_id = 8'hF1; end
        else if ($urandom % 10 == 0) begin in.defl = 1'b1; in.defl_id = 8'hFF; end
      end
      rsp = MSG_NONE;
      if ($urandom % 100 < 30) begin
        rsp.valid = 1'b1; rsp.kind = R_SR; rsp.addr = line_addr_t'($urandom); rsp.up_done = 1'b1;
      end
      step(in, (n / 500) % 2 ? ($urandom % 100 < 20) : ($urandom % 100 < 90), rsp);
    end
    // overflow: lines 0x40, 0x44, 0x48 share set 0 (two ways) with lines
    // 0 and 4; once a set has lost an entry, unknown lines count as present
    step(MSG_NONE, 1'b1, MSG_NONE);
    for (int i = 0; i < 3; i++) begin
      in = MSG_NONE;
      in.valid = 1'b1; in.kind = R_RS; in.addr = line_addr_t'(32'h40 + 4 * i);
      l2_in = in; mc_req_ready = 1'b1; mc_rsp = MSG_NONE;
      #1;
      if (mc_req.valid) n_offrd++;
      @(posedge clk); #1;
    end
    in = MSG_NONE;
    in.valid = 1'b1; in.kind = R_RS; in.addr = line_addr_t'(32'h4C);
    l2_in = in; mc_req_ready = 1'b1; mc_rsp = MSG_NONE;
    #1;
    check(!mc_req.valid && l2_out == in, "overflowed set: unknown line is not fetched");
    @(posedge clk); #1;
    l2_in = MSG_NONE;
    @(posedge clk); #1;
    check(n_evoff == n_offrd, $sformatf("ev_offchip counted %0d want %0d", n_evoff, n_offrd));
    check(n_off > 200 && n_pass > 200 && n_held > 5 && n_defl > 5 && n_inj > 200,
          "every path exercised");
    $display("offchip=%0d passed=%0d held=%0d deflected=%0d replies=%0d",
             n_off, n_pass, n_held, n_defl, n_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
