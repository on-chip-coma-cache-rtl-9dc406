// attraction_cache: one L2 cache ("attraction cache", AC) of the on-chip COMA.
//
// An AC is an attraction memory: it has no home lines, serves the processors
// on its local snoop bus and, at the same time, serves requests that pass it
// on its group's unidirectional level-1 ring. Data therefore migrates to the
// cache that used it last. Lines follow a MOSI protocol with two temporary
// states, ReadPending (RP: waiting for data) and WritePending (WP: waiting for
// exclusiveness). The transitions implemented are those of the protocol
// diagram:
//   I  --LR / RS--> RP --SR--> S          I  --LW / RE--> WP
//   S  --LR; RS / SR--> S                 S  --LW / IV--> WP
//   S  --IV; BR; RE / ER; ER--> I         WP --DE; ER--> M
//   M  --LR; LW--> M     M --RS / SR--> O  O --LR; RS / SR--> O
//   O  --LW / IV--> WP   M, O --RE / ER; ER; IV; BR / WB--> I
//   RP: LR, LW, IV are queued             WP: LR, LW, IV are queued
// Requests that reach a locked (RP/WP) line go to the suspended request queue
// and are served, in order, once the reply for that line arrives.
//
// Choices of this implementation where the protocol leaves things open:
//  * A LW that misses issues RE (the diagram allows IV or RE).
//  * An IV that reaches an O or M line leaves as ER carrying the line, so the
//    writer always ends with current data.
//  * A WP line that still holds data answers RS with SR.
//  * Two writers racing for one line: the one with the lower {group,index}
//    wins. The loser passes the winner's IV/RE on, forgets its data (WP with
//    "nodata") and turns its own returning IV (DE) into an RE. The winner
//    parks the loser's IV/RE in its queue. This keeps the queues deadlock
//    free.
//  * A returning RS/RE that nobody answered is sent round again with the lap
//    flag set; the group directory then sends it up (see directory).
//  * A ring message that cannot be parked because the queue is full is sent
//    round the ring again, marked as deflected by this cache.
//  * Replacement: a free (I) way, else round robin among S/O/M ways; evicting
//    an S line is silent, an O/M line sends WB. Pending lines are never
//    evicted; a local request then waits.
//
// Timing: one ring message is examined every cycle and forwarded, replaced
// or consumed in the same cycle (the ring output is registered in the ring
// link outside). One further operation per cycle (draining a queue, or a new
// local request) proceeds when it does not touch the ring message's set.
// A local hit answers one cycle after it is accepted.
module attraction_cache
  import coma_pkg::*;
#(
  parameter int GRP    = 0,
  parameter int IDX    = 0,
  parameter int SETS   = 256,
  parameter int WAYS   = 4,
  parameter int QDEPTH = 16,
  parameter int OUTQ   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // level-1 ring
  input  ring_msg_t   ring_in,
  output ring_msg_t   ring_out,
  // local snoop bus
  input  loc_req_t    loc_req,
  output logic        loc_req_ready,
  output loc_rsp_t    loc_rsp,
  // L1 invalidations: [0] from the ring, [1] from an eviction
  output logic [1:0]              inv_valid,
  output logic [1:0][LA_W-1:0]    inv_addr,
  // event counters for observation
  output logic        ev_queued,
  output logic        ev_deflect,
  output logic        ev_evict_wb,
  output logic        ev_yield
);
  localparam int SW    = $clog2(SETS);
  localparam int TAG_W = LA_W - SW;
  localparam int WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int OQW   = $clog2(OUTQ);
  localparam int DW    = $clog2(QDEPTH);
  localparam logic [NODE_W-1:0] MY_ID = {GRP[GRP_W-1:0], IDX[IDX_W-1:0]};

  typedef logic [SW-1:0]    set_t;
  typedef logic [TAG_W-1:0] tag_t;

  // ---------------------------------------------------------------- tables
  tag_t       tagt  [SETS][WAYS];
  ac_state_e  stt   [SETS][WAYS];
  line_t      datat [SETS][WAYS];
  logic       nodat [SETS][WAYS];
  logic [WW-1:0] rr [SETS];

  function automatic set_t set_of(line_addr_t a);
    return a[SW-1:0];
  endfunction
  function automatic tag_t tag_of(line_addr_t a);
    return a[LA_W-1:SW];
  endfunction

  // ------------------------------------------------------------ out queue
  ring_msg_t     oq     [OUTQ];
  logic [OQW-1:0] oq_rd, oq_wr;
  logic [OQW:0]  oq_cnt;
  logic          oq_pop;
  logic [1:0]    oq_push_n;
  ring_msg_t     oq_push0, oq_push1;

  // ----------------------------------------------------------- drain FIFO
  logic [SW+WW-1:0] dq [QDEPTH];
  logic [DW-1:0]    dq_rd, dq_wr;
  logic [DW:0]      dq_cnt;
  logic             dq_push, dq_pop;
  logic [SW+WW-1:0] dq_push_v;

  // ------------------------------------------------------ suspended queue
  logic      sq_push_valid, sq_push_ok, sq_q_nonempty, sq_pop_valid;
  set_t      sq_push_set, sq_q_set, sq_pop_set;
  tag_t      sq_push_tag, sq_q_tag, sq_pop_tag;
  sq_entry_t sq_push_entry, sq_q_head;

  suspended_queue #(.SETS(SETS), .TAG_W(TAG_W), .QWAYS(WAYS), .DEPTH(QDEPTH)) u_sq (
    .clk, .rst_n,
    .push_valid(sq_push_valid), .push_set(sq_push_set), .push_tag(sq_push_tag),
    .push_entry(sq_push_entry), .push_ok(sq_push_ok),
    .q_set(sq_q_set), .q_tag(sq_q_tag), .q_nonempty(sq_q_nonempty), .q_head(sq_q_head),
    .pop_valid(sq_pop_valid), .pop_set(sq_pop_set), .pop_tag(sq_pop_tag),
    .free_slots()
  );

  // ============================================================ ring path
  ring_msg_t m;
  set_t      r_set;
  tag_t      r_tag;
  logic      r_hit;
  logic [WW-1:0] r_way;
  ac_state_e r_st;
  logic      r_own, r_active, r_winner;

  // ring-path results
  ring_msg_t r_out, r_out0;
  logic      r_slot_free, r_slot_free0; // message consumed, slot may carry our traffic
  logic      r_upd;            // write state of (r_set, r_way)
  ac_state_e r_nst;
  logic      r_dwe;            // write data
  logic      r_nodata_we, r_nodata;
  logic      r_push, r_push_req, r_drain, r_inv;

  always_comb begin
    m        = ring_in;
    r_set    = set_of(m.addr);
    r_tag    = tag_of(m.addr);
    r_hit    = 1'b0;
    r_way    = '0;
    for (int w = 0; w < WAYS; w++)
      if (!r_hit && stt[r_set][w] != AC_I && tagt[r_set][w] == r_tag) begin
        r_hit = 1'b1;
        r_way = WW'(w);
      end
    r_st     = r_hit ? stt[r_set][r_way] : AC_I;
    r_own    = m.src_grp == GRP[GRP_W-1:0] && m.src_idx == IDX[IDX_W-1:0];
    // lower {group,index} wins a write race
    r_winner = MY_ID < {m.src_grp, m.src_idx};
    r_active = m.valid && (!m.defl || m.defl_id == MY_ID);

    r_out0       = m;
    r_out0.defl  = 1'b0;
    r_slot_free0 = !m.valid;
    r_upd       = 1'b0;
    r_nst       = r_st;
    r_dwe       = 1'b0;
    r_nodata_we = 1'b0;
    r_nodata    = 1'b0;
    r_push_req      = 1'b0;
    r_drain     = 1'b0;
    r_inv       = 1'b0;

    if (m.valid && !r_active) begin
      r_out0 = m;                               // someone else's deflection
    end else if (r_active && r_own) begin
      unique case (m.kind)
        R_RS, R_RE: r_out0.lap = 1'b1;          // unanswered: go round again
        R_SR: begin
          r_slot_free0 = 1'b1;
          r_out0       = MSG_NONE;
          if (r_st == AC_RP) begin
            r_upd = 1'b1; r_nst = AC_S; r_dwe = 1'b1; r_drain = 1'b1;
          end
        end
        R_ER: begin
          r_slot_free0 = 1'b1;
          r_out0       = MSG_NONE;
          if (r_st == AC_WP) begin
            r_upd = 1'b1; r_nst = AC_M; r_dwe = 1'b1; r_drain = 1'b1;
            r_nodata_we = 1'b1; r_nodata = 1'b0;
          end
        end
        R_IV: begin                            // our IV is back: DE
          if (r_st == AC_WP && nodat[r_set][r_way]) begin
            r_out0 = '{valid: 1'b1, kind: R_RE, addr: m.addr, src_grp: m.src_grp,
                      src_idx: m.src_idx, lap: 1'b0, up_done: 1'b0, mem: 1'b0,
                      defl: 1'b0, defl_id: '0, data: '0};
          end else begin
            r_slot_free0 = 1'b1;
            r_out0       = MSG_NONE;
            if (r_st == AC_WP) begin
              r_upd = 1'b1; r_nst = AC_M; r_drain = 1'b1;
            end
          end
        end
        default: ;
      endcase
    end else if (r_active) begin
      unique case (m.kind)
        R_RS: begin
          if (r_st == AC_S || r_st == AC_O || r_st == AC_M ||
              (r_st == AC_WP && !nodat[r_set][r_way])) begin
            r_out0.kind = R_SR;
            r_out0.data = datat[r_set][r_way];
            if (r_st == AC_M) begin r_upd = 1'b1; r_nst = AC_O; end
          end
        end
        R_RE, R_IV: begin
          if (r_st == AC_S && m.kind == R_IV) begin
            r_upd = 1'b1; r_nst = AC_I; r_inv = 1'b1;
          end else if (r_st == AC_S || r_st == AC_O || r_st == AC_M) begin
            r_out0.kind = R_ER;
            r_out0.data = datat[r_set][r_way];
            r_upd = 1'b1; r_nst = AC_I; r_inv = 1'b1;
          end else if (r_st == AC_RP && m.kind == R_IV) begin
            r_push_req = 1'b1;
          end else if (r_st == AC_WP && r_winner) begin
            r_push_req = 1'b1;
          end else if (r_st == AC_WP) begin  // lose the race
            r_nodata_we = 1'b1; r_nodata = 1'b1; r_inv = 1'b1;
            if (m.kind == R_RE && !nodat[r_set][r_way]) begin
              r_out0.kind = R_ER;
              r_out0.data = datat[r_set][r_way];
            end
          end
        end
        R_ER: begin
          if (r_st == AC_S || r_st == AC_O || r_st == AC_M) begin
            r_upd = 1'b1; r_nst = AC_I; r_inv = 1'b1;
          end else if (r_st == AC_WP) begin
            r_nodata_we = 1'b1; r_nodata = 1'b1; r_inv = 1'b1;
          end
        end
        default: ;                              // SR, WB pass
      endcase
    end
  end

  // a message that must be parked leaves the ring, or, with the queue full,
  // goes round again marked as deflected by this cache
  always_comb begin
    r_push      = r_push_req && sq_push_ok;
    r_out       = r_out0;
    r_slot_free = r_slot_free0;
    if (r_push_req) begin
      if (sq_push_ok) begin
        r_slot_free = 1'b1;
        r_out       = MSG_NONE;
      end else begin
        r_out         = m;
        r_out.defl    = 1'b1;
        r_out.defl_id = MY_ID;
      end
    end
  end

  // ======================================================= secondary path
  // Either drain one parked request of a line that has been resolved, or
  // accept one new local request.
  logic [SW+WW-1:0] d_head;
  set_t      d_set;
  logic [WW-1:0] d_way;
  tag_t      d_tag;
  ac_state_e d_st;
  logic      d_go;

  set_t      l_set;
  tag_t      l_tag;
  logic      l_hit;
  logic [WW-1:0] l_way;
  ac_state_e l_st;
  logic [WOFF_W-1:0] l_woff;
  logic      v_found;
  logic [WW-1:0] v_way;
  logic      l_go;

  // secondary results
  logic      s_upd;
  set_t      s_set;
  logic [WW-1:0] s_way;
  ac_state_e s_nst;
  logic      s_tag_we;
  tag_t      s_tag;
  logic      s_word_we;
  logic [WOFF_W-1:0] s_woff;
  word_t     s_wdata;
  logic      s_nodata_we, s_nodata;
  loc_rsp_t  s_rsp;
  logic      s_inv;
  line_addr_t s_inv_addr;
  logic      s_evict_wb;
  logic      s_rr_adv;

  sq_entry_t e;
  sq_entry_t l_entry;
  logic      l_push_req;

  // queue look-up follows the head of the drain FIFO
  assign sq_q_set = d_set;
  assign sq_q_tag = d_tag;

  // the one push port: a ring message to park has priority over a local
  // request (a local request is not taken in a cycle the ring pushes)
  always_comb begin
    l_push_req = l_go && (l_hit ? (l_st == AC_RP || l_st == AC_WP ||
                                   (loc_req.we && l_st != AC_M))
                                : v_found);
    if (r_push_req) begin
      sq_push_valid = 1'b1;
      sq_push_set   = r_set;
      sq_push_tag   = r_tag;
      sq_push_entry = '{kind: m.kind, addr: m.addr, woff: '0, wdata: '0, pid: '0, rtag: '0,
                        src_grp: m.src_grp, src_idx: m.src_idx, lap: m.lap, up_done: m.up_done};
    end else begin
      sq_push_valid = l_push_req && !d_go;
      sq_push_set   = l_set;
      sq_push_tag   = l_tag;
      sq_push_entry = l_entry;
    end
  end

  always_comb begin
    d_head = dq[dq_rd];
    d_set  = d_head[SW+WW-1:WW];
    d_way  = d_head[WW-1:0];
    d_tag  = tagt[d_set][d_way];
    d_st   = stt[d_set][d_way];
    d_go   = dq_cnt != 0 && !(ring_in.valid && r_set == d_set);

    l_set  = set_of(loc_req.addr[ADDR_W-1:OFF_W]);
    l_tag  = tag_of(loc_req.addr[ADDR_W-1:OFF_W]);
    l_woff = loc_req.addr[OFF_W-1:OFF_W-WOFF_W];
    l_hit  = 1'b0;
    l_way  = '0;
    for (int w = 0; w < WAYS; w++)
      if (!l_hit && stt[l_set][w] != AC_I && tagt[l_set][w] == l_tag) begin
        l_hit = 1'b1;
        l_way = WW'(w);
      end
    l_st = l_hit ? stt[l_set][l_way] : AC_I;
    // victim: a free way first, else round robin over non-pending ways
    v_found = 1'b0;
    v_way   = '0;
    for (int w = 0; w < WAYS; w++)
      if (!v_found && stt[l_set][w] == AC_I) begin
        v_found = 1'b1;
        v_way   = WW'(w);
      end
    for (int k = 0; k < WAYS; k++) begin
      automatic logic [WW-1:0] w = WW'((int'(rr[l_set]) + k) % WAYS);
      if (!v_found && stt[l_set][w] != AC_RP && stt[l_set][w] != AC_WP) begin
        v_found = 1'b1;
        v_way   = w;
      end
    end
    l_go = loc_req.valid && dq_cnt == 0 && !r_push_req &&
           !(ring_in.valid && r_set == l_set) && oq_cnt <= (OQW+1)'(OUTQ - 2);

    l_entry = '{kind: loc_req.we ? R_LW : R_LR, addr: loc_req.addr[ADDR_W-1:OFF_W],
                woff: l_woff, wdata: loc_req.wdata, pid: loc_req.pid, rtag: loc_req.rtag,
                src_grp: GRP[GRP_W-1:0], src_idx: IDX[IDX_W-1:0], lap: 1'b0, up_done: 1'b0};

  end

  always_comb begin
    e        = sq_q_head;

    s_upd = 1'b0; s_set = d_set; s_way = d_way; s_nst = d_st;
    s_tag_we = 1'b0; s_tag = '0;
    s_word_we = 1'b0; s_woff = e.woff; s_wdata = e.wdata;
    s_nodata_we = 1'b0; s_nodata = 1'b0;
    s_rsp = '0;
    s_inv = 1'b0; s_inv_addr = '0;
    s_evict_wb = 1'b0; s_rr_adv = 1'b0;
    oq_push_n = 2'd0; oq_push0 = MSG_NONE; oq_push1 = MSG_NONE;
    dq_pop = 1'b0;
    sq_pop_valid = 1'b0; sq_pop_set = d_set; sq_pop_tag = d_tag;
    loc_req_ready = 1'b0;

    if (d_go) begin
      if (!sq_q_nonempty || d_st == AC_RP || d_st == AC_WP) begin
        dq_pop = 1'b1;                 // done, or locked again
      end else if (oq_cnt != (OQW+1)'(OUTQ)) begin
        unique case (e.kind)
          R_LR: begin
            if (d_st == AC_I) begin
              s_upd = 1'b1; s_nst = AC_RP;
              oq_push_n = 2'd1;
              oq_push0 = '{valid: 1'b1, kind: R_RS, addr: e.addr, src_grp: GRP[GRP_W-1:0],
                           src_idx: IDX[IDX_W-1:0], lap: 1'b0, up_done: 1'b0, mem: 1'b0,
                           defl: 1'b0, defl_id: '0, data: '0};
            end else begin
              sq_pop_valid = 1'b1;
              s_rsp = '{valid: 1'b1, we: 1'b0, addr: {e.addr, e.woff, {(OFF_W-WOFF_W){1'b0}}},
                        rdata: datat[d_set][d_way][e.woff*WORD_W +: WORD_W],
                        line: datat[d_set][d_way], pid: e.pid, rtag: e.rtag};
            end
          end
          R_LW: begin
            if (d_st == AC_M) begin
              sq_pop_valid = 1'b1;
              s_word_we = 1'b1;
              s_rsp = '{valid: 1'b1, we: 1'b1, addr: {e.addr, e.woff, {(OFF_W-WOFF_W){1'b0}}},
                        rdata: e.wdata, line: '0, pid: e.pid, rtag: e.rtag};
            end else begin
              s_upd = 1'b1; s_nst = AC_WP;
              s_nodata_we = 1'b1; s_nodata = (d_st == AC_I);
              oq_push_n = 2'd1;
              oq_push0 = '{valid: 1'b1, kind: (d_st == AC_I) ? R_RE : R_IV, addr: e.addr,
                           src_grp: GRP[GRP_W-1:0], src_idx: IDX[IDX_W-1:0], lap: 1'b0,
                           up_done: 1'b0, mem: 1'b0, defl: 1'b0, defl_id: '0, data: '0};
            end
          end
          default: begin                 // a parked ring request (IV or RE)
            sq_pop_valid = 1'b1;
            oq_push_n = 2'd1;
            oq_push0 = '{valid: 1'b1, kind: e.kind, addr: e.addr, src_grp: e.src_grp,
                         src_idx: e.src_idx, lap: e.lap, up_done: e.up_done, mem: 1'b0,
                         defl: 1'b0, defl_id: '0, data: '0};
            if (d_st == AC_S && e.kind == R_IV) begin
              s_upd = 1'b1; s_nst = AC_I; s_inv = 1'b1; s_inv_addr = e.addr;
            end else if (d_st != AC_I) begin
              oq_push0.kind = R_ER;
              oq_push0.data = datat[d_set][d_way];
              s_upd = 1'b1; s_nst = AC_I; s_inv = 1'b1; s_inv_addr = e.addr;
            end
          end
        endcase
      end
    end else if (l_go) begin
      s_set = l_set;
      if (l_hit && (l_st == AC_RP || l_st == AC_WP)) begin
        // locked line: park the request
        loc_req_ready = sq_push_ok;
      end else if (l_hit && !loc_req.we) begin
        loc_req_ready = 1'b1;
        s_rsp = '{valid: 1'b1, we: 1'b0, addr: loc_req.addr,
                  rdata: datat[l_set][l_way][l_woff*WORD_W +: WORD_W],
                  line: datat[l_set][l_way], pid: loc_req.pid, rtag: loc_req.rtag};
      end else if (l_hit && l_st == AC_M) begin
        loc_req_ready = 1'b1;
        s_way = l_way; s_word_we = 1'b1; s_woff = l_woff; s_wdata = loc_req.wdata;
        s_rsp = '{valid: 1'b1, we: 1'b1, addr: loc_req.addr, rdata: loc_req.wdata,
                  line: '0, pid: loc_req.pid, rtag: loc_req.rtag};
      end else if (l_hit) begin
        // write to S or O: acquire exclusiveness with IV, park the write
        if (sq_push_ok) begin
          loc_req_ready = 1'b1;
          s_way = l_way; s_upd = 1'b1; s_nst = AC_WP;
          s_nodata_we = 1'b1; s_nodata = 1'b0;
          oq_push_n = 2'd1;
          oq_push0 = '{valid: 1'b1, kind: R_IV, addr: l_entry.addr, src_grp: GRP[GRP_W-1:0],
                       src_idx: IDX[IDX_W-1:0], lap: 1'b0, up_done: 1'b0, mem: 1'b0,
                       defl: 1'b0, defl_id: '0, data: '0};
        end
      end else if (v_found) begin
        // miss: relocate the victim (BR), then RS or RE for the new line
        if (sq_push_ok) begin
          loc_req_ready = 1'b1;
          s_way = v_way; s_upd = 1'b1; s_nst = loc_req.we ? AC_WP : AC_RP;
          s_tag_we = 1'b1; s_tag = l_tag;
          s_nodata_we = 1'b1; s_nodata = 1'b1;
          s_rr_adv = stt[l_set][v_way] != AC_I;
          if (stt[l_set][v_way] != AC_I) begin
            s_inv = 1'b1; s_inv_addr = {tagt[l_set][v_way], l_set};
          end
          oq_push0 = '{valid: 1'b1, kind: loc_req.we ? R_RE : R_RS, addr: l_entry.addr,
                       src_grp: GRP[GRP_W-1:0], src_idx: IDX[IDX_W-1:0], lap: 1'b0,
                       up_done: 1'b0, mem: 1'b0, defl: 1'b0, defl_id: '0, data: '0};
          oq_push_n = 2'd1;
          if (stt[l_set][v_way] == AC_O || stt[l_set][v_way] == AC_M) begin
            s_evict_wb = 1'b1;
            oq_push1 = oq_push0;
            oq_push0 = '{valid: 1'b1, kind: R_WB, addr: {tagt[l_set][v_way], l_set},
                         src_grp: GRP[GRP_W-1:0], src_idx: IDX[IDX_W-1:0], lap: 1'b0,
                         up_done: 1'b0, mem: 1'b0, defl: 1'b0, defl_id: '0,
                         data: datat[l_set][v_way]};
            oq_push_n = 2'd2;
          end
        end
      end
    end
  end

  // ring output: the passing message, else our oldest outgoing message
  always_comb begin
    oq_pop   = r_slot_free && oq_cnt != 0;
    ring_out = r_slot_free ? (oq_pop ? oq[oq_rd] : MSG_NONE) : r_out;
  end

  assign dq_push   = r_drain;
  assign dq_push_v = {r_set, r_way};

  // ============================================================ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          stt[s][w]   <= AC_I;
          tagt[s][w]  <= '0;
          nodat[s][w] <= 1'b0;
          datat[s][w] <= '0;
        end
      end
      for (int i = 0; i < OUTQ; i++) oq[i] <= MSG_NONE;
      for (int i = 0; i < QDEPTH; i++) dq[i] <= '0;
      oq_rd <= '0; oq_wr <= '0; oq_cnt <= '0;
      dq_rd <= '0; dq_wr <= '0; dq_cnt <= '0;
      loc_rsp <= '0;
      inv_valid <= '0;
      inv_addr <= '0;
      ev_queued <= 1'b0; ev_deflect <= 1'b0; ev_evict_wb <= 1'b0; ev_yield <= 1'b0;
    end else begin
      // ring path updates
      if (r_upd) stt[r_set][r_way] <= r_nst;
      if (r_dwe) datat[r_set][r_way] <= m.data;
      if (r_nodata_we) nodat[r_set][r_way] <= r_nodata;
      // secondary path updates (always a different set from the ring path)
      if (s_upd) stt[s_set][s_way] <= s_nst;
      if (s_tag_we) tagt[s_set][s_way] <= s_tag;
      if (s_nodata_we) nodat[s_set][s_way] <= s_nodata;
      if (s_word_we) datat[s_set][s_way][s_woff*WORD_W +: WORD_W] <= s_wdata;
      if (s_rr_adv) rr[s_set] <= WW'((int'(s_way) + 1) % WAYS);
      loc_rsp <= s_rsp;
      inv_valid <= {s_inv, r_inv};
      inv_addr  <= {s_inv_addr, m.addr};
      ev_queued   <= sq_push_valid && sq_push_ok;
      ev_deflect  <= r_push_req && !sq_push_ok;
      ev_evict_wb <= s_evict_wb;
      ev_yield    <= r_active && !r_own && r_st == AC_WP && !r_winner &&
                     (m.kind == R_IV || m.kind == R_RE);

      // outgoing queue
      if (oq_push_n >= 2'd1) oq[oq_wr] <= oq_push0;
      if (oq_push_n == 2'd2) oq[OQW'((int'(oq_wr) + 1) % OUTQ)] <= oq_push1;
      oq_wr  <= OQW'((int'(oq_wr) + int'(oq_push_n)) % OUTQ);
      if (oq_pop) oq_rd <= OQW'((int'(oq_rd) + 1) % OUTQ);
      oq_cnt <= oq_cnt + (OQW+1)'(oq_push_n) - (OQW+1)'(oq_pop);

      // drain FIFO
      if (dq_push) begin
        dq[dq_wr] <= dq_push_v;
        dq_wr <= DW'((int'(dq_wr) + 1) % QDEPTH);
      end
      if (dq_pop) dq_rd <= DW'((int'(dq_rd) + 1) % QDEPTH);
      dq_cnt <= dq_cnt + (DW+1)'(dq_push) - (DW+1)'(dq_pop);
    end
  end

  // the drain FIFO holds at most one entry per parked line
  assert property (@(posedge clk) disable iff (!rst_n) !(dq_push && dq_cnt == (DW+1)'(QDEPTH)));
  assert property (@(posedge clk) disable iff (!rst_n)
    oq_cnt + (OQW+1)'(oq_push_n) <= (OQW+1)'(OUTQ) + (OQW+1)'(oq_pop));

endmodule
