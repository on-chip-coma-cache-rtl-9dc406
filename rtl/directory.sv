// directory: the joint between a group's level-1 ring and the level-2 ring.
//
// A directory stores no data. For each line present in its group it keeps a
// tag and one of three states: IN (not in the group), SH (valid copies in the
// group, possibly also elsewhere) or EX (valid copies only in this group,
// possibly shared among its caches). From that state it decides, for every
// message passing, whether it stays on the ring it came from or crosses to
// the other one, so that traffic a group can settle on its own never loads
// the level-2 ring, and groups that hold nothing never see foreign requests.
//
// Routing (ini = the message was issued by a cache of this group):
//  from below (L1 ring):
//   ini RS     stays in the group if SH/EX (EX becomes SH); goes up if IN, or
//              after it has been round the group unanswered (lap)
//   ini RE, IV stay in the group if EX; otherwise go up, SH becomes EX
//              (IV from IN also gives EX)
//   ini SR/ER  stay in the group
//   foreign request coming back up unanswered, foreign ER: go up, state IN
//   foreign SR: goes up, state SH;   WB: goes up to the root
//   ini request already back from its tour (released from a queue in the
//              group on its way home): stays in the group
//  from above (L2 ring):
//   ini request back from its tour, ini SR (state SH if IN) or ER (state EX):
//              go down
//   foreign RS/RE/IV/ER: go down if SH/EX, pass on if IN
//   foreign SR, WB, requests for memory: pass on
// A request that has already made its level-2 tour and comes up again is
// marked mem so that the root directory fetches it from off chip.
//
// This follows the directory state diagrams where they are explicit; the
// lap/up_done/mem bookkeeping, the "unanswered means IN" correction and the
// deflection of a message when a crossing queue is full are this design's
// own. A set whose entries overflowed remembers it (ovf) and then treats an
// unknown line as SH, so a forgotten entry can only cost traffic, never a
// missed invalidation. The directory's own suspended request queue is not
// built: the directory never locks a line.
//
// Timing: one message from each ring per cycle; a crossing message waits in
// a small FIFO until a free slot passes on the other ring.
module directory
  import coma_pkg::*;
#(
  parameter int GRP  = 0,
  parameter int SETS = 512,
  parameter int WAYS = 8,
  parameter int XQ   = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ring_msg_t l1_in,
  output ring_msg_t l1_out,
  input  ring_msg_t l2_in,
  output ring_msg_t l2_out,
  output logic      ev_up,
  output logic      ev_down,
  output logic      ev_filtered,
  output logic      ev_deflect
);
  localparam int SW    = $clog2(SETS);
  localparam int TAG_W = LA_W - SW;
  localparam int WW    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int QW    = $clog2(XQ);
  localparam logic [NODE_W-1:0] MY_ID = {4'hF, GRP[3:0]};

  typedef logic [SW-1:0]    set_t;
  typedef logic [TAG_W-1:0] tag_t;

  tag_t       tagt [SETS][WAYS];
  dir_state_e stt  [SETS][WAYS];
  logic       ovf  [SETS];
  logic [WW-1:0] rr [SETS];

  // crossing FIFOs: upq carries L1 -> L2, dnq carries L2 -> L1
  ring_msg_t upq [XQ];
  ring_msg_t dnq [XQ];
  logic [QW-1:0] up_rd, up_wr, dn_rd, dn_wr;
  logic [QW:0]   up_cnt, dn_cnt;

  // ------------------------------------------------------------ look-up
  typedef struct packed {
    logic          hit;
    logic [WW-1:0] way;
    logic          free;
    logic [WW-1:0] fway;
    dir_state_e    st;
  } look_t;

  function automatic look_t lookup(line_addr_t a);
    look_t r;
    set_t s = a[SW-1:0];
    r = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!r.hit && stt[s][w] != D_IN && tagt[s][w] == a[LA_W-1:SW]) begin
        r.hit = 1'b1;
        r.way = WW'(w);
      end
      if (!r.free && stt[s][w] == D_IN) begin
        r.free = 1'b1;
        r.fway = WW'(w);
      end
    end
    r.st = r.hit ? stt[s][r.way] : (ovf[s] ? D_SH : D_IN);
    return r;
  endfunction

  ring_msg_t b, a;
  look_t     lb, la;
  logic      b_act, a_act, b_ini, a_ini;
  // decisions
  logic      b_up, a_down, a_defl, b_defl, a_full, b_full;
  logic      b_upd, a_upd;
  dir_state_e b_nst, a_nst;
  ring_msg_t b_msg, a_msg;

  always_comb begin
    b     = l1_in;
    a     = l2_in;
    lb    = lookup(b.addr);
    la    = lookup(a.addr);
    b_act = b.valid && (!b.defl || b.defl_id == MY_ID);
    a_act = a.valid && (!a.defl || a.defl_id == MY_ID);
    b_ini = b.src_grp == GRP[GRP_W-1:0];
    a_ini = a.src_grp == GRP[GRP_W-1:0];

    // ---------------------------------------------------- from below
    b_up  = 1'b0;
    b_upd = 1'b0;
    b_nst = lb.st;
    b_msg = b;
    b_msg.defl = 1'b0;
    if (b_act) begin
      if (b_ini && is_request(b.kind) && b.up_done && !b.lap) begin
        // back from its tour and released from a queue in this group on the
        // way home: stays in the group
      end else if (b_ini) begin
        unique case (b.kind)
          R_RS: begin
            if (!b.lap && !b.up_done && lb.st != D_IN) begin
              if (lb.st == D_EX) begin b_upd = 1'b1; b_nst = D_SH; end
            end else begin
              b_up = 1'b1;
              if (b.lap && !b.up_done && lb.st != D_IN) begin b_upd = 1'b1; b_nst = D_IN; end
            end
          end
          R_RE: begin
            if (!(!b.lap && !b.up_done && lb.st == D_EX)) begin
              b_up = 1'b1;
              if (b.lap && !b.up_done) begin b_upd = 1'b1; b_nst = D_IN; end
              else if (lb.st == D_SH) begin b_upd = 1'b1; b_nst = D_EX; end
            end
          end
          R_IV: begin
            if (!(lb.st == D_EX && !b.up_done)) begin
              b_up = 1'b1; b_upd = 1'b1; b_nst = D_EX;
            end
          end
          R_WB: b_up = 1'b1;
          default: ;                                  // SR, ER stay
        endcase
      end else begin
        b_up = 1'b1;                                  // everything foreign goes up
        unique case (b.kind)
          R_RS, R_RE, R_IV, R_ER: begin b_upd = 1'b1; b_nst = D_IN; end
          R_SR: begin b_upd = 1'b1; b_nst = D_SH; end
          default: ;
        endcase
      end
      if (b_up && b_ini && is_request(b.kind)) begin
        b_msg.mem     = b.up_done && b.lap;
        b_msg.up_done = 1'b1;
        b_msg.lap     = 1'b0;
      end
    end

    // ---------------------------------------------------- from above
    a_down = 1'b0;
    a_upd  = 1'b0;
    a_nst  = la.st;
    a_msg  = a;
    a_msg.defl = 1'b0;
    if (a_act && !a.mem) begin
      if (a_ini) begin
        unique case (a.kind)
          R_RS, R_RE, R_IV: a_down = 1'b1;
          R_SR: begin
            a_down = 1'b1;
            if (la.st == D_IN) begin a_upd = 1'b1; a_nst = D_SH; end
          end
          R_ER: begin a_down = 1'b1; a_upd = 1'b1; a_nst = D_EX; end
          default: ;
        endcase
      end else begin
        unique case (a.kind)
          R_RS, R_RE, R_IV, R_ER: a_down = la.st != D_IN;
          default: ;
        endcase
      end
    end

    // a message from above that shares a set with one from below goes round
    // the level-2 ring once more
    a_defl = a_act && (a_down || a_upd) && b_act && b.addr[SW-1:0] == a.addr[SW-1:0];
    if (a_defl) begin a_down = 1'b0; a_upd = 1'b0; end
    // A crossing FIFO that is full still takes a message when its head leaves
    // in the same cycle, which it does whenever the other ring's slot is
    // freed; so two messages crossing in opposite directions always swap.
    // Otherwise a crossing message that finds its FIFO full goes round its
    // ring again.
    b_full = up_cnt == (QW+1)'(XQ) && a.valid && !a_down;
    a_full = dn_cnt == (QW+1)'(XQ) && b.valid && !b_up;
    if (b_up && b_full) begin
      b_defl = 1'b1; b_up = 1'b0; b_upd = 1'b0;
    end else
      b_defl = 1'b0;
    if (a_down && a_full) begin
      a_defl = 1'b1; a_down = 1'b0; a_upd = 1'b0;
    end
  end

  // ------------------------------------------------------------ outputs
  logic b_pass, a_pass, dn_pop, up_pop;
  always_comb begin
    b_pass = b.valid && !b_up;       // through traffic on the L1 ring
    a_pass = a.valid && !a_down;     // through traffic on the L2 ring
    dn_pop = !b_pass && dn_cnt != 0;
    up_pop = !a_pass && up_cnt != 0;

    if (b_pass) begin
      l1_out = b_act ? b_msg : b;
      if (b_defl) begin l1_out = b; l1_out.defl = 1'b1; l1_out.defl_id = MY_ID; end
    end else
      l1_out = dn_pop ? dnq[dn_rd] : MSG_NONE;

    if (a_pass) begin
      l2_out = a_act ? a_msg : a;
      if (a_defl) begin l2_out = a; l2_out.defl = 1'b1; l2_out.defl_id = MY_ID; end
    end else
      l2_out = up_pop ? upq[up_rd] : MSG_NONE;
  end

  // ------------------------------------------------------------ state
  task automatic set_state(line_addr_t ad, look_t lk, dir_state_e ns);
    set_t s = ad[SW-1:0];
    if (lk.hit) begin
      stt[s][lk.way] <= ns;
    end else if (ns != D_IN) begin
      if (lk.free) begin
        stt[s][lk.fway]  <= ns;
        tagt[s][lk.fway] <= ad[LA_W-1:SW];
      end else begin
        // replace: the forgotten line makes the set "overflowed"
        stt[s][rr[s]]  <= ns;
        tagt[s][rr[s]] <= ad[LA_W-1:SW];
        rr[s]  <= WW'((int'(rr[s]) + 1) % WAYS);
        ovf[s] <= 1'b1;
      end
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        ovf[s] <= 1'b0;
        rr[s]  <= '0;
        for (int w = 0; w < WAYS; w++) begin
          stt[s][w]  <= D_IN;
          tagt[s][w] <= '0;
        end
      end
      for (int i = 0; i < XQ; i++) begin
        upq[i] <= MSG_NONE;
        dnq[i] <= MSG_NONE;
      end
      up_rd <= '0; up_wr <= '0; up_cnt <= '0;
      dn_rd <= '0; dn_wr <= '0; dn_cnt <= '0;
      ev_up <= 1'b0; ev_down <= 1'b0; ev_filtered <= 1'b0; ev_deflect <= 1'b0;
    end else begin
      if (b_upd) set_state(b.addr, lb, b_nst);
      if (a_upd) set_state(a.addr, la, a_nst);
      if (b_up) begin
        upq[up_wr] <= b_msg;
        up_wr <= QW'((int'(up_wr) + 1) % XQ);
      end
      if (up_pop) up_rd <= QW'((int'(up_rd) + 1) % XQ);
      up_cnt <= up_cnt + (QW+1)'(b_up) - (QW+1)'(up_pop);
      if (a_down) begin
        dnq[dn_wr] <= a_msg;
        dn_wr <= QW'((int'(dn_wr) + 1) % XQ);
      end
      if (dn_pop) dn_rd <= QW'((int'(dn_rd) + 1) % XQ);
      dn_cnt <= dn_cnt + (QW+1)'(a_down) - (QW+1)'(dn_pop);
      ev_up       <= b_up;
      ev_down     <= a_down;
      // a group request settled inside the group without using the L2 ring
      ev_filtered <= b_act && b_ini && !b_up && !b_defl && is_request(b.kind) && !b.up_done;
      ev_deflect  <= a_defl || b_defl;
    end
  end

endmodule
