// suspended_queue: the suspended request queue of an attraction cache.
//
// A request that reaches a line locked in ReadPending or WritePending cannot be
// served yet. Instead of blocking the cache, it is parked in a per-line
// queue, so requests to other lines keep flowing; when the reply for the
// locked line arrives the cache drains that line's queue in arrival order.
//
// Structure (as drawn for the attraction cache): a queue table with QWAYS
// entries per set, each holding the line tag and the head and tail pointers of
// a linked list in a shared queue buffer; every buffer slot holds a request
// and a next pointer; an empty-queue-head pointer (EQH) threads the free slots
// into a list of their own. The number of queue-table entries per set, the
// buffer depth and the one-push-one-pop-per-cycle interface are this
// implementation's choices; the pending state itself (the "TSta" of the
// table) is kept by the cache in its line state.
//
// Interface:
//   push_* : park push_entry on line (push_set, push_tag). push_ok says, in
//            the same cycle, whether there is room; the push happens on the
//            clock edge when push_valid && push_ok.
//   q_*    : combinational look-up of a line: q_nonempty and the oldest
//            parked request, q_head.
//   pop_*  : remove the oldest request of line (pop_set, pop_tag) at the
//            clock edge. Popping an empty line is ignored.
//   A push and a pop in the same cycle must name different lines.
module suspended_queue
  import coma_pkg::*;
#(
  parameter int SETS  = 256,
  parameter int TAG_W = 19,
  parameter int QWAYS = 4,
  parameter int DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push_valid,
  input  logic [$clog2(SETS)-1:0] push_set,
  input  logic [TAG_W-1:0]        push_tag,
  input  sq_entry_t               push_entry,
  output logic                    push_ok,
  input  logic [$clog2(SETS)-1:0] q_set,
  input  logic [TAG_W-1:0]        q_tag,
  output logic                    q_nonempty,
  output sq_entry_t               q_head,
  input  logic                    pop_valid,
  input  logic [$clog2(SETS)-1:0] pop_set,
  input  logic [TAG_W-1:0]        pop_tag,
  output logic [$clog2(DEPTH):0]  free_slots
);
  localparam int PW = $clog2(DEPTH);
  localparam int WW = (QWAYS > 1) ? $clog2(QWAYS) : 1;

  // queue table
  logic [TAG_W-1:0] qt_tag  [SETS][QWAYS];
  logic             qt_vld  [SETS][QWAYS];
  logic [PW-1:0]    qt_head [SETS][QWAYS];
  logic [PW-1:0]    qt_tail [SETS][QWAYS];
  // queue buffer
  sq_entry_t        qb_req  [DEPTH];
  logic [PW-1:0]    qb_next [DEPTH];
  logic [PW-1:0]    eqh;
  logic [PW:0]      free_cnt;

  assign free_slots = free_cnt;

  // ---- look-up for the query port
  logic          q_hit;
  logic [WW-1:0] q_way;
  always_comb begin
    q_hit = 1'b0;
    q_way = '0;
    for (int w = 0; w < QWAYS; w++)
      if (!q_hit && qt_vld[q_set][w] && qt_tag[q_set][w] == q_tag) begin
        q_hit = 1'b1;
        q_way = WW'(w);
      end
  end
  assign q_nonempty = q_hit;
  assign q_head     = qb_req[qt_head[q_set][q_way]];

  // ---- look-up for the push port: matching entry, else a free one
  logic          p_hit, p_free;
  logic [WW-1:0] p_way, p_fway;
  always_comb begin
    p_hit  = 1'b0;
    p_free = 1'b0;
    p_way  = '0;
    p_fway = '0;
    for (int w = 0; w < QWAYS; w++) begin
      if (!p_hit && qt_vld[push_set][w] && qt_tag[push_set][w] == push_tag) begin
        p_hit = 1'b1;
        p_way = WW'(w);
      end
      if (!p_free && !qt_vld[push_set][w]) begin
        p_free = 1'b1;
        p_fway = WW'(w);
      end
    end
  end
  assign push_ok = (free_cnt != 0) && (p_hit || p_free);

  // ---- look-up for the pop port
  logic          o_hit;
  logic [WW-1:0] o_way;
  always_comb begin
    o_hit = 1'b0;
    o_way = '0;
    for (int w = 0; w < QWAYS; w++)
      if (!o_hit && qt_vld[pop_set][w] && qt_tag[pop_set][w] == pop_tag) begin
        o_hit = 1'b1;
        o_way = WW'(w);
      end
  end

  wire do_push = push_valid && push_ok;
  wire do_pop  = pop_valid && o_hit;

  logic [PW-1:0] pop_slot;
  assign pop_slot = qt_head[pop_set][o_way];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < QWAYS; w++) begin
          qt_vld[s][w]  <= 1'b0;
          qt_tag[s][w]  <= '0;
          qt_head[s][w] <= '0;
          qt_tail[s][w] <= '0;
        end
      for (int i = 0; i < DEPTH; i++) begin
        qb_next[i] <= PW'((i + 1) % DEPTH);
        qb_req[i]  <= '0;
      end
      eqh      <= '0;
      free_cnt <= (PW+1)'(DEPTH);
    end else begin
      // push takes the slot at the head of the free list
      if (do_push) begin
        qb_req[eqh] <= push_entry;
        if (p_hit) begin
          qb_next[qt_tail[push_set][p_way]] <= eqh;
          qt_tail[push_set][p_way]          <= eqh;
        end else begin
          qt_vld[push_set][p_fway]  <= 1'b1;
          qt_tag[push_set][p_fway]  <= push_tag;
          qt_head[push_set][p_fway] <= eqh;
          qt_tail[push_set][p_fway] <= eqh;
        end
      end
      // pop returns the head slot of the line to the free list
      if (do_pop) begin
        if (pop_slot == qt_tail[pop_set][o_way])
          qt_vld[pop_set][o_way] <= 1'b0;
        else
          qt_head[pop_set][o_way] <= qb_next[pop_slot];
        qb_next[pop_slot] <= do_push ? qb_next[eqh] : eqh;
        eqh <= pop_slot;
      end else if (do_push) begin
        eqh <= qb_next[eqh];
      end
      case ({do_push, do_pop})
        2'b10:   free_cnt <= free_cnt - 1'b1;
        2'b01:   free_cnt <= free_cnt + 1'b1;
        default: ;
      endcase
    end
  end

  // A push and a pop on the same line in one cycle is not supported.
  assert property (@(posedge clk) disable iff (!rst_n)
    !(push_valid && pop_valid && push_set == pop_set && push_tag == pop_tag));

endmodule
