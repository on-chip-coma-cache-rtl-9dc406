// root_directory: the directory of the whole chip, a node of the level-2 ring.
//
// The root directory keeps, for every line that is somewhere on chip, a tag
// and a state (SH or EX; IN when absent). Its one job is to decide whether a
// request must leave the chip: a read (RS) or read-exclusive (RE) that finds
// the line IN is taken off the ring at once and handed to the memory
// controller, whose reply (SR or ER) the root then puts back on the level-2
// ring. A request the group directories have already sent round the whole
// chip unanswered arrives marked mem and is sent off chip whatever the
// state. Write-backs (WB) always go to the memory controller and leave the
// line IN. Everything else passes.
//
// That the root sits on the level-2 ring, knows the on-chip state and drives
// the memory controller follows the architecture; the exact state updates,
// the overflow rule (a set that lost an entry treats unknown lines as
// present, which only costs a lap) and the deflection of a request when the
// memory controller's queue is full are this design's choices.
//
// Timing: one level-2 message examined per cycle; a reply from memory is
// put on the ring in the first free slot.
module root_directory
  import coma_pkg::*;
#(
  parameter int SETS = 1024,
  parameter int WAYS = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ring_msg_t l2_in,
  output ring_msg_t l2_out,
  // to the memory controller
  output ring_msg_t mc_req,
  input  logic      mc_req_ready,
  // replies from the memory controller
  input  ring_msg_t mc_rsp,
  output logic      mc_rsp_ready,
  output logic      ev_offchip,
  output logic      ev_deflect
);
  localparam int SW = $clog2(SETS);
  localparam int WW = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam logic [NODE_W-1:0] MY_ID = 8'hFF;

  typedef logic [SW-1:0] set_t;

  logic [LA_W-SW-1:0] tagt [SETS][WAYS];
  dir_state_e         stt  [SETS][WAYS];
  logic               ovf  [SETS];
  logic [WW-1:0]      rr   [SETS];

  ring_msg_t  a;
  set_t       s;
  logic       hit, free, act;
  logic [WW-1:0] way, fway;
  dir_state_e st;
  logic       to_mem, upd, take_a, hold_a;
  ring_msg_t  hold;
  dir_state_e nst;

  always_comb begin
    a    = l2_in;
    s    = a.addr[SW-1:0];
    hit  = 1'b0; way = '0; free = 1'b0; fway = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!hit && stt[s][w] != D_IN && tagt[s][w] == a.addr[LA_W-1:SW]) begin
        hit = 1'b1; way = WW'(w);
      end
      if (!free && stt[s][w] == D_IN) begin
        free = 1'b1; fway = WW'(w);
      end
    end
    st  = hit ? stt[s][way] : (ovf[s] ? D_SH : D_IN);
    act = a.valid && (!a.defl || a.defl_id == MY_ID);

    to_mem = 1'b0;
    upd    = 1'b0;
    nst    = st;
    if (act) begin
      unique case (a.kind)
        R_RS: begin
          to_mem = a.mem || st == D_IN;
          if (st == D_IN || a.mem) begin upd = 1'b1; nst = (st == D_EX) ? D_EX : D_SH; end
        end
        R_RE, R_IV: begin
          to_mem = a.kind == R_RE && (a.mem || st == D_IN);
          upd = 1'b1; nst = D_EX;
        end
        R_WB: begin to_mem = 1'b1; upd = 1'b1; nst = D_IN; end
        default: ;
      endcase
    end

    // The hold register takes a request for memory that finds the memory
    // controller full while a reply waits, so that the reply can take its
    // slot: replies always make progress and the ring cannot lock up.
    mc_req    = hold.valid ? hold : (to_mem ? a : MSG_NONE);
    mc_req.defl = 1'b0;
    take_a    = to_mem && !hold.valid && mc_req_ready;
    hold_a    = to_mem && !take_a && !hold.valid && mc_rsp.valid;
    if (to_mem && !take_a && !hold_a) upd = 1'b0;

    mc_rsp_ready = 1'b0;
    if (a.valid && !take_a && !hold_a) begin
      l2_out = a;
      if (act) l2_out.defl = 1'b0;
      if (to_mem) begin l2_out.defl = 1'b1; l2_out.defl_id = MY_ID; end
    end else if (mc_rsp.valid) begin
      l2_out       = mc_rsp;
      mc_rsp_ready = 1'b1;
    end else
      l2_out = MSG_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++) begin
        ovf[i] <= 1'b0;
        rr[i]  <= '0;
        for (int w = 0; w < WAYS; w++) begin
          stt[i][w]  <= D_IN;
          tagt[i][w] <= '0;
        end
      end
      ev_offchip <= 1'b0;
      ev_deflect <= 1'b0;
      hold       <= MSG_NONE;
    end else begin
      if (hold.valid && mc_req_ready) hold <= MSG_NONE;
      if (hold_a) begin
        hold      <= a;
        hold.defl <= 1'b0;
      end
      if (upd) begin
        if (hit)
          stt[s][way] <= nst;
        else if (nst != D_IN) begin
          if (free) begin
            stt[s][fway]  <= nst;
            tagt[s][fway] <= a.addr[LA_W-1:SW];
          end else begin
            stt[s][rr[s]]  <= nst;
            tagt[s][rr[s]] <= a.addr[LA_W-1:SW];
            rr[s]  <= WW'((int'(rr[s]) + 1) % WAYS);
            ovf[s] <= 1'b1;
          end
        end
      end
      ev_offchip <= (take_a || hold_a) && a.kind != R_WB;
      ev_deflect <= to_mem && !take_a && !hold_a;
    end
  end

endmodule
