// snoop_bus: the local bus joining the L1 caches of a few processors to their
// attraction cache.
//
// The L1s of NP processors share one attraction cache. The bus grants one L1
// request per cycle, round robin, stamps it with the L1's number (pid) and
// hands it to the attraction cache. Answers from the attraction cache go back
// to the L1 named by their pid. Every L1 snoops the bus: the line address of
// each write granted is broadcast so that the other L1s drop their copies,
// and the attraction cache's own invalidations (a line lost to the ring or
// evicted) are broadcast to all.
//
// That L1s and their attraction cache share a snooping bus, and that 4 to 8
// processors share it, follows the architecture. Round-robin arbitration,
// one grant per cycle and the three invalidation channels are this design's.
//
// Interface: l1_req[NP]/l1_req_ready[NP] from the L1s; ac_req/ac_req_ready
// to the attraction cache; ac_rsp from it, l1_rsp[NP] to the L1s (valid only
// at the addressed L1); ac_inv from the attraction cache; l1_inv[NP] to the
// L1s (channel 0,1: attraction cache, channel 2: write snoop).
module snoop_bus
  import coma_pkg::*;
#(
  parameter int NP = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  loc_req_t [NP-1:0]            l1_req,
  output logic     [NP-1:0]            l1_req_ready,
  output loc_rsp_t [NP-1:0]            l1_rsp,
  output loc_req_t                     ac_req,
  input  logic                         ac_req_ready,
  input  loc_rsp_t                     ac_rsp,
  input  logic [1:0]                   ac_inv_valid,
  input  logic [1:0][LA_W-1:0]         ac_inv_addr,
  output logic [NP-1:0][2:0]           l1_inv_valid,
  output logic [NP-1:0][2:0][LA_W-1:0] l1_inv_addr
);
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;

  logic [PW-1:0] ptr, gnt;
  logic          any;

  always_comb begin
    any = 1'b0;
    gnt = '0;
    for (int k = 0; k < NP; k++) begin
      automatic int i = (int'(ptr) + k) % NP;
      if (!any && l1_req[i].valid) begin
        any = 1'b1;
        gnt = PW'(i);
      end
    end
    ac_req       = any ? l1_req[gnt] : '0;
    ac_req.pid   = PID_W'(gnt);
  end

  // answers, readiness and snoop broadcast
  always_comb begin
    l1_req_ready = '0;
    if (any) l1_req_ready[gnt] = ac_req_ready;

    for (int i = 0; i < NP; i++) begin
      l1_rsp[i]       = ac_rsp;
      l1_rsp[i].valid = ac_rsp.valid && ac_rsp.pid == PID_W'(i);
      l1_inv_valid[i][1:0] = ac_inv_valid;
      l1_inv_addr[i][1:0]  = ac_inv_addr;
      // write snoop: every other L1 drops the line being written
      l1_inv_valid[i][2] = any && ac_req_ready && ac_req.we && gnt != PW'(i);
      l1_inv_addr[i][2]  = ac_req.addr[ADDR_W-1:OFF_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (any && ac_req_ready) ptr <= PW'((int'(gnt) + 1) % NP);
  end

endmodule
