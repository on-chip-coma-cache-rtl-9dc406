// coma_top: an on-chip COMA memory system for a Microgrid of microthreaded
// processors.
//
// NG groups of APG attraction caches each. Every attraction cache serves NP
// processors, whose L1 caches reach it over a snoop bus. The attraction
// caches of a group and the group's directory form a unidirectional level-1
// ring; the group directories and the root directory form the level-2 ring;
// the root directory drives the memory controller and through it the
// off-chip memory. The default shape, three groups of three caches, is the
// one drawn for the architecture; four processors per cache is the low end
// of the 4 to 8 the architecture suggests.
//
// Each ring link is one register stage: a node's output is seen by the next
// node one cycle later. Ring order: on the level-1 ring of group g, cache 0,
// cache 1, ..., cache APG-1, directory g, cache 0; on the level-2 ring,
// directory 0, ..., directory NG-1, root, directory 0.
//
// Ports: one request/response pair per processor (index [group][cache]
// [processor]); the off-chip memory port of the memory controller; and one
// event pulse vector per mechanism, for observation.
module coma_top
  import coma_pkg::*;
#(
  parameter int NG       = 3,     // groups (level-1 rings)
  parameter int APG      = 3,     // attraction caches per group
  parameter int NP       = 4,     // processors per attraction cache
  parameter int AC_SETS  = 256,
  parameter int AC_WAYS  = 4,
  parameter int AC_QD    = 16,
  parameter int DIR_SETS = 512,
  parameter int DIR_WAYS = 8,
  parameter int RD_SETS  = 1024,
  parameter int RD_WAYS  = 16,
  parameter int L1_BYTES = 1024
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  loc_req_t [NG-1:0][APG-1:0][NP-1:0]    proc_req,
  output logic     [NG-1:0][APG-1:0][NP-1:0]    proc_req_ready,
  output loc_rsp_t [NG-1:0][APG-1:0][NP-1:0]    proc_rsp,
  output mem_req_t                              mem_req,
  input  logic                                  mem_req_ready,
  input  mem_rsp_t                              mem_rsp,
  // event pulses
  output logic [NG-1:0][APG-1:0][NP-1:0]        ev_l1_hit,
  output logic [NG-1:0][APG-1:0]                ev_ac_queued,
  output logic [NG-1:0][APG-1:0]                ev_ac_deflect,
  output logic [NG-1:0][APG-1:0]                ev_ac_evict_wb,
  output logic [NG-1:0][APG-1:0]                ev_ac_yield,
  output logic [NG-1:0]                         ev_dir_up,
  output logic [NG-1:0]                         ev_dir_down,
  output logic [NG-1:0]                         ev_dir_filtered,
  output logic [NG-1:0]                         ev_dir_deflect,
  output logic                                  ev_offchip,
  output logic                                  ev_root_deflect
);
  localparam int N1 = APG + 1;   // nodes on a level-1 ring
  localparam int N2 = NG + 1;    // nodes on the level-2 ring

  ring_msg_t [NG-1:0][N1-1:0] l1_out, l1_lnk;
  ring_msg_t [N2-1:0]         l2_out, l2_lnk;

  // ring link registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_lnk <= '0;
      l2_lnk <= '0;
    end else begin
      l1_lnk <= l1_out;
      l2_lnk <= l2_out;
    end
  end

  ring_msg_t mc_req, mc_rsp;
  logic      mc_req_ready, mc_rsp_ready;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    for (genvar c = 0; c < APG; c++) begin : g_ac
      loc_req_t              ac_req;
      logic                  ac_req_ready;
      loc_rsp_t              ac_rsp;
      logic [1:0]            ac_inv_valid;
      logic [1:0][LA_W-1:0]  ac_inv_addr;
      loc_req_t [NP-1:0]     b_req;
      logic     [NP-1:0]     b_req_ready;
      loc_rsp_t [NP-1:0]     b_rsp;
      logic [NP-1:0][2:0]            b_inv_valid;
      logic [NP-1:0][2:0][LA_W-1:0]  b_inv_addr;

      attraction_cache #(.GRP(g), .IDX(c), .SETS(AC_SETS), .WAYS(AC_WAYS),
                         .QDEPTH(AC_QD)) u_ac (
        .clk, .rst_n,
        .ring_in(l1_lnk[g][(c + N1 - 1) % N1]), .ring_out(l1_out[g][c]),
        .loc_req(ac_req), .loc_req_ready(ac_req_ready), .loc_rsp(ac_rsp),
        .inv_valid(ac_inv_valid), .inv_addr(ac_inv_addr),
        .ev_queued(ev_ac_queued[g][c]), .ev_deflect(ev_ac_deflect[g][c]),
        .ev_evict_wb(ev_ac_evict_wb[g][c]), .ev_yield(ev_ac_yield[g][c])
      );

      snoop_bus #(.NP(NP)) u_bus (
        .clk, .rst_n,
        .l1_req(b_req), .l1_req_ready(b_req_ready), .l1_rsp(b_rsp),
        .ac_req(ac_req), .ac_req_ready(ac_req_ready), .ac_rsp(ac_rsp),
        .ac_inv_valid(ac_inv_valid), .ac_inv_addr(ac_inv_addr),
        .l1_inv_valid(b_inv_valid), .l1_inv_addr(b_inv_addr)
      );

      for (genvar p = 0; p < NP; p++) begin : g_l1
        l1_cache #(.SIZE_BYTES(L1_BYTES), .NINV(3)) u_l1 (
          .clk, .rst_n,
          .proc_req(proc_req[g][c][p]), .proc_req_ready(proc_req_ready[g][c][p]),
          .proc_rsp(proc_rsp[g][c][p]),
          .bus_req(b_req[p]), .bus_req_ready(b_req_ready[p]), .bus_rsp(b_rsp[p]),
          .inv_valid(b_inv_valid[p]), .inv_addr(b_inv_addr[p]),
          .ev_hit(ev_l1_hit[g][c][p]), .ev_miss()
        );
      end
    end

    directory #(.GRP(g), .SETS(DIR_SETS), .WAYS(DIR_WAYS)) u_dir (
      .clk, .rst_n,
      .l1_in(l1_lnk[g][APG - 1]), .l1_out(l1_out[g][APG]),
      .l2_in(l2_lnk[(g + N2 - 1) % N2]), .l2_out(l2_out[g]),
      .ev_up(ev_dir_up[g]), .ev_down(ev_dir_down[g]),
      .ev_filtered(ev_dir_filtered[g]), .ev_deflect(ev_dir_deflect[g])
    );
  end

  root_directory #(.SETS(RD_SETS), .WAYS(RD_WAYS)) u_root (
    .clk, .rst_n,
    .l2_in(l2_lnk[NG - 1]), .l2_out(l2_out[NG]),
    .mc_req(mc_req), .mc_req_ready(mc_req_ready),
    .mc_rsp(mc_rsp), .mc_rsp_ready(mc_rsp_ready),
    .ev_offchip(ev_offchip), .ev_deflect(ev_root_deflect)
  );

  memory_controller u_mc (
    .clk, .rst_n,
    .req(mc_req), .req_ready(mc_req_ready),
    .rsp(mc_rsp), .rsp_ready(mc_rsp_ready),
    .mem_req(mem_req), .mem_req_ready(mem_req_ready), .mem_rsp(mem_rsp)
  );

endmodule
