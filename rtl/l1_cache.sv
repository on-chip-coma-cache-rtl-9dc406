// l1_cache: the small level-1 data cache of one microthreaded processor.
//
// The L1 only buffers data for its processor; coherence lives in the
// attraction cache below it. Lines are either Valid or Invalid. A read that
// hits answers in the next cycle; a read that misses is passed to the snoop
// bus and the line that comes back is filled and answered. A miss never
// stalls the processor's later requests: every request carries its register
// tag (register target and family), which comes back with the answer. Writes
// go through to the attraction cache (and update a valid local copy). Lines
// are invalidated when the attraction cache loses them or when another L1 on
// the same bus writes them.
//
// From the architecture: 1 KB, Valid/Invalid only, non-blocking, tagged
// requests. This design's choices: direct mapped, 32-byte lines (the
// attraction cache's line), write-through without allocation, a fill
// dropped if the same line is invalidated in the same cycle.
//
// Interface: proc_req/proc_req_ready, proc_rsp (one cycle pulse);
// bus_req/bus_req_ready towards the bus (combinational pass of misses and
// writes); bus_rsp from the bus (valid only for this L1); inv_valid/inv_addr
// (NINV line addresses per cycle) from the bus.
module l1_cache
  import coma_pkg::*;
#(
  parameter int SIZE_BYTES = 1024,
  parameter int NINV       = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  loc_req_t             proc_req,
  output logic                 proc_req_ready,
  output loc_rsp_t             proc_rsp,
  output loc_req_t             bus_req,
  input  logic                 bus_req_ready,
  input  loc_rsp_t             bus_rsp,
  input  logic [NINV-1:0]            inv_valid,
  input  logic [NINV-1:0][LA_W-1:0]  inv_addr,
  output logic                 ev_hit,
  output logic                 ev_miss
);
  localparam int LINES = SIZE_BYTES / LINE_BYTES;
  localparam int IW    = $clog2(LINES);
  localparam int TW    = LA_W - IW;

  logic          vld  [LINES];
  logic [TW-1:0] tagt [LINES];
  line_t         data [LINES];

  line_addr_t        p_la;
  logic [IW-1:0]     p_ix;
  logic [WOFF_W-1:0] p_wo;
  logic              p_hit;
  line_addr_t        f_la;
  logic              f_killed;

  always_comb begin
    p_la  = proc_req.addr[ADDR_W-1:OFF_W];
    p_ix  = p_la[IW-1:0];
    p_wo  = proc_req.addr[OFF_W-1:OFF_W-WOFF_W];
    p_hit = vld[p_ix] && tagt[p_ix] == p_la[LA_W-1:IW];

    f_la     = bus_rsp.addr[ADDR_W-1:OFF_W];
    f_killed = 1'b0;
    for (int i = 0; i < NINV; i++)
      if (inv_valid[i] && inv_addr[i] == f_la) f_killed = 1'b1;

    // reads that hit are served here unless a bus answer needs the port
    bus_req        = proc_req;
    bus_req.valid  = proc_req.valid && (proc_req.we || !p_hit);
    proc_req_ready = (proc_req.we || !p_hit) ? bus_req_ready : !bus_rsp.valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) begin
        vld[i]  <= 1'b0;
        tagt[i] <= '0;
        data[i] <= '0;
      end
      proc_rsp <= '0;
      ev_hit   <= 1'b0;
      ev_miss  <= 1'b0;
    end else begin
      proc_rsp <= '0;
      ev_hit   <= 1'b0;
      ev_miss  <= 1'b0;
      for (int i = 0; i < NINV; i++)
        if (inv_valid[i] && tagt[inv_addr[i][IW-1:0]] == inv_addr[i][LA_W-1:IW])
          vld[inv_addr[i][IW-1:0]] <= 1'b0;
      if (bus_rsp.valid) begin
        proc_rsp <= bus_rsp;
        if (!bus_rsp.we && !f_killed) begin
          vld[f_la[IW-1:0]]  <= 1'b1;
          tagt[f_la[IW-1:0]] <= f_la[LA_W-1:IW];
          data[f_la[IW-1:0]] <= bus_rsp.line;
        end
      end else if (proc_req.valid && !proc_req.we && p_hit) begin
        ev_hit   <= 1'b1;
        proc_rsp <= '{valid: 1'b1, we: 1'b0, addr: proc_req.addr,
                      rdata: data[p_ix][p_wo*WORD_W +: WORD_W], line: data[p_ix],
                      pid: proc_req.pid, rtag: proc_req.rtag};
      end
      if (proc_req.valid && !proc_req.we && !p_hit && bus_req_ready) ev_miss <= 1'b1;
      // write-through: keep a valid local copy current
      if (proc_req.valid && proc_req.we && bus_req_ready && p_hit && !f_killed)
        data[p_ix][p_wo*WORD_W +: WORD_W] <= proc_req.wdata;
    end
  end

endmodule
