// memory_controller: the off-chip interface behind the root directory.
//
// On-chip COMA has a backing store off chip. The memory controller takes the
// requests the root directory decides to send out (RS and RE that no cache
// on chip can answer, and every write-back WB), turns them into line reads
// and writes on the off-chip port, and turns each read's data into the reply
// the requester waits for: SR for an RS, ER for an RE, addressed to the
// original requesting cache. Replies go back to the root directory, which
// places them on the level-2 ring.
//
// The controller's existence and place follow the architecture; the
// interface is this design's: a valid/ready request port towards memory
// (mem_req: we, line address, line data), a response port from memory
// (mem_rsp, valid only, in request order), and up to DEPTH reads in flight.
// Interleaving of lines over memory banks is left to the memory behind the
// port.
//
// Timing: a request is accepted into a DEPTH-entry queue in the cycle
// req.valid && req_ready; the off-chip request leaves the next cycle at the
// earliest; a reply is offered the cycle after the memory response.
module memory_controller
  import coma_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ring_msg_t req,
  output logic      req_ready,
  output ring_msg_t rsp,
  input  logic      rsp_ready,
  output mem_req_t  mem_req,
  input  logic      mem_req_ready,
  input  mem_rsp_t  mem_rsp
);
  localparam int PW = $clog2(DEPTH);

  ring_msg_t     inq [DEPTH];   // accepted requests
  ring_msg_t     hdr [DEPTH];   // reads waiting for memory
  ring_msg_t     rpq [DEPTH];   // replies waiting for the ring
  logic [PW-1:0] in_rd, in_wr, h_rd, h_wr, r_rd, r_wr;
  logic [PW:0]   in_cnt, h_cnt, r_cnt;

  ring_msg_t head;
  logic      issue, take, give;
  ring_msg_t reply;

  always_comb begin
    head      = inq[in_rd];
    req_ready = in_cnt != (PW+1)'(DEPTH);
    take      = req.valid && req_ready;
    // a read may leave only when its reply is sure to find room
    issue     = in_cnt != 0 && mem_req_ready &&
                (head.kind == R_WB || (h_cnt + r_cnt) < (PW+1)'(DEPTH));
    mem_req   = '{valid: in_cnt != 0 && (head.kind == R_WB || (h_cnt + r_cnt) < (PW+1)'(DEPTH)),
                  we: head.kind == R_WB, addr: head.addr,
                  data: head.kind == R_WB ? head.data : '0};
    give      = r_cnt != 0 && rsp_ready;
    rsp       = r_cnt != 0 ? rpq[r_rd] : MSG_NONE;

    reply         = hdr[h_rd];
    reply.kind    = (hdr[h_rd].kind == R_RE) ? R_ER : R_SR;
    reply.data    = mem_rsp.data;
    reply.lap     = 1'b0;
    reply.up_done = 1'b1;
    reply.mem     = 1'b0;
    reply.defl    = 1'b0;
    reply.valid   = 1'b1;
  end

  wire got = mem_rsp.valid && h_cnt != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        inq[i] <= MSG_NONE; hdr[i] <= MSG_NONE; rpq[i] <= MSG_NONE;
      end
      in_rd <= '0; in_wr <= '0; in_cnt <= '0;
      h_rd  <= '0; h_wr  <= '0; h_cnt  <= '0;
      r_rd  <= '0; r_wr  <= '0; r_cnt  <= '0;
    end else begin
      if (take) begin
        inq[in_wr] <= req;
        in_wr <= PW'((int'(in_wr) + 1) % DEPTH);
      end
      if (issue) begin
        in_rd <= PW'((int'(in_rd) + 1) % DEPTH);
        if (head.kind != R_WB) begin
          hdr[h_wr] <= head;
          h_wr <= PW'((int'(h_wr) + 1) % DEPTH);
        end
      end
      in_cnt <= in_cnt + (PW+1)'(take) - (PW+1)'(issue);
      h_cnt  <= h_cnt + (PW+1)'(issue && head.kind != R_WB) - (PW+1)'(got);
      if (got) begin
        rpq[r_wr] <= reply;
        r_wr <= PW'((int'(r_wr) + 1) % DEPTH);
        h_rd <= PW'((int'(h_rd) + 1) % DEPTH);
      end
      if (give) r_rd <= PW'((int'(r_rd) + 1) % DEPTH);
      r_cnt <= r_cnt + (PW+1)'(got) - (PW+1)'(give);
    end
  end

  // memory answers only reads that were issued
  assert property (@(posedge clk) disable iff (!rst_n) mem_rsp.valid |-> h_cnt != 0);

endmodule
