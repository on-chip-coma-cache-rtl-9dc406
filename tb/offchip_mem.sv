// offchip_mem: behavioural model of the off-chip memory behind the memory
// controller (not part of the design; used by the testbenches).
//
// Holds whole lines in an associative array. A line never written reads as
// init_word(address) in every word, so a test can predict it. Requests take
// effect in the order they arrive: a read returns the line as it was when the
// read was accepted, LAT cycles later, in request order; writes are taken at
// once.
// The request port is always ready.
module offchip_mem
  import coma_pkg::*;
#(
  parameter int LAT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t mem_req,
  output logic     mem_req_ready,
  output mem_rsp_t mem_rsp,
  output int       n_reads,
  output int       n_writes
);
  line_t mem [line_addr_t];

  typedef struct {
    longint     due;
    line_addr_t addr;
    line_t      data;
  } pend_t;
  pend_t  pend [$];
  longint cyc;

  function automatic word_t init_word(logic [ADDR_W-1:0] a);
    return a ^ 32'hA5A5_0000;
  endfunction

  function automatic line_t read_line(line_addr_t la);
    line_t l;
    if (mem.exists(la)) return mem[la];
    for (int w = 0; w < WORDS; w++)
      l[w*WORD_W +: WORD_W] = init_word({la, WOFF_W'(w), {(OFF_W-WOFF_W){1'b0}}});
    return l;
  endfunction

  assign mem_req_ready = 1'b1;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc      <= 0;
      mem_rsp  <= '0;
      n_reads  <= 0;
      n_writes <= 0;
      pend.delete();
    end else begin
      cyc     <= cyc + 1;
      mem_rsp <= '0;
      if (mem_req.valid) begin
        if (mem_req.we) begin
          mem[mem_req.addr] = mem_req.data;
          n_writes <= n_writes + 1;
        end else begin
          pend.push_back('{due: cyc + LAT, addr: mem_req.addr, data: read_line(mem_req.addr)});
          n_reads <= n_reads + 1;
        end
      end
      if (pend.size() != 0 && pend[0].due <= cyc) begin
        mem_rsp <= '{valid: 1'b1, addr: pend[0].addr, data: pend[0].data};
        void'(pend.pop_front());
      end
    end
  end

endmodule
