// tb_suspended_queue: self-checking test of the suspended request queue.
//
// A small queue (4 sets, 2 queue-table entries per set, 8 buffer slots) is
// driven with random pushes and pops on a handful of lines, so that the
// buffer and the queue-table entries of a set both run full. A reference
// model (one SystemVerilog queue per line) predicts push_ok, q_nonempty,
// q_head and free_slots every cycle; each pop must return the oldest request
// of its line. Inputs change at the falling edge, outputs are checked just
// before the rising edge.
module tb_suspended_queue;
  import coma_pkg::*;

  localparam int SETS = 4, TAG_W = 3, QWAYS = 2, DEPTH = 8;
  localparam int SW = $clog2(SETS);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                push_valid, pop_valid, push_ok, q_nonempty;
  logic [SW-1:0]       push_set, q_set, pop_set;
  logic [TAG_W-1:0]    push_tag, q_tag, pop_tag;
  sq_entry_t           push_entry, q_head;
  logic [$clog2(DEPTH):0] free_slots;

  suspended_queue #(.SETS(SETS), .TAG_W(TAG_W), .QWAYS(QWAYS), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // reference: one queue of entries per line, key = {set, tag}
  sq_entry_t model [int][$];
  int        n_used;

  function automatic int key(logic [SW-1:0] s, logic [TAG_W-1:0] t);
    return int'({s, t});
  endfunction

  function automatic int lines_in_set(logic [SW-1:0] s);
    int n = 0;
    foreach (model[k]) if (k >> TAG_W == int'(s) && model[k].size() != 0) n++;
    return n;
  endfunction

  int n_full_buf = 0, n_full_set = 0, n_pops = 0, n_both = 0;

  initial begin
    push_valid = 0; pop_valid = 0; push_set = 0; push_tag = 0; push_entry = '0;
    q_set = 0; q_tag = 0; pop_set = 0; pop_tag = 0;
    n_used = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 4000; cyc++) begin
      bit exp_ok, exp_pop;
      int kp, ko, kq;
      @(negedge clk);
      // lines: 3 tags in each of the 4 sets, so a set can want a 3rd queue
      push_valid = ($urandom % 100) < ((cyc / 500) % 2 != 0 ? 70 : 40);
      push_set   = SW'($urandom % SETS);
      push_tag   = TAG_W'($urandom % 3);
      push_entry = '0;
      push_entry.kind  = ($urandom % 2) != 0 ? R_LR : R_IV;
      push_entry.addr  = LA_W'($urandom);
      push_entry.wdata = $urandom;
      push_entry.rtag  = RTAG_W'(cyc);
      pop_valid  = ($urandom % 100) < 50;
      pop_set    = SW'($urandom % SETS);
      pop_tag    = TAG_W'($urandom % 3);
      if (pop_valid && push_valid && pop_set == push_set && pop_tag == push_tag)
        pop_tag = TAG_W'((int'(pop_tag) + 1) % 3);
      q_set      = SW'($urandom % SETS);
      q_tag      = TAG_W'($urandom % 3);
      #1;
      kp = key(push_set, push_tag);
      ko = key(pop_set, pop_tag);
      kq = key(q_set, q_tag);
      exp_ok = (n_used < DEPTH) &&
               ((model.exists(kp) && model[kp].size() != 0) || lines_in_set(push_set) < QWAYS);
      check(push_ok == exp_ok, $sformatf("push_ok=%b want %b", push_ok, exp_ok));
      check(free_slots == ($clog2(DEPTH)+1)'(DEPTH - n_used),
            $sformatf("free_slots=%0d want %0d", free_slots, DEPTH - n_used));
      begin
        bit ne;
        ne = model.exists(kq) && model[kq].size() != 0;
        check(q_nonempty == ne, $sformatf("q_nonempty=%b want %b set %0d tag %0d", q_nonempty, ne, q_set, q_tag));
        if (ne) check(q_head == model[kq][0], $sformatf("q_head rtag %0d want %0d",
                                                        q_head.rtag, model[kq][0].rtag));
      end
      if (n_used == DEPTH) n_full_buf++;
      if (push_valid && n_used < DEPTH && !exp_ok) n_full_set++;
      // apply to the model (pop first: a pop frees a slot only at the edge,
      // which the design already accounts for in the next cycle)
      exp_pop = pop_valid && model.exists(ko) && model[ko].size() != 0;
      if (exp_pop) begin
        void'(model[ko].pop_front());
        n_used--;
        n_pops++;
      end
      if (push_valid && exp_ok) begin
        model[kp].push_back(push_entry);
        n_used++;
      end
      if (exp_pop && push_valid && exp_ok) n_both++;
    end
    // drain everything and check the order once more
    @(negedge clk);
    push_valid = 0;
    for (int s = 0; s < SETS; s++)
      for (int t = 0; t < 3; t++) begin
        int k;
        k = key(SW'(s), TAG_W'(t));
        while (model.exists(k) && model[k].size() != 0) begin
          q_set = SW'(s); q_tag = TAG_W'(t);
          pop_valid = 1; pop_set = SW'(s); pop_tag = TAG_W'(t);
          #1;
          check(q_nonempty && q_head == model[k][0], "drain order");
          void'(model[k].pop_front());
          n_used--;
          @(negedge clk);
        end
      end
    pop_valid = 0;
    #1;
    check(free_slots == ($clog2(DEPTH)+1)'(DEPTH), "all slots free after drain");
    check(n_full_buf > 0, "buffer ran full");
    check(n_full_set > 0, "queue table of a set ran full");
    check(n_both > 0, "push and pop in one cycle");
    $display("pops=%0d full_buffer_cycles=%0d set_full_refusals=%0d push+pop=%0d",
             n_pops, n_full_buf, n_full_set, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
