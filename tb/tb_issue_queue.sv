// tb_issue_queue: self-checking test of the issue queue with port-speed bits.
// A small table model answers the PS lookups. Random pushes and pops run
// against a reference FIFO; every popped entry must carry its wavefront,
// opcode, operands and the PS bits of both operands, every push must produce
// one categorization event the next cycle, and the queue must refuse pushes
// when full.
module tb_issue_queue;
  import sla_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push_valid = 1'b0, pop_ready = 1'b0;
  logic push_ready, pop_valid;
  wf_id_t push_wf = '0;
  opcode_t push_op = '0;
  reg_addr_t push_rfa = '0, push_rfb = '0, lk_a, lk_b;
  logic lk_ps_a, lk_ps_b;
  iq_entry_t head;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic cat_valid;
  wf_id_t cat_wf;
  logic [1:0] cat_ps;
  int checks = 0, failures = 0, full_seen = 0;
  iq_entry_t q[$];
  iq_entry_t exp_cat[$];

  // slow entries: address bit pattern, independent of the queue
  function automatic logic slow_of(reg_addr_t a);
    return (a % 5) == 0;
  endfunction
  assign lk_ps_a = slow_of(lk_a);
  assign lk_ps_b = slow_of(lk_b);

  issue_queue #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push_valid, .push_ready, .push_wf, .push_op, .push_rfa, .push_rfb,
    .lk_addr_a (lk_a), .lk_addr_b (lk_b), .lk_ps_a, .lk_ps_b,
    .pop_valid, .pop_ready, .head, .count, .cat_valid, .cat_wf, .cat_ps);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, sampled at each rising edge
  always @(posedge clk) if (rst_n) begin
    check(push_ready == (q.size() < DEPTH), "ready vs occupancy");
    check(int'(count) == q.size(), "count");
    if (!push_ready) full_seen++;
    if (cat_valid) begin
      check(exp_cat.size() > 0, "unexpected categorization event");
      if (exp_cat.size() > 0) begin
        iq_entry_t e;
        e = exp_cat.pop_front();
        check(cat_wf == e.wf && cat_ps == e.ps,
              $sformatf("cat event wf %0d ps %b exp %0d %b", cat_wf, cat_ps, e.wf, e.ps));
      end
    end
    if (pop_valid && pop_ready) begin
      check(q.size() > 0, "pop from empty reference");
      if (q.size() > 0) begin
        iq_entry_t e;
        e = q.pop_front();
        check(head == e, $sformatf("head %h exp %h", head, e));
      end
    end
    if (push_valid && push_ready) begin
      iq_entry_t e;
      e = '{wf: push_wf, op_code: push_op, rfa: push_rfa,
            ps: {slow_of(push_rfa), slow_of(push_rfb)}, rfb: push_rfb};
      q.push_back(e);
      exp_cat.push_back(e);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 800; k++) begin
      @(negedge clk);
      push_valid = ($urandom_range(99) < ((k / 200) % 2 == 0 ? 80 : 30));
      pop_ready  = ($urandom_range(99) < ((k / 200) % 2 == 0 ? 30 : 80));
      push_wf    = wf_id_t'($urandom);
      push_op    = opcode_t'($urandom);
      push_rfa   = reg_addr_t'($urandom);
      push_rfb   = reg_addr_t'($urandom);
    end
    @(negedge clk);
    push_valid = 1'b0;
    pop_ready  = 1'b1;
    repeat (DEPTH + 2) @(posedge clk);
    @(negedge clk);
    check(q.size() == 0 && count == 0 && !pop_valid, "drained");
    check(exp_cat.size() == 0, "all categorization events seen");
    check(full_seen > 0, "queue became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
