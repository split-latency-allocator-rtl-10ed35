// tb_wf_categorizer: self-checking test of critical-wavefront detection.
// Feeds random categorization events (operand port-speed bits per wavefront)
// and compares, for every wavefront, the class, the priority counter and the
// number of slow reads with a reference model; a timeline start must clear
// everything. The slow percentage is switched between 20 and 40 to check the
// counter values for the 80/20 and 60/40 splits.
module tb_wf_categorizer;
  import sla_pkg::*;

  localparam int NUM_WF = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic timeline_start = 1'b0, cat_valid = 1'b0;
  wf_id_t cat_wf = '0, q_wf = '0;
  logic [1:0] cat_ps = '0;
  pct_t slow_pct = pct_t'(20);
  wf_class_t q_class;
  pct_t q_priority;
  logic [15:0] q_slow_hits;
  logic [$clog2(NUM_WF+1)-1:0] num_critical;
  int checks = 0, failures = 0;
  int ref_hits [NUM_WF];

  wf_categorizer #(.NUM_WF(NUM_WF)) dut (
    .clk, .rst_n, .timeline_start, .cat_valid, .cat_wf, .cat_ps, .slow_pct,
    .q_wf, .q_class, .q_priority, .q_slow_hits, .num_critical);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare_all();
    int ncrit;
    ncrit = 0;
    for (int w = 0; w < NUM_WF; w++) begin
      bit crit;
      int pri;
      crit = ref_hits[w] > 0;
      pri  = crit ? int'(slow_pct) : 100 - int'(slow_pct);
      ncrit += crit ? 1 : 0;
      q_wf = wf_id_t'(w);
      #1;
      check((q_class == WF_CRITICAL) == crit, $sformatf("class wf %0d", w));
      check(int'(q_priority) == pri, $sformatf("priority wf %0d = %0d exp %0d", w, q_priority, pri));
      check(int'(q_slow_hits) == ref_hits[w], $sformatf("hits wf %0d", w));
    end
    check(int'(num_critical) == ncrit, $sformatf("num_critical %0d exp %0d", num_critical, ncrit));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      for (int w = 0; w < NUM_WF; w++) ref_hits[w] = 0;
      @(negedge clk);
      timeline_start = 1'b1;
      @(negedge clk);
      timeline_start = 1'b0;
      for (int k = 0; k < 600; k++) begin
        int w;
        logic [1:0] ps;
        w  = int'($urandom_range(NUM_WF - 1));
        // roughly 20% slow operands
        ps = {($urandom_range(99) < 10), ($urandom_range(99) < 10)};
        cat_valid = ($urandom_range(3) != 0);
        cat_wf    = wf_id_t'(w);
        cat_ps    = ps;
        @(negedge clk);
        if (cat_valid) ref_hits[w] += int'(ps[1]) + int'(ps[0]);
      end
      cat_valid = 1'b0;
      slow_pct  = pct_t'((t == 1) ? 40 : 20);
      compare_all();
    end
    // a last timeline start leaves every wavefront fast
    for (int w = 0; w < NUM_WF; w++) ref_hits[w] = 0;
    @(negedge clk);
    timeline_start = 1'b1;
    @(negedge clk);
    timeline_start = 1'b0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
