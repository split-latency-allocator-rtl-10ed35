// wf_categorizer: critical-wavefront detection and priority counter.
//
// For each wavefront it watches the categorization events coming out of the
// issue queue (one per queued instruction, with the port-speed bits of its two
// source operands). A wavefront that has read at least one slow register entry
// in the current timeline is critical: one slow row stretches the access
// latency of the whole wavefront. Each wavefront also carries a priority
// counter. Following the architecture, the counter takes the value of the
// slow/fast split of the register file: a critical wavefront gets the slow
// percentage (20 for an 80/20 split), a fast one the fast percentage (80), so
// a smaller value marks a wavefront that needs more time.
//
// Interface: timeline_start clears all wavefront state; cat_* are the events;
// q_wf selects a wavefront whose class, counter and slow-read count appear
// combinationally on q_*. num_critical counts critical wavefronts.
// Timing: an event at edge t is visible on q_* after edge t.
// A wavefront never seen in the timeline counts as fast. The "any slow read"
// rule and the counter encoding are this design's reading of the description.
module wf_categorizer
  import sla_pkg::*;
#(
  parameter int NUM_WF = 256,
  parameter int HIT_W  = 16,
  localparam int NC_W  = $clog2(NUM_WF + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        timeline_start,
  input  logic        cat_valid,
  input  wf_id_t      cat_wf,
  input  logic [1:0]  cat_ps,
  input  pct_t        slow_pct,
  input  wf_id_t      q_wf,
  output wf_class_t   q_class,
  output pct_t        q_priority,
  output logic [HIT_W-1:0] q_slow_hits,
  output logic [NC_W-1:0]  num_critical
);

  logic [NUM_WF-1:0]  crit_q;
  logic [HIT_W-1:0]   hits_q [NUM_WF];
  logic [1:0]         nslow;
  logic               valid_wf;

  always_comb begin
    nslow    = 2'(cat_ps[1]) + 2'(cat_ps[0]);
    valid_wf = int'(cat_wf) < NUM_WF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crit_q       <= '0;
      num_critical <= '0;
      for (int i = 0; i < NUM_WF; i++) hits_q[i] <= '0;
    end else if (timeline_start) begin
      crit_q       <= '0;
      num_critical <= '0;
      for (int i = 0; i < NUM_WF; i++) hits_q[i] <= '0;
    end else if (cat_valid && valid_wf && nslow != 2'd0) begin
      crit_q[cat_wf] <= 1'b1;
      if (!crit_q[cat_wf]) num_critical <= num_critical + 1'b1;
      if (hits_q[cat_wf] <= {HIT_W{1'b1}} - HIT_W'(nslow))
        hits_q[cat_wf] <= hits_q[cat_wf] + HIT_W'(nslow);
      else
        hits_q[cat_wf] <= {HIT_W{1'b1}};
    end
  end

  always_comb begin
    if (int'(q_wf) < NUM_WF) begin
      q_class     = crit_q[q_wf] ? WF_CRITICAL : WF_FAST;
      q_slow_hits = hits_q[q_wf];
    end else begin
      q_class     = WF_FAST;
      q_slow_hits = '0;
    end
    q_priority = (q_class == WF_CRITICAL) ? slow_pct : pct_t'(ONE_X100) - slow_pct;
  end

endmodule
