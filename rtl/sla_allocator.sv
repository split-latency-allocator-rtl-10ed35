// sla_allocator: the Split Latency Allocator's wavefront-to-CU mapper.
//
// Compute units are split into two classes by their Fmax ratio: a CU whose
// ratio is strictly greater than the threshold 1 + (slow fraction of register
// entries) is a fast CU, every other CU is a slow CU (1.20 for an 80/20
// split). Categorized wavefronts wait in a small pending buffer. Every cycle
// the allocator takes, among the waiting wavefronts whose class still has a
// CU with a free wavefront slot, the one with the smallest priority counter
// (smallest = needs the most time; ties go to the lowest buffer slot), and
// sends it to the next available CU of its class: fast wavefronts to fast
// CUs, critical wavefronts to slow CUs, where the longer register access time
// is hidden. "Next available" is round robin, starting after the CU last used
// in that class. If a class holds no CU at all, its wavefronts use the other
// class (fallback). Each CU holds at most SLOTS_PER_CU wavefronts; done_* frees
// a slot.
//
// Interface: cfg_valid qualifies cu_ratio_x100/threshold_x100 (nothing is
// dispatched without it). req_* is a valid/ready input of categorized
// wavefronts. disp_* is registered: a wavefront accepted at edge t can be
// dispatched at edge t+1 at the earliest, one per cycle. stat_* count fast and
// critical dispatches, fallbacks and cycles in which wavefronts waited because
// their class had no free CU.
// The class split, threshold and priority counter follow the architecture;
// round robin, the buffer, the slot limit and the fallback are this design's
// choices.
module sla_allocator
  import sla_pkg::*;
#(
  parameter int NUM_CU       = 128,
  parameter int SLOTS_PER_CU = 40,
  parameter int PEND_DEPTH   = 16,
  localparam int CU_W  = (NUM_CU > 1) ? $clog2(NUM_CU) : 1,
  localparam int OCC_W = $clog2(SLOTS_PER_CU + 1),
  localparam int P_W   = (PEND_DEPTH > 1) ? $clog2(PEND_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_valid,
  input  ratio_t            cu_ratio_x100 [NUM_CU],
  input  ratio_t            threshold_x100,
  // categorized wavefronts
  input  logic              req_valid,
  output logic              req_ready,
  input  wf_id_t            req_wf,
  input  wf_class_t         req_class,
  input  pct_t              req_priority,
  // dispatch
  output logic              disp_valid,
  output wf_id_t            disp_wf,
  output logic [CU_W-1:0]   disp_cu,
  output logic              disp_fast_cu,
  output logic              disp_fallback,
  // completion
  input  logic              done_valid,
  input  logic [CU_W-1:0]   done_cu,
  // status
  output logic [NUM_CU-1:0] cu_is_fast,
  output logic [OCC_W-1:0]  cu_occ [NUM_CU],
  output logic [31:0]       stat_fast_wf,
  output logic [31:0]       stat_crit_wf,
  output logic [31:0]       stat_fallback,
  output logic [31:0]       stat_wait_cycles
);

  // pending buffer
  logic [PEND_DEPTH-1:0] pv_q;
  wf_id_t                pwf_q  [PEND_DEPTH];
  wf_class_t             pcls_q [PEND_DEPTH];
  pct_t                  ppri_q [PEND_DEPTH];

  logic [CU_W-1:0] ptr_fast_q, ptr_slow_q;

  logic [NUM_CU-1:0] cu_free, mask_fast, mask_slow;
  logic              fast_empty, slow_empty, avail_fast, avail_slow;
  logic [PEND_DEPTH-1:0] to_fast, elig;
  logic              pick_ok;
  logic [P_W-1:0]    pick;
  logic              cu_ok;
  logic [CU_W-1:0]   cu_sel;
  logic              ins_ok;
  logic [P_W-1:0]    ins;

  // CU classes and free slots
  always_comb begin
    for (int c = 0; c < NUM_CU; c++) begin
      cu_is_fast[c] = cu_ratio_x100[c] > threshold_x100;
      cu_free[c]    = cu_occ[c] < OCC_W'(SLOTS_PER_CU);
    end
    mask_fast  = cu_free & cu_is_fast;
    mask_slow  = cu_free & ~cu_is_fast;
    fast_empty = ~|cu_is_fast;
    slow_empty = &cu_is_fast;
    avail_fast = |mask_fast;
    avail_slow = |mask_slow;
  end

  // which waiting wavefronts can go, and the one with the smallest counter
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int p = 0; p < PEND_DEPTH; p++) begin
      to_fast[p] = (pcls_q[p] == WF_FAST) ? !fast_empty : slow_empty;
      elig[p]    = cfg_valid && pv_q[p] && (to_fast[p] ? avail_fast : avail_slow);
    end
    for (int p = 0; p < PEND_DEPTH; p++)
      if (elig[p] && (!pick_ok || ppri_q[p] < ppri_q[pick])) begin
        pick_ok = 1'b1;
        pick    = P_W'(p);
      end
  end

  // next available CU of the chosen class, round robin
  logic [NUM_CU-1:0] rr_mask;
  logic [CU_W-1:0]   rr_base;
  logic [CU_W:0]     rr_idx;

  always_comb begin
    rr_mask = to_fast[pick] ? mask_fast : mask_slow;
    rr_base = to_fast[pick] ? ptr_fast_q : ptr_slow_q;
    cu_ok   = 1'b0;
    cu_sel  = '0;
    rr_idx  = '0;
    for (int i = 1; i <= NUM_CU; i++) begin
      rr_idx = (CU_W+1)'(rr_base) + (CU_W+1)'(i);
      if (rr_idx >= (CU_W+1)'(NUM_CU)) rr_idx = rr_idx - (CU_W+1)'(NUM_CU);
      if (!cu_ok && rr_mask[rr_idx[CU_W-1:0]]) begin
        cu_ok  = 1'b1;
        cu_sel = rr_idx[CU_W-1:0];
      end
    end
  end

  // free buffer slot for a new request
  always_comb begin
    ins_ok = 1'b0;
    ins    = '0;
    for (int p = PEND_DEPTH - 1; p >= 0; p--)
      if (!pv_q[p]) begin
        ins_ok = 1'b1;
        ins    = P_W'(p);
      end
  end
  assign req_ready = ins_ok;

  logic do_disp;
  assign do_disp = pick_ok && cu_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv_q             <= '0;
      ptr_fast_q       <= CU_W'(NUM_CU - 1);
      ptr_slow_q       <= CU_W'(NUM_CU - 1);
      disp_valid       <= 1'b0;
      disp_wf          <= '0;
      disp_cu          <= '0;
      disp_fast_cu     <= 1'b0;
      disp_fallback    <= 1'b0;
      stat_fast_wf     <= '0;
      stat_crit_wf     <= '0;
      stat_fallback    <= '0;
      stat_wait_cycles <= '0;
      for (int p = 0; p < PEND_DEPTH; p++) begin
        pwf_q[p]  <= '0;
        pcls_q[p] <= WF_FAST;
        ppri_q[p] <= '0;
      end
      for (int c = 0; c < NUM_CU; c++) cu_occ[c] <= '0;
    end else begin
      disp_valid <= do_disp;
      if (req_valid && ins_ok) begin
        pv_q[ins]   <= 1'b1;
        pwf_q[ins]  <= req_wf;
        pcls_q[ins] <= req_class;
        ppri_q[ins] <= req_priority;
      end
      if (do_disp) begin
        pv_q[pick]    <= 1'b0;
        disp_wf       <= pwf_q[pick];
        disp_cu       <= cu_sel;
        disp_fast_cu  <= to_fast[pick];
        disp_fallback <= to_fast[pick] != (pcls_q[pick] == WF_FAST);
        if (to_fast[pick]) ptr_fast_q <= cu_sel;
        else               ptr_slow_q <= cu_sel;
        if (pcls_q[pick] == WF_FAST) stat_fast_wf <= stat_fast_wf + 1;
        else                         stat_crit_wf <= stat_crit_wf + 1;
        if (to_fast[pick] != (pcls_q[pick] == WF_FAST))
          stat_fallback <= stat_fallback + 1;
      end
      if (cfg_valid && |pv_q && !do_disp)
        stat_wait_cycles <= stat_wait_cycles + 1;
      for (int c = 0; c < NUM_CU; c++) begin
        if (do_disp && cu_sel == CU_W'(c) && !(done_valid && done_cu == CU_W'(c)))
          cu_occ[c] <= cu_occ[c] + 1'b1;
        else if (done_valid && done_cu == CU_W'(c) && !(do_disp && cu_sel == CU_W'(c))
                 && cu_occ[c] != '0)
          cu_occ[c] <= cu_occ[c] - 1'b1;
      end
    end
  end

  // A completion must name a CU that holds a wavefront.
  a_done_occupied: assert property (@(posedge clk) disable iff (!rst_n)
                                    done_valid |-> cu_occ[done_cu] != '0);

endmodule
