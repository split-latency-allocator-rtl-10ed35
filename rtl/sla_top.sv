// sla_top: Split Latency Allocator subsystem of a near-threshold GPU.
//
// At near-threshold voltage, process variation makes some register-file
// entries slow and makes compute units (CUs) differ in maximum frequency by up
// to about 40%. This subsystem turns both effects into a scheduling decision:
//
//  1. Access latency categorization. The BIST writes one port-speed bit per
//     register entry into ps_table. Instructions entering issue_queue pick up
//     the bits of their two operands; the queue reports them to
//     wf_categorizer, which marks a wavefront critical once it reads a slow
//     entry and gives it a priority counter. latency_ratio_unit turns the
//     slow-entry count into the slow percentage and the fast-CU threshold
//     1 + slow fraction.
//  2. Individual CU clocks. cu_fmax_unit takes every SIMD's maximum
//     frequency, sets each CU's Fmax to its slowest SIMD and expresses it as a
//     ratio to the slowest CU; one cu_clock_gen per CU turns the ratio into a
//     clock enable on the shared reference clock (clk).
//  3. Mapping. A wavefront offered on wf_req_* is looked up in the
//     categorizer and handed to sla_allocator, which sends fast wavefronts to
//     CUs above the threshold and critical ones to the slower CUs.
//
// Instructions leave the issue queue into vgpr_rf, a timing model of the
// register file that answers in 8 cycles for fast rows and 16 for slow rows;
// rf_done/iss_* show the issued instruction and its operands.
//
// Interface groups: BIST writes (bist_*), per-SIMD Fmax and cfg_start
// (configuration; cfg_valid once both units have finished), timeline_start
// (clears the wavefront categorization), instruction push (inst_*), register
// file writes (rf_w*), wavefront requests (wf_req_*), dispatch (disp_*) and
// completions (done_*) of the CU array, and one clock enable per CU.
// The CU pipelines, the BIST and the memory system are outside this module.
// The three stages follow the architecture; one issue queue and register file
// standing for the register file being categorized, and the use of clk as the
// CU clock reference, are this design's choices.
module sla_top
  import sla_pkg::*;
#(
  parameter int NUM_CU       = 128,
  parameter int NUM_SIMD     = 4,
  parameter int NUM_VGPR     = 256,
  parameter int NUM_WF       = 256,
  parameter int IQ_DEPTH     = 16,
  parameter int PEND_DEPTH   = 16,
  parameter int SLOTS_PER_CU = 40,
  parameter int unsigned REF_X100 = 200,
  parameter int LANES        = 64,
  parameter int DATA_W       = 32,
  localparam int N_ENT  = NUM_SIMD * NUM_VGPR,
  localparam int CNT_W  = $clog2(N_ENT + 1),
  localparam int CU_W   = (NUM_CU > 1) ? $clog2(NUM_CU) : 1,
  localparam int ROW_W  = LANES * DATA_W,
  localparam int NC_W   = $clog2(NUM_WF + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // BIST results
  input  logic              bist_we,
  input  reg_addr_t         bist_addr,
  input  logic              bist_slow,
  // configuration
  input  fmax_t             simd_fmax [NUM_CU][NUM_SIMD],
  input  logic              cfg_start,
  output logic              cfg_valid,
  output pct_t              slow_pct,
  output ratio_t            threshold_x100,
  output ratio_t            cu_ratio_x100 [NUM_CU],
  output logic [NUM_CU-1:0] cu_is_fast,
  output logic [CNT_W-1:0]  slow_count,
  // timeline
  input  logic              timeline_start,
  output logic [NC_W-1:0]   num_critical,
  // instructions into the issue queue
  input  logic              inst_valid,
  output logic              inst_ready,
  input  wf_id_t            inst_wf,
  input  opcode_t           inst_op,
  input  reg_addr_t         inst_rfa,
  input  reg_addr_t         inst_rfb,
  // register file contents
  input  logic              rf_we,
  input  reg_addr_t         rf_waddr,
  input  logic [ROW_W-1:0]  rf_wdata,
  // issued instruction with its operands
  output logic              rf_done,
  output iq_entry_t         iss_entry,
  output logic [ROW_W-1:0]  iss_data_a,
  output logic [ROW_W-1:0]  iss_data_b,
  // wavefronts to place
  input  logic              wf_req_valid,
  output logic              wf_req_ready,
  input  wf_id_t            wf_req_id,
  // dispatch to and completion from the CU array
  output logic              disp_valid,
  output wf_id_t            disp_wf,
  output logic [CU_W-1:0]   disp_cu,
  output logic              disp_fast_cu,
  output logic              disp_fallback,
  input  logic              done_valid,
  input  logic [CU_W-1:0]   done_cu,
  // individual CU clocks
  output logic [NUM_CU-1:0] cu_clk_en,
  // statistics
  output logic [31:0]       stat_fast_wf,
  output logic [31:0]       stat_crit_wf,
  output logic [31:0]       stat_fallback,
  output logic [31:0]       stat_wait_cycles
);

  // ---------------------------------------------------------------- stage 1
  reg_addr_t  lk_a, lk_b;
  logic       lk_ps_a, lk_ps_b;
  logic       cat_valid;
  wf_id_t     cat_wf;
  logic [1:0] cat_ps;
  logic       iq_pop_valid, iq_pop_ready;
  iq_entry_t  iq_head;
  logic       lr_busy, lr_valid;
  pct_t       fast_pct;

  ps_table #(.NUM_SIMD(NUM_SIMD), .NUM_VGPR(NUM_VGPR)) u_ps (
    .clk, .rst_n,
    .bist_we, .bist_addr, .bist_slow,
    .rd_addr_a (lk_a), .rd_addr_b (lk_b),
    .ps_a (lk_ps_a), .ps_b (lk_ps_b),
    .slow_count
  );

  issue_queue #(.DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .push_valid (inst_valid), .push_ready (inst_ready),
    .push_wf (inst_wf), .push_op (inst_op), .push_rfa (inst_rfa), .push_rfb (inst_rfb),
    .lk_addr_a (lk_a), .lk_addr_b (lk_b), .lk_ps_a, .lk_ps_b,
    .pop_valid (iq_pop_valid), .pop_ready (iq_pop_ready), .head (iq_head),
    .count (),
    .cat_valid, .cat_wf, .cat_ps
  );

  latency_ratio_unit #(.NUM_ENTRIES(N_ENT)) u_lr (
    .clk, .rst_n,
    .start (cfg_start), .slow_count,
    .busy (lr_busy), .valid (lr_valid),
    .slow_pct, .fast_pct, .threshold_x100
  );

  wf_class_t q_class;
  pct_t      q_priority;

  wf_categorizer #(.NUM_WF(NUM_WF)) u_cat (
    .clk, .rst_n,
    .timeline_start,
    .cat_valid, .cat_wf, .cat_ps,
    .slow_pct,
    .q_wf (wf_req_id), .q_class, .q_priority, .q_slow_hits (),
    .num_critical
  );

  // register file read of each issued instruction
  logic rf_rd_ready;
  iq_entry_t iss_q;

  assign iq_pop_ready = rf_rd_ready;

  vgpr_rf #(.NUM_ENTRIES(N_ENT), .LANES(LANES), .DATA_W(DATA_W)) u_rf (
    .clk, .rst_n,
    .wr_en (rf_we), .wr_addr (rf_waddr), .wr_data (rf_wdata),
    .rd_valid (iq_pop_valid), .rd_ready (rf_rd_ready),
    .rd_addr_a (iq_head.rfa), .rd_addr_b (iq_head.rfb), .rd_ps (iq_head.ps),
    .rd_done (rf_done), .rd_data_a (iss_data_a), .rd_data_b (iss_data_b)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            iss_q <= '0;
    else if (iq_pop_valid && rf_rd_ready)  iss_q <= iq_head;
  end
  assign iss_entry = iss_q;

  // ---------------------------------------------------------------- stage 2
  logic fm_busy, fm_valid;

  cu_fmax_unit #(.NUM_CU(NUM_CU), .NUM_SIMD(NUM_SIMD)) u_fm (
    .clk, .rst_n,
    .start (cfg_start), .simd_fmax,
    .busy (fm_busy), .valid (fm_valid),
    .cu_fmax (), .ratio_x100 (cu_ratio_x100)
  );

  assign cfg_valid = lr_valid && fm_valid && !lr_busy && !fm_busy;

  for (genvar c = 0; c < NUM_CU; c++) begin : g_clk
    cu_clock_gen #(.REF_X100(REF_X100)) u_clk (
      .clk_ref (clk), .rst_n,
      .en (fm_valid), .ratio_x100 (cu_ratio_x100[c]),
      .cu_clk_en (cu_clk_en[c])
    );
  end

  // ---------------------------------------------------------------- stage 3
  logic [$clog2(SLOTS_PER_CU+1)-1:0] cu_occ [NUM_CU];

  sla_allocator #(.NUM_CU(NUM_CU), .SLOTS_PER_CU(SLOTS_PER_CU),
                  .PEND_DEPTH(PEND_DEPTH)) u_alloc (
    .clk, .rst_n,
    .cfg_valid, .cu_ratio_x100, .threshold_x100,
    .req_valid (wf_req_valid), .req_ready (wf_req_ready),
    .req_wf (wf_req_id), .req_class (q_class), .req_priority (q_priority),
    .disp_valid, .disp_wf, .disp_cu, .disp_fast_cu, .disp_fallback,
    .done_valid, .done_cu,
    .cu_is_fast, .cu_occ,
    .stat_fast_wf, .stat_crit_wf, .stat_fallback, .stat_wait_cycles
  );

endmodule
