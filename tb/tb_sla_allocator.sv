// tb_sla_allocator: self-checking test of the wavefront-to-CU mapper.
// Eight CUs with Fmax ratios 1.00 .. 1.40 and two wavefront slots each. A
// reference model in the testbench (pending set, CU occupancy, round-robin
// pointers) predicts every dispatch: the waiting wavefront with the smallest
// priority whose class has a free CU, sent to the next free CU of its class
// (fast: ratio above the threshold; critical: at or below). Phase 1 uses the
// 80/20 threshold 1.20; phase 2 the 60/40 threshold 1.40, where no CU is fast
// and fast wavefronts must fall back to slow CUs. Priorities of waiting
// wavefronts are kept distinct so the expected choice is unique. Statistics
// counters are compared at the end, and each mechanism (fast dispatch,
// critical dispatch, fallback, waiting for a full class) must have occurred.
module tb_sla_allocator;
  import sla_pkg::*;

  localparam int NUM_CU = 8, SLOTS = 2, PEND = 4;
  localparam int CU_W = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_valid = 1'b0;
  ratio_t ratios [NUM_CU] = '{ratio_t'(100), ratio_t'(110), ratio_t'(120), ratio_t'(125),
                              ratio_t'(130), ratio_t'(115), ratio_t'(140), ratio_t'(121)};
  ratio_t threshold = ratio_t'(120);
  logic req_valid = 1'b0, req_ready;
  wf_id_t req_wf = '0;
  wf_class_t req_class = WF_FAST;
  pct_t req_priority = '0;
  logic disp_valid, disp_fast_cu, disp_fallback;
  wf_id_t disp_wf;
  logic [CU_W-1:0] disp_cu, done_cu = '0;
  logic done_valid = 1'b0;
  logic [NUM_CU-1:0] cu_is_fast;
  logic [$clog2(SLOTS+1)-1:0] cu_occ [NUM_CU];
  logic [31:0] st_fast, st_crit, st_fb, st_wait;
  int checks = 0, failures = 0;

  sla_allocator #(.NUM_CU(NUM_CU), .SLOTS_PER_CU(SLOTS), .PEND_DEPTH(PEND)) dut (
    .clk, .rst_n, .cfg_valid, .cu_ratio_x100 (ratios), .threshold_x100 (threshold),
    .req_valid, .req_ready, .req_wf, .req_class, .req_priority,
    .disp_valid, .disp_wf, .disp_cu, .disp_fast_cu, .disp_fallback,
    .done_valid, .done_cu, .cu_is_fast, .cu_occ,
    .stat_fast_wf (st_fast), .stat_crit_wf (st_crit), .stat_fallback (st_fb),
    .stat_wait_cycles (st_wait));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ reference
  typedef struct { int wf; bit crit; int pri; } pend_t;
  pend_t pend[$];
  int occ [NUM_CU];
  int ptr_f = NUM_CU - 1, ptr_s = NUM_CU - 1;
  bit exp_v = 0, exp_fast = 0, exp_fb = 0;
  int exp_wf, exp_cu;
  int m_fast = 0, m_crit = 0, m_fb = 0, m_wait = 0, n_disp = 0;

  function automatic bit is_fast_cu(int c);
    return int'(ratios[c]) > int'(threshold);
  endfunction

  always @(posedge clk) if (rst_n) begin
    int nf, best;
    bit any_f, any_s;
    // 1. the dispatch decided at the previous edge
    check(disp_valid == exp_v, $sformatf("disp_valid %0d exp %0d", disp_valid, exp_v));
    if (disp_valid && exp_v) begin
      n_disp++;
      check(int'(disp_wf) == exp_wf && int'(disp_cu) == exp_cu,
            $sformatf("dispatch wf %0d cu %0d exp wf %0d cu %0d", disp_wf, disp_cu, exp_wf, exp_cu));
      check(disp_fast_cu == exp_fast && disp_fallback == exp_fb, "dispatch class flags");
    end
    // 2. this edge's decision, from the state before the edge
    nf = 0; any_f = 0; any_s = 0;
    for (int c = 0; c < NUM_CU; c++) begin
      nf += is_fast_cu(c) ? 1 : 0;
      if (occ[c] < SLOTS) begin
        if (is_fast_cu(c)) any_f = 1; else any_s = 1;
      end
    end
    exp_v = 0; best = -1;
    if (cfg_valid)
      foreach (pend[i]) begin
        bit tf;
        tf = pend[i].crit ? (nf == NUM_CU) : (nf != 0);
        if ((tf ? any_f : any_s) && (best < 0 || pend[i].pri < pend[best].pri)) best = i;
      end
    if (best >= 0) begin
      bit tf;
      int p;
      tf = pend[best].crit ? (nf == NUM_CU) : (nf != 0);
      p = tf ? ptr_f : ptr_s;
      for (int i = 1; i <= NUM_CU; i++) begin
        int j;
        j = (p + i) % NUM_CU;
        if (!exp_v && occ[j] < SLOTS && is_fast_cu(j) == tf) begin
          exp_v = 1; exp_cu = j;
        end
      end
      exp_wf = pend[best].wf; exp_fast = tf; exp_fb = (tf == pend[best].crit);
      if (tf) ptr_f = exp_cu; else ptr_s = exp_cu;
      occ[exp_cu]++;
      if (pend[best].crit) m_crit++; else m_fast++;
      if (exp_fb) m_fb++;
      pend.delete(best);
    end
    if (cfg_valid && pend.size() > 0 && !exp_v) m_wait++;
    // 3. completions and new requests
    if (done_valid) occ[done_cu]--;
    check(req_ready == (pend.size() + (exp_v ? 1 : 0) < PEND), "req_ready");
    if (req_valid && req_ready)
      pend.push_back('{wf: int'(req_wf), crit: req_class == WF_CRITICAL, pri: int'(req_priority)});
    for (int c = 0; c < NUM_CU; c++)
      check(int'(cu_occ[c]) == occ[c] - ((exp_v && c == exp_cu) ? 1 : 0) + ((done_valid && int'(done_cu) == c) ? 1 : 0),
            $sformatf("occupancy CU%0d", c));
  end

  // ------------------------------------------------------------ stimulus
  function automatic bit pri_used(int p);
    foreach (pend[i]) if (pend[i].pri == p) return 1;
    return 0;
  endfunction

  task automatic traffic(int cycles, int p_req, int p_done);
    for (int k = 0; k < cycles; k++) begin
      @(negedge clk);
      req_valid = ($urandom_range(99) < p_req);
      req_wf    = wf_id_t'($urandom);
      req_class = ($urandom_range(99) < 30) ? WF_CRITICAL : WF_FAST;
      begin
        int p;
        p = int'($urandom_range(100));
        while (pri_used(p)) p = (p + 1) % 101;
        req_priority = pct_t'(p);
      end
      done_valid = 1'b0;
      if ($urandom_range(99) < p_done) begin
        int c;
        c = int'($urandom_range(NUM_CU - 1));
        for (int i = 0; i < NUM_CU && occ[c] == 0; i++) c = (c + 1) % NUM_CU;
        if (occ[c] > 0) begin done_valid = 1'b1; done_cu = CU_W'(c); end
      end
    end
    @(negedge clk);
    req_valid = 1'b0;
    done_valid = 1'b0;
  endtask

  task automatic drain();
    for (int k = 0; k < 200 && (pend.size() > 0 || exp_v); k++) begin
      @(negedge clk);
      done_valid = 1'b0;
      for (int c = 0; c < NUM_CU; c++)
        if (!done_valid && occ[c] > 0) begin done_valid = 1'b1; done_cu = CU_W'(c); end
    end
    @(negedge clk);
    done_valid = 1'b0;
    while (1) begin
      int c;
      c = -1;
      for (int i = 0; i < NUM_CU; i++) if (c < 0 && occ[i] > 0) c = i;
      if (c < 0) break;
      done_valid = 1'b1; done_cu = CU_W'(c);
      @(negedge clk);
      done_valid = 1'b0;
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NUM_CU; c++) occ[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // requests queue up before configuration: nothing may go out
    @(negedge clk);
    traffic(3, 100, 0);
    // phase 1: threshold 1.20, CUs 3,4,6,7 fast
    cfg_valid = 1'b1;
    @(negedge clk);
    check(cu_is_fast == 8'b1101_1000, $sformatf("CU classes %b", cu_is_fast));
    traffic(400, 70, 25);   // heavy load: classes fill up, wavefronts wait
    traffic(400, 30, 60);
    drain();
    // phase 2: threshold 1.40, no CU is fast (1.40 is not above 1.40)
    cfg_valid = 1'b0;
    threshold = ratio_t'(140);
    @(negedge clk);
    cfg_valid = 1'b1;
    @(negedge clk);
    check(cu_is_fast == '0, "no fast CU at 1.40");
    traffic(300, 50, 50);
    drain();
    check(int'(st_fast) == m_fast && int'(st_crit) == m_crit && int'(st_fb) == m_fb && int'(st_wait) == m_wait,
          $sformatf("stats %0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d", st_fast, st_crit, st_fb, st_wait,
                    m_fast, m_crit, m_fb, m_wait));
    check(m_fast > 0, "fast wavefronts dispatched");
    check(m_crit > 0, "critical wavefronts dispatched");
    check(m_fb > 0, "fallback happened");
    check(m_wait > 0, "wavefronts waited for a full class");
    $display("dispatches %0d fast %0d critical %0d fallback %0d wait cycles %0d",
             n_disp, m_fast, m_crit, m_fb, m_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
