// tb_sla_top: end-to-end test of the Split Latency Allocator at its default
// size (128 CUs, 4 SIMDs x 256 registers, 256 wavefronts).
//
//  1. The BIST marks 205 of 1024 register entries slow (an 80/20 split) and
//     every CU gets an Fmax ratio between 1.00 and 1.40 through the slowest
//     of its four SIMDs. After configuration the slow percentage must be 20,
//     the threshold 1.20 and every CU ratio and class as computed here.
//  2. Two single instructions measure the issue path: push to register-file
//     result takes 1 + 8 cycles for fast operands and 1 + 16 for slow ones.
//  3. A burst of instructions from 64 wavefronts fills the issue queue
//     (back-pressure); each result must come back in order with the right
//     operands and port-speed bits, and the categorizer must mark exactly the
//     wavefronts that touched a slow entry as critical.
//  4. Wavefronts are offered for mapping: critical ones must land on CUs at
//     or below 1.20, fast ones above. Without completions the slow CUs fill
//     up and wavefronts wait until a slow CU completes one.
//  5. The CU clock enables are counted over a window and compared with each
//     CU's ratio.
//  6. The BIST raises the split to 60/40: the threshold becomes 1.40, no CU
//     is above it and fast wavefronts fall back to the remaining CUs.
//  7. A timeline start clears the categorization.
// Each of these mechanisms is counted and must happen at least once.
module tb_sla_top;
  import sla_pkg::*;

  localparam int NUM_CU = 128, NUM_SIMD = 4, NUM_VGPR = 256, N_ENT = 1024;
  localparam int SLOTS = 40, ROW = 64 * 32;
  localparam int CU_W = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bist_we = 1'b0, bist_slow = 1'b0;
  reg_addr_t bist_addr = '0;
  fmax_t simd_fmax [NUM_CU][NUM_SIMD];
  logic cfg_start = 1'b0, cfg_valid;
  pct_t slow_pct;
  ratio_t threshold_x100;
  ratio_t cu_ratio_x100 [NUM_CU];
  logic [NUM_CU-1:0] cu_is_fast;
  logic [10:0] slow_count;
  logic timeline_start = 1'b0;
  logic [8:0] num_critical;
  logic inst_valid = 1'b0, inst_ready;
  wf_id_t inst_wf = '0;
  opcode_t inst_op = '0;
  reg_addr_t inst_rfa = '0, inst_rfb = '0;
  logic rf_we = 1'b0;
  reg_addr_t rf_waddr = '0;
  logic [ROW-1:0] rf_wdata = '0, iss_data_a, iss_data_b;
  logic rf_done;
  iq_entry_t iss_entry;
  logic wf_req_valid = 1'b0, wf_req_ready;
  wf_id_t wf_req_id = '0;
  logic disp_valid, disp_fast_cu, disp_fallback;
  wf_id_t disp_wf;
  logic [CU_W-1:0] disp_cu, done_cu = '0;
  logic done_valid = 1'b0;
  logic [NUM_CU-1:0] cu_clk_en;
  logic [31:0] st_fast, st_crit, st_fb, st_wait;

  sla_top dut (
    .clk, .rst_n, .bist_we, .bist_addr, .bist_slow,
    .simd_fmax, .cfg_start, .cfg_valid, .slow_pct, .threshold_x100, .cu_ratio_x100,
    .cu_is_fast, .slow_count, .timeline_start, .num_critical,
    .inst_valid, .inst_ready, .inst_wf, .inst_op, .inst_rfa, .inst_rfb,
    .rf_we, .rf_waddr, .rf_wdata, .rf_done, .iss_entry, .iss_data_a, .iss_data_b,
    .wf_req_valid, .wf_req_ready, .wf_req_id,
    .disp_valid, .disp_wf, .disp_cu, .disp_fast_cu, .disp_fallback,
    .done_valid, .done_cu, .cu_clk_en,
    .stat_fast_wf (st_fast), .stat_crit_wf (st_crit), .stat_fallback (st_fb),
    .stat_wait_cycles (st_wait));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ models
  bit slow_ent [N_ENT];
  int ratio_of [NUM_CU];
  logic [ROW-1:0] rf_ref [N_ENT];
  bit crit_ref [256];
  iq_entry_t exp_iss[$];
  int occ [NUM_CU];
  int thr;

  // mechanism counters
  int n_fast_read = 0, n_slow_read = 0, n_iq_full = 0, n_crit_disp = 0, n_fast_disp = 0;
  int n_fb = 0, n_wait = 0, n_clk_ok = 0, n_timeline_clear = 0;

  function automatic int ent(reg_addr_t a);
    return int'(a);
  endfunction

  // results leaving the register file, in issue order
  always @(posedge clk) if (rst_n) begin
    if (rf_done) begin
      check(exp_iss.size() > 0, "unexpected register file result");
      if (exp_iss.size() > 0) begin
        iq_entry_t e;
        e = exp_iss.pop_front();
        check(iss_entry == e, $sformatf("issued entry %h exp %h", iss_entry, e));
        check(iss_data_a == rf_ref[ent(e.rfa)] && iss_data_b == rf_ref[ent(e.rfb)],
              $sformatf("operand data wf %0d", e.wf));
        if (|e.ps) n_slow_read++; else n_fast_read++;
      end
    end
    if (inst_valid && !inst_ready) n_iq_full++;
  end

  // dispatches
  always @(posedge clk) if (rst_n && disp_valid) begin
    bit crit;
    crit = crit_ref[disp_wf];
    check(disp_fallback == 1'b0 || thr >= 140, "fallback only without fast CUs");
    if (disp_fallback) begin
      n_fb++;
      check(!crit && ratio_of[disp_cu] <= thr, "fallback sends a fast wavefront to a slow CU");
    end else if (crit) begin
      n_crit_disp++;
      check(ratio_of[disp_cu] <= thr, $sformatf("critical wf %0d on CU %0d ratio %0d", disp_wf, disp_cu, ratio_of[disp_cu]));
    end else begin
      n_fast_disp++;
      check(ratio_of[disp_cu] > thr, $sformatf("fast wf %0d on CU %0d ratio %0d", disp_wf, disp_cu, ratio_of[disp_cu]));
    end
    occ[disp_cu]++;
    check(occ[disp_cu] <= SLOTS, "CU slot limit");
  end

  // ------------------------------------------------------------ helpers
  task automatic bist_write(int e, bit s);
    @(negedge clk);
    bist_we = 1'b1; bist_addr = reg_addr_t'(e); bist_slow = s;
    slow_ent[e] = s;
    @(negedge clk);
    bist_we = 1'b0;
  endtask

  task automatic configure();
    int cyc;
    @(negedge clk);
    cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    cyc = 0;
    while (!cfg_valid && cyc < 20000) begin @(negedge clk); cyc++; end
    check(cfg_valid, "configuration finished");
  endtask

  task automatic push_inst(int wf, int a, int b);
    @(negedge clk);
    inst_valid = 1'b1; inst_wf = wf_id_t'(wf); inst_op = opcode_t'($urandom);
    inst_rfa = reg_addr_t'(a); inst_rfb = reg_addr_t'(b);
    @(posedge clk);
    while (!inst_ready) @(posedge clk);
    exp_iss.push_back('{wf: inst_wf, op_code: inst_op, rfa: inst_rfa,
                        ps: {slow_ent[a], slow_ent[b]}, rfb: inst_rfb});
    if (slow_ent[a] || slow_ent[b]) crit_ref[wf] = 1;
    @(negedge clk);
    inst_valid = 1'b0;
  endtask

  task automatic request_wf(int wf);
    @(negedge clk);
    wf_req_valid = 1'b1; wf_req_id = wf_id_t'(wf);
    @(posedge clk);
    // while the allocator is full, complete one wavefront on a slow CU per cycle
    while (!wf_req_ready) begin
      @(negedge clk);
      done_valid = 1'b0;
      for (int c = 0; c < NUM_CU; c++)
        if (!done_valid && occ[c] > 0 && ratio_of[c] <= thr) begin
          done_valid = 1'b1; done_cu = CU_W'(c); occ[c]--;
        end
      @(posedge clk);
    end
    @(negedge clk);
    wf_req_valid = 1'b0;
    done_valid = 1'b0;
  endtask

  task automatic complete_all();
    for (int c = 0; c < NUM_CU; c++)
      while (occ[c] > 0) begin
        @(negedge clk);
        done_valid = 1'b1; done_cu = CU_W'(c);
        occ[c]--;
        @(negedge clk);
        done_valid = 1'b0;
      end
  endtask

  task automatic measure_single(int a, int b, int exp_lat);
    int cyc;
    @(negedge clk);
    inst_valid = 1'b1; inst_wf = wf_id_t'(255); inst_op = '0;
    inst_rfa = reg_addr_t'(a); inst_rfb = reg_addr_t'(b);
    exp_iss.push_back('{wf: inst_wf, op_code: inst_op, rfa: inst_rfa,
                        ps: {slow_ent[a], slow_ent[b]}, rfb: inst_rfb});
    @(negedge clk);
    inst_valid = 1'b0;
    cyc = 1;
    while (!rf_done && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc == exp_lat, $sformatf("push to result %0d cycles, exp %0d", cyc, exp_lat));
    @(negedge clk);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ test
  initial begin
    for (int e = 0; e < N_ENT; e++) begin slow_ent[e] = 0; rf_ref[e] = '0; end
    for (int w = 0; w < 256; w++) crit_ref[w] = 0;
    for (int c = 0; c < NUM_CU; c++) occ[c] = 0;
    // CU ratios 1.00 .. 1.40; CU 0 is the slowest
    for (int c = 0; c < NUM_CU; c++) begin
      int slow_s;
      ratio_of[c] = (c == 0) ? 100 : 100 + (c * 37) % 41;
      slow_s = c % NUM_SIMD;
      for (int s = 0; s < NUM_SIMD; s++)
        simd_fmax[c][s] = fmax_t'(ratio_of[c] * 25 / 10 * 10 + ((s == slow_s) ? 0 : 5 + s));
    end
    // the ratios the unit must produce from those frequencies
    for (int c = 0; c < NUM_CU; c++) begin
      int f, fmin;
      f = ratio_of[c] * 25 / 10 * 10;
      fmin = 2500;
      ratio_of[c] = (f * 100 + fmin / 2) / fmin;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. 80/20 split: every fifth entry is slow
    for (int e = 0; e < N_ENT; e += 5) bist_write(e, 1);
    for (int e = 0; e < 64; e++) begin
      @(negedge clk);
      rf_we = 1'b1; rf_waddr = reg_addr_t'(e * 16 + 3);
      rf_wdata = {64{$urandom}};
      rf_ref[e * 16 + 3] = rf_wdata;
    end
    @(negedge clk);
    rf_we = 1'b0;
    configure();
    thr = 120;
    check(slow_count == 205, $sformatf("slow entries %0d", slow_count));
    check(slow_pct == 20 && threshold_x100 == 120, $sformatf("pct %0d threshold %0d", slow_pct, threshold_x100));
    for (int c = 0; c < NUM_CU; c++) begin
      check(int'(cu_ratio_x100[c]) == ratio_of[c], $sformatf("CU %0d ratio %0d exp %0d", c, cu_ratio_x100[c], ratio_of[c]));
      check(cu_is_fast[c] == (ratio_of[c] > 120), $sformatf("CU %0d class", c));
    end

    // 2. isolated reads: 1 cycle in the queue, then 8 or 16 in the register file
    measure_single(3, 19, 9);
    measure_single(35, 3, 17);

    // 3. a burst of instructions from 64 wavefronts
    @(negedge clk);
    timeline_start = 1'b1;
    @(negedge clk);
    timeline_start = 1'b0;
    for (int w = 0; w < 256; w++) crit_ref[w] = 0;
    for (int w = 0; w < 64; w++)
      for (int i = 0; i < 3; i++) begin
        int a, b;
        // a quarter of the wavefronts read only fast entries
        a = int'($urandom_range(63)) * 16 + 3;
        b = int'($urandom_range(63)) * 16 + 3;
        if (w % 4 == 0) begin
          while (slow_ent[a]) a = (a + 16) % N_ENT;
          while (slow_ent[b]) b = (b + 16) % N_ENT;
        end
        push_inst(w, a, b);
      end
    begin
      int cyc, nc;
      cyc = 0;
      while (exp_iss.size() > 0 && cyc < 10000) begin @(negedge clk); cyc++; end
      check(exp_iss.size() == 0, "all instructions issued");
      nc = 0;
      for (int w = 0; w < 256; w++) nc += crit_ref[w];
      check(int'(num_critical) == nc, $sformatf("critical wavefronts %0d exp %0d", num_critical, nc));
    end

    // 4. map wavefronts; slow CUs fill up without completions
    for (int r = 0; r < 90; r++)
      for (int w = 0; w < 64; w++) request_wf(w);
    repeat (20) @(negedge clk);
    n_wait = int'(st_wait);
    check(n_wait > 0, "wavefronts waited for a free slow CU");
    complete_all();
    repeat (20) @(negedge clk);
    complete_all();
    check(int'(st_crit) == n_crit_disp && int'(st_fast) == n_fast_disp, "dispatch statistics");

    // 5. CU clock enables over 2000 reference cycles
    begin
      int cnt [NUM_CU];
      for (int c = 0; c < NUM_CU; c++) cnt[c] = 0;
      for (int k = 0; k < 2000; k++) begin
        @(negedge clk);
        for (int c = 0; c < NUM_CU; c++) cnt[c] += int'(cu_clk_en[c]);
      end
      for (int c = 0; c < NUM_CU; c++) begin
        int e;
        e = 2000 * ratio_of[c] / 200;
        check(cnt[c] >= e - 1 && cnt[c] <= e + 1, $sformatf("CU %0d clock %0d exp %0d", c, cnt[c], e));
        if (cnt[c] >= e - 1 && cnt[c] <= e + 1) n_clk_ok++;
      end
    end

    // 6. 60/40 split: threshold 1.40, no CU above it
    for (int e = 1; e < N_ENT; e += 5) bist_write(e, 1);
    configure();
    thr = 140;
    check(slow_count == 410 && slow_pct == 40 && threshold_x100 == 140,
          $sformatf("60/40: %0d slow, %0d%%, threshold %0d", slow_count, slow_pct, threshold_x100));
    check(cu_is_fast == '0, "no fast CU at 1.40");
    for (int w = 0; w < 64; w++) request_wf(w);
    repeat (20) @(negedge clk);
    complete_all();
    check(int'(st_fb) == n_fb, "fallback statistics");

    // 7. a new timeline clears the categorization
    @(negedge clk);
    timeline_start = 1'b1;
    @(negedge clk);
    timeline_start = 1'b0;
    if (num_critical == 0) n_timeline_clear++;
    check(num_critical == 0, "timeline start clears critical wavefronts");

    $display("fast reads %0d, slow reads %0d, issue queue full %0d, fast dispatches %0d, critical dispatches %0d",
             n_fast_read, n_slow_read, n_iq_full, n_fast_disp, n_crit_disp);
    $display("wait cycles %0d, fallbacks %0d, CU clocks in range %0d, timeline clears %0d",
             n_wait, n_fb, n_clk_ok, n_timeline_clear);
    check(n_fast_read > 0, "fast register reads happened");
    check(n_slow_read > 0, "slow register reads happened");
    check(n_iq_full > 0, "issue queue back-pressure happened");
    check(n_fast_disp > 0, "fast wavefronts mapped to fast CUs");
    check(n_crit_disp > 0, "critical wavefronts mapped to slow CUs");
    check(n_wait > 0, "waiting for a free CU happened");
    check(n_fb > 0, "fallback happened");
    check(n_clk_ok == NUM_CU, "all CU clocks at their ratio");
    check(n_timeline_clear > 0, "timeline clear happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
