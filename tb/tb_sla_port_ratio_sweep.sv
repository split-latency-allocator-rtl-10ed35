// tb_sla_port_ratio_sweep: runs the allocator at its default size under the
// four fast/slow register-entry splits 80/20, 75/25, 70/30 and 60/40.
//
// For each split the BIST marks the matching number of the 1024 entries slow
// (spread evenly), the CUs get Fmax ratios spread over 1.00 .. 1.40, and a
// timeline of 96 wavefronts issues three instructions each with random
// operands. The test checks the threshold 1 + slow fraction, that exactly the
// wavefronts which read a slow entry are critical, that every wavefront lands
// on a CU of the right class (fallback only when no CU is above the
// threshold), and prints per split how many CUs are fast, how many
// wavefronts are critical and where they went.
module tb_sla_port_ratio_sweep;
  import sla_pkg::*;

  localparam int NUM_CU = 128, NUM_SIMD = 4, N_ENT = 1024, NWF = 96;
  localparam int CU_W = 7, ROW = 64 * 32;

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
  logic rf_done;
  iq_entry_t iss_entry;
  logic [ROW-1:0] iss_data_a, iss_data_b;
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
    .rf_we (1'b0), .rf_waddr ('0), .rf_wdata ('0),
    .rf_done, .iss_entry, .iss_data_a, .iss_data_b,
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

  bit slow_ent [N_ENT];
  bit crit_ref [256];
  int ratio_of [NUM_CU];
  int thr;
  int n_to_fast, n_to_slow, n_fb, n_disp, issued;

  always @(posedge clk) if (rst_n) begin
    if (rf_done) issued++;
    if (disp_valid) begin
      n_disp++;
      if (disp_fallback) begin
        n_fb++;
        check(!crit_ref[disp_wf], "only fast wavefronts fall back");
        check(ratio_of[disp_cu] <= thr, "fallback goes to a CU at or below the threshold");
      end else begin
        check((ratio_of[disp_cu] > thr) == !crit_ref[disp_wf],
              $sformatf("wf %0d (critical %0d) on CU %0d ratio %0d, threshold %0d",
                        disp_wf, crit_ref[disp_wf], disp_cu, ratio_of[disp_cu], thr));
      end
      if (ratio_of[disp_cu] > thr) n_to_fast++; else n_to_slow++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int splits [4] = '{20, 25, 30, 40};
    for (int c = 0; c < NUM_CU; c++) begin
      ratio_of[c] = (c == 0) ? 100 : 100 + (c * 29) % 41;
      for (int s = 0; s < NUM_SIMD; s++)
        simd_fmax[c][s] = fmax_t'(ratio_of[c] * 10 + ((s == c % NUM_SIMD) ? 0 : 3));
    end
    for (int e = 0; e < N_ENT; e++) slow_ent[e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (splits[k]) begin
      int nslow, nfast_cu, ncrit, cyc;
      nslow = (N_ENT * splits[k] + 50) / 100;
      // BIST: entry e is slow when it falls in the first nslow of an even spread
      for (int e = 0; e < N_ENT; e++) begin
        bit s;
        s = ((e * nslow) % N_ENT) < nslow;
        if (s != slow_ent[e]) begin
          @(negedge clk);
          bist_we = 1'b1; bist_addr = reg_addr_t'(e); bist_slow = s;
          slow_ent[e] = s;
          @(negedge clk);
          bist_we = 1'b0;
        end
      end
      @(negedge clk);
      cfg_start = 1'b1;
      @(negedge clk);
      cfg_start = 1'b0;
      cyc = 0;
      while (!cfg_valid && cyc < 20000) begin @(negedge clk); cyc++; end
      thr = 100 + splits[k];
      check(int'(slow_count) == nslow, $sformatf("slow entries %0d exp %0d", slow_count, nslow));
      check(int'(slow_pct) == splits[k] && int'(threshold_x100) == thr,
            $sformatf("split %0d: pct %0d threshold %0d", splits[k], slow_pct, threshold_x100));
      nfast_cu = 0;
      for (int c = 0; c < NUM_CU; c++) begin
        check(int'(cu_ratio_x100[c]) == ratio_of[c], $sformatf("CU %0d ratio", c));
        check(cu_is_fast[c] == (ratio_of[c] > thr), $sformatf("CU %0d class", c));
        nfast_cu += (ratio_of[c] > thr) ? 1 : 0;
      end
      // one timeline of instructions
      @(negedge clk);
      timeline_start = 1'b1;
      @(negedge clk);
      timeline_start = 1'b0;
      for (int w = 0; w < 256; w++) crit_ref[w] = 0;
      issued = 0;
      for (int w = 0; w < NWF; w++)
        for (int i = 0; i < 3; i++) begin
          int a, b;
          a = int'($urandom_range(N_ENT - 1));
          b = int'($urandom_range(N_ENT - 1));
          // about one wavefront in three reads only fast entries
          if (w % 3 == 0) begin
            while (slow_ent[a]) a = (a + 1) % N_ENT;
            while (slow_ent[b]) b = (b + 1) % N_ENT;
          end
          @(negedge clk);
          inst_valid = 1'b1; inst_wf = wf_id_t'(w); inst_op = opcode_t'(i);
          inst_rfa = reg_addr_t'(a); inst_rfb = reg_addr_t'(b);
          @(posedge clk);
          while (!inst_ready) @(posedge clk);
          if (slow_ent[a] || slow_ent[b]) crit_ref[w] = 1;
          @(negedge clk);
          inst_valid = 1'b0;
        end
      cyc = 0;
      while (issued < 3 * NWF && cyc < 20000) begin @(negedge clk); cyc++; end
      check(issued == 3 * NWF, "all instructions issued");
      ncrit = 0;
      for (int w = 0; w < NWF; w++) ncrit += crit_ref[w];
      check(int'(num_critical) == ncrit, $sformatf("critical wavefronts %0d exp %0d", num_critical, ncrit));
      // map the timeline's wavefronts
      n_to_fast = 0; n_to_slow = 0; n_fb = 0; n_disp = 0;
      for (int w = 0; w < NWF; w++) begin
        @(negedge clk);
        wf_req_valid = 1'b1; wf_req_id = wf_id_t'(w);
        @(posedge clk);
        while (!wf_req_ready) @(posedge clk);
        @(negedge clk);
        wf_req_valid = 1'b0;
      end
      cyc = 0;
      while (n_disp < NWF && cyc < 1000) begin @(negedge clk); cyc++; end
      check(n_disp == NWF, "all wavefronts mapped");
      check(nfast_cu == 0 ? n_fb == NWF - ncrit : n_fb == 0, "fallback exactly when no CU is fast");
      $display("split %0d/%0d: threshold %0d, fast CUs %0d of %0d, critical wavefronts %0d of %0d, to fast CUs %0d, to slow CUs %0d, fallbacks %0d",
               100 - splits[k], splits[k], thr, nfast_cu, NUM_CU, ncrit, NWF, n_to_fast, n_to_slow, n_fb);
      // complete them all
      for (int c = 0; c < NUM_CU; c++) begin
        while (dut.u_alloc.cu_occ[c] != 0) begin
          @(negedge clk);
          done_valid = 1'b1; done_cu = CU_W'(c);
          @(negedge clk);
          done_valid = 1'b0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
