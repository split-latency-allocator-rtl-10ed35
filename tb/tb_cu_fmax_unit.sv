// tb_cu_fmax_unit: self-checking test of the per-CU Fmax ratios.
// First run: 26 CUs whose Fmax ratios are those of a published example
// (CU1 1.07 ... CU18 1.00 ... CU24 1.40). Each CU gets one SIMD at
// 1000 x ratio and three faster SIMDs, so the ratio must come from the
// slowest SIMD and be relative to the slowest CU. Further runs use random
// frequencies, checked against round(100 * fmax / min_fmax) computed in the
// testbench, and the time to finish is bounded.
module tb_cu_fmax_unit;
  import sla_pkg::*;

  localparam int NUM_CU = 26;
  localparam int NUM_SIMD = 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fmax_t simd_fmax [NUM_CU][NUM_SIMD];
  logic busy, valid;
  fmax_t cu_fmax [NUM_CU];
  ratio_t ratio_x100 [NUM_CU];
  int checks = 0, failures = 0;
  int fig_ratio [NUM_CU] = '{107, 113, 118, 101, 125, 119, 115, 109, 134, 128, 130, 125, 123,
                              112, 135, 129, 123, 100, 121, 109, 111, 116, 117, 140, 124, 115};

  cu_fmax_unit #(.NUM_CU(NUM_CU), .NUM_SIMD(NUM_SIMD)) dut (
    .clk, .rst_n, .start, .simd_fmax, .busy, .valid, .cu_fmax, .ratio_x100);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_and_wait(output int cyc);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(busy && !valid, "busy after start");
    cyc = 1;
    while (!valid && cyc < 10000) begin @(negedge clk); cyc++; end
    check(cyc <= NUM_CU * (FMAX_W + 8 + 3) + 4, $sformatf("finished in %0d cycles", cyc));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // example ratios
    for (int c = 0; c < NUM_CU; c++) begin
      int slow_s;
      slow_s = int'($urandom_range(NUM_SIMD - 1));
      for (int s = 0; s < NUM_SIMD; s++)
        simd_fmax[c][s] = fmax_t'((s == slow_s) ? fig_ratio[c] * 10 : fig_ratio[c] * 10 + 1 + int'($urandom_range(300)));
    end
    run_and_wait(cyc);
    for (int c = 0; c < NUM_CU; c++) begin
      check(int'(cu_fmax[c]) == fig_ratio[c] * 10, $sformatf("CU%0d fmax %0d", c + 1, cu_fmax[c]));
      check(int'(ratio_x100[c]) == fig_ratio[c], $sformatf("CU%0d ratio %0d exp %0d", c + 1, ratio_x100[c], fig_ratio[c]));
    end
    // random frequencies around 250 MHz, up to 40% spread
    for (int r = 0; r < 5; r++) begin
      int cmin [NUM_CU];
      int gmin;
      gmin = 1 << 30;
      for (int c = 0; c < NUM_CU; c++) begin
        cmin[c] = 1 << 30;
        for (int s = 0; s < NUM_SIMD; s++) begin
          int f;
          f = 250 + int'($urandom_range(100));
          simd_fmax[c][s] = fmax_t'(f);
          if (f < cmin[c]) cmin[c] = f;
        end
        if (cmin[c] < gmin) gmin = cmin[c];
      end
      run_and_wait(cyc);
      for (int c = 0; c < NUM_CU; c++) begin
        int e;
        e = (cmin[c] * 100 + gmin / 2) / gmin;
        check(int'(cu_fmax[c]) == cmin[c], $sformatf("run %0d CU%0d fmax", r, c));
        check(int'(ratio_x100[c]) == e, $sformatf("run %0d CU%0d ratio %0d exp %0d", r, c, ratio_x100[c], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
