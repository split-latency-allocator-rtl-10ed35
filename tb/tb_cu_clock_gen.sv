// tb_cu_clock_gen: self-checking test of the per-CU clock enable.
// For Fmax ratios taken from a 26-CU example (1.00 .. 1.40) and a few edge
// values, counts enables over a window of reference cycles and checks the
// exact count floor(cycles * ratio / 2.00), that enables are evenly spread (every gap is
// the floor or ceiling of 2.00 / ratio) and that the generator is silent when disabled.
module tb_cu_clock_gen;
  import sla_pkg::*;

  localparam int unsigned REF = 200;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  ratio_t ratio = ratio_t'(100);
  logic cu_clk_en;
  int checks = 0, failures = 0;
  int ratios [] = '{100, 107, 113, 118, 101, 125, 119, 115, 109, 134, 128, 130,
                    123, 112, 135, 129, 121, 111, 116, 117, 140, 124, 199, 200, 250};

  cu_clock_gen #(.REF_X100(REF)) dut (.clk_ref (clk), .rst_n, .en, .ratio_x100 (ratio), .cu_clk_en);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (ratios[i]) begin
      int n, cnt, eff, gap, last, gmin, gmax;
      @(negedge clk);
      en = 1'b0;
      ratio = ratio_t'(ratios[i]);
      repeat (3) @(negedge clk);
      check(!cu_clk_en, "silent while disabled");
      en = 1'b1;
      n = 2000 + int'($urandom_range(17));
      cnt = 0; last = -1; gmin = 1 << 30; gmax = 0;
      for (int c = 0; c < n; c++) begin
        @(negedge clk);
        if (cu_clk_en) begin
          cnt++;
          if (last >= 0) begin
            gap = c - last;
            if (gap < gmin) gmin = gap;
            if (gap > gmax) gmax = gap;
          end
          last = c;
        end
      end
      eff = (ratios[i] > int'(REF)) ? int'(REF) : ratios[i];
      check(cnt == (n * eff) / int'(REF),
            $sformatf("ratio %0d: %0d enables in %0d cycles, exp %0d", ratios[i], cnt, n, (n * eff) / int'(REF)));
      // evenly spread: every gap is floor or ceil of REF / ratio
      check(gmin >= int'(REF) / eff && gmax <= (int'(REF) + eff - 1) / eff,
            $sformatf("ratio %0d gaps %0d..%0d", ratios[i], gmin, gmax));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
