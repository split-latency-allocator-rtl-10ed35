// tb_latency_ratio_unit: self-checking test of the slow percentage and the
// fast-CU threshold 1 + slow fraction. Runs the four fast/slow splits 80/20,
// 75/25, 70/30 and 60/40 on 1024 entries plus random counts, and checks the
// rounded percentages, the threshold (1.20 for 80/20) and that the result is
// ready within the divider's latency.
module tb_latency_ratio_unit;
  import sla_pkg::*;

  localparam int N = 1024;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [$clog2(N+1)-1:0] slow_count = '0;
  logic busy, valid;
  pct_t slow_pct, fast_pct;
  ratio_t threshold_x100;
  int checks = 0, failures = 0;

  latency_ratio_unit #(.NUM_ENTRIES(N)) dut (
    .clk, .rst_n, .start, .slow_count, .busy, .valid, .slow_pct, .fast_pct, .threshold_x100);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int slow, int exp_pct);
    int cyc;
    @(negedge clk);
    slow_count = ($clog2(N+1))'(slow);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(!valid, "valid drops on start");
    cyc = 1;
    while (!valid && cyc < 100) begin @(negedge clk); cyc++; end
    check(cyc <= 22, $sformatf("latency %0d cycles", cyc));
    check(int'(slow_pct) == exp_pct, $sformatf("slow %0d: pct %0d exp %0d", slow, slow_pct, exp_pct));
    check(int'(fast_pct) == 100 - exp_pct, "fast pct");
    check(int'(threshold_x100) == 100 + exp_pct, $sformatf("threshold %0d", threshold_x100));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(205, 20);   // 80/20 -> threshold 1.20
    run(256, 25);   // 75/25
    run(307, 30);   // 70/30
    run(410, 40);   // 60/40
    run(0, 0);
    run(N, 100);
    for (int k = 0; k < 50; k++) begin
      int s;
      real r;
      s = int'($urandom_range(N));
      r = 100.0 * s / N;
      run(s, int'($floor(r + 0.5)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
