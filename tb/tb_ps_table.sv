// tb_ps_table: self-checking test of the port-speed table.
// Writes random slow/fast bits (including rewrites of the same entry), keeps
// a reference copy, and compares both lookup ports and the slow-entry count
// against it after every write.
module tb_ps_table;
  import sla_pkg::*;

  localparam int NUM_SIMD = 4;
  localparam int NUM_VGPR = 256;
  localparam int N = NUM_SIMD * NUM_VGPR;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bist_we = 1'b0, bist_slow = 1'b0;
  reg_addr_t bist_addr = '0, rd_a = '0, rd_b = '0;
  logic ps_a, ps_b;
  logic [$clog2(N+1)-1:0] slow_count;
  int checks = 0, failures = 0;
  bit ref_ps [N];
  int ref_cnt;

  ps_table #(.NUM_SIMD(NUM_SIMD), .NUM_VGPR(NUM_VGPR)) dut (
    .clk, .rst_n, .bist_we, .bist_addr, .bist_slow,
    .rd_addr_a (rd_a), .rd_addr_b (rd_b), .ps_a, .ps_b, .slow_count);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) ref_ps[i] = 1'b0;
    ref_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(slow_count == 0, "count after reset");
    for (int k = 0; k < 600; k++) begin
      int a;
      bit s;
      a = (k < 40) ? (k % 8) : int'($urandom_range(N - 1));
      s = ($urandom_range(99) < 30);
      bist_we   <= 1'b1;
      bist_addr <= reg_addr_t'(a);
      bist_slow <= s;
      @(posedge clk);
      bist_we <= 1'b0;
      if (ref_ps[a] != s) ref_cnt += s ? 1 : -1;
      ref_ps[a] = s;
      rd_a <= reg_addr_t'(a);
      rd_b <= reg_addr_t'($urandom_range(N - 1));
      #1;
      check(ps_a == ref_ps[a], $sformatf("ps_a entry %0d", a));
      check(ps_b == ref_ps[int'(rd_b)], $sformatf("ps_b entry %0d", rd_b));
      check(int'(slow_count) == ref_cnt, $sformatf("slow_count %0d exp %0d", slow_count, ref_cnt));
    end
    // full sweep of both ports
    for (int a = 0; a < N; a++) begin
      rd_a <= reg_addr_t'(a);
      rd_b <= reg_addr_t'(N - 1 - a);
      #1;
      check(ps_a == ref_ps[a] && ps_b == ref_ps[N - 1 - a], $sformatf("sweep %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
