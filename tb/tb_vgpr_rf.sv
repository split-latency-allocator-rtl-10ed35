// tb_vgpr_rf: self-checking test of the register-file timing model.
// Writes random rows, then issues two-operand reads with every combination of
// port-speed bits and checks the returned rows and that each read takes
// exactly 8 cycles when both rows are fast and 16 when either is slow.
module tb_vgpr_rf;
  import sla_pkg::*;

  localparam int NE = 64, LANES = 4, DW = 32, ROW = LANES * DW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_valid = 1'b0, rd_ready, rd_done;
  reg_addr_t wr_addr = '0, ra = '0, rb = '0;
  logic [ROW-1:0] wr_data = '0, da, db;
  logic [1:0] rd_ps = '0;
  logic [ROW-1:0] ref_mem [NE];
  int checks = 0, failures = 0, n_fast = 0, n_slow = 0;

  vgpr_rf #(.NUM_ENTRIES(NE), .LANES(LANES), .DATA_W(DW)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_valid, .rd_ready,
    .rd_addr_a (ra), .rd_addr_b (rb), .rd_ps, .rd_done, .rd_data_a (da), .rd_data_b (db));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NE; i++) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_addr = reg_addr_t'(i);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < 200; k++) begin
      int a, b, cyc, exp_lat;
      a = int'($urandom_range(NE - 1));
      b = int'($urandom_range(NE - 1));
      while (!rd_ready) @(negedge clk);
      rd_valid = 1'b1;
      ra = reg_addr_t'(a);
      rb = reg_addr_t'(b);
      rd_ps = 2'(k % 4);
      exp_lat = (k % 4 == 0) ? 8 : 16;
      @(negedge clk);
      rd_valid = 1'b0;
      cyc = 1;
      while (!rd_done && cyc < 40) begin @(negedge clk); cyc++; end
      check(cyc == exp_lat, $sformatf("latency %0d exp %0d", cyc, exp_lat));
      check(da == ref_mem[a] && db == ref_mem[b], $sformatf("data rows %0d %0d", a, b));
      if (exp_lat == 8) n_fast++; else n_slow++;
    end
    check(n_fast > 0 && n_slow > 0, "both latencies exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
