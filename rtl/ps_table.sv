// ps_table: port-speed bit table of the vector register file.
//
// One bit per register entry ({SIMD, VGPR}) says whether the entry is slow
// (PS_SLOW) or fast, as measured by the built-in self test after fabrication.
// The BIST writes the bits one at a time through bist_we/bist_addr/bist_slow.
// Two lookup ports return, combinationally, the bits of the two source
// operands (RFA and RFB) of an instruction entering the issue queue. The table
// also keeps a running count of slow entries, which sets the slow/fast split
// used by the allocator's threshold.
//
// Timing: a write takes effect at the next clock edge, slow_count is updated
// at the same edge. Reset marks every entry fast.
// The per-entry port-speed bit and its BIST source follow the architecture;
// the one-bit-per-row granularity, the write interface and the reset value are
// this design's choices.
module ps_table
  import sla_pkg::*;
#(
  parameter int NUM_SIMD = 4,
  parameter int NUM_VGPR = 256,
  localparam int N       = NUM_SIMD * NUM_VGPR,
  localparam int CNT_W   = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bist_we,
  input  reg_addr_t        bist_addr,
  input  logic             bist_slow,
  input  reg_addr_t        rd_addr_a,
  input  reg_addr_t        rd_addr_b,
  output logic             ps_a,
  output logic             ps_b,
  output logic [CNT_W-1:0] slow_count
);

  logic [N-1:0] ps_q;

  function automatic int unsigned idx(reg_addr_t a);
    return int'(a[REG_W-1 -: SIMD_W]) * NUM_VGPR + int'(a[VGPR_W-1:0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_q       <= '0;
      slow_count <= '0;
    end else if (bist_we && idx(bist_addr) < N) begin
      ps_q[idx(bist_addr)] <= bist_slow;
      if (bist_slow && !ps_q[idx(bist_addr)])
        slow_count <= slow_count + 1'b1;
      else if (!bist_slow && ps_q[idx(bist_addr)])
        slow_count <= slow_count - 1'b1;
    end
  end

  always_comb begin
    ps_a = (idx(rd_addr_a) < N) ? ps_q[idx(rd_addr_a)] : 1'b0;
    ps_b = (idx(rd_addr_b) < N) ? ps_q[idx(rd_addr_b)] : 1'b0;
  end

endmodule
