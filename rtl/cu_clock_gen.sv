// cu_clock_gen: individual clock of one compute unit, as a clock enable.
//
// Every CU runs at its own maximum frequency, expressed as a ratio to the
// slowest CU (1.00 .. about 1.40). The generator runs on a common reference
// clock of REF_X100/100 times the slowest CU's frequency and fires cu_clk_en
// on exactly ratio_x100 out of every REF_X100 reference cycles, using a phase
// accumulator: acc += ratio each cycle, and whenever acc reaches REF_X100 an
// enable is produced and REF_X100 is subtracted. With the default REF_X100 of
// 200 the slowest CU gets an enable every second reference cycle.
//
// Interface: en gates the generator (accumulator cleared while low);
// ratio_x100 above REF_X100 is treated as REF_X100 (enable every cycle).
// Per-CU clocks relative to the slowest CU follow the architecture; making
// them enables of a shared reference instead of separate clock sources is this
// design's choice.
module cu_clock_gen
  import sla_pkg::*;
#(
  parameter int unsigned REF_X100 = 200,
  localparam int ACC_W = $clog2(2 * REF_X100 + 1)
) (
  input  logic   clk_ref,
  input  logic   rst_n,
  input  logic   en,
  input  ratio_t ratio_x100,
  output logic   cu_clk_en
);

  logic [ACC_W-1:0] acc_q, step, sum;

  always_comb begin
    step = (32'(ratio_x100) > REF_X100) ? ACC_W'(REF_X100) : ACC_W'(ratio_x100);
    sum  = acc_q + step;
  end

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      cu_clk_en <= 1'b0;
    end else if (!en) begin
      acc_q     <= '0;
      cu_clk_en <= 1'b0;
    end else if (sum >= ACC_W'(REF_X100)) begin
      acc_q     <= sum - ACC_W'(REF_X100);
      cu_clk_en <= 1'b1;
    end else begin
      acc_q     <= sum;
      cu_clk_en <= 1'b0;
    end
  end

endmodule
