// latency_ratio_unit: slow/fast split of the register file and the fast-CU
// threshold of the allocator.
//
// From the number of slow register entries reported by the port-speed table
// it computes the slow percentage, rounded to the nearest percent,
//   slow_pct = round(100 * slow_count / NUM_ENTRIES),
// the fast percentage 100 - slow_pct, and the threshold on the CU frequency
// ratio above which a CU counts as fast:
//   threshold = 1 + slow fraction      (threshold_x100 = 100 + slow_pct),
// so an 80/20 split gives 1.20. The equation follows the architecture; the
// rounding and the sequential divider are this design's choices.
//
// Interface: start samples slow_count; busy is high while dividing and valid
// rises about NUM_ENTRIES' bit width + 3 cycles later and stays high until
// the next start. Outputs hold their last value while busy.
module latency_ratio_unit
  import sla_pkg::*;
#(
  parameter int NUM_ENTRIES = 1024,
  localparam int CNT_W = $clog2(NUM_ENTRIES + 1),
  localparam int DW    = CNT_W + 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] slow_count,
  output logic             busy,
  output logic             valid,
  output pct_t             slow_pct,
  output pct_t             fast_pct,
  output ratio_t           threshold_x100
);

  logic          div_busy, div_done;
  logic [DW-1:0] dividend, quotient;

  always_comb dividend = DW'(slow_count) * DW'(100) + DW'(NUM_ENTRIES / 2);

  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n,
    .start    (start && !div_busy),
    .dividend (dividend),
    .divisor  (DW'(NUM_ENTRIES)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid          <= 1'b0;
      slow_pct       <= '0;
      fast_pct       <= pct_t'(ONE_X100);
      threshold_x100 <= ratio_t'(ONE_X100);
    end else begin
      if (start && !div_busy) valid <= 1'b0;
      if (div_done) begin
        valid          <= 1'b1;
        slow_pct       <= pct_t'(quotient);
        fast_pct       <= pct_t'(ONE_X100 - 32'(quotient));
        threshold_x100 <= ratio_t'(ONE_X100 + 32'(quotient));
      end
    end
  end

  assign busy = div_busy;

endmodule
