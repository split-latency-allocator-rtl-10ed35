// cu_fmax_unit: per-CU maximum frequency and its ratio to the slowest CU.
//
// A CU can run no faster than its slowest SIMD unit, so on start the unit
// samples the maximum frequency of every SIMD (simd_fmax, e.g. in MHz) and
// keeps the minimum of each CU's SIMDs as that CU's Fmax. It then finds the
// slowest CU and, with one shared sequential divider, computes for every CU
//   ratio_x100[i] = round(100 * cu_fmax[i] / min_fmax)
// so the slowest CU reads 100 (1.00) and a CU 40% faster reads 140.
// The min-of-SIMDs rule and ratios relative to the slowest CU follow the
// architecture; hundredths, rounding and the one-divider sequencing are this
// design's choices.
//
// Interface: start (ignored while busy) samples simd_fmax. busy is high while
// computing; valid rises once all NUM_CU ratios are written, about
// NUM_CU * (FMAX_W + 9) cycles after start, and stays high until the next
// start. A zero Fmax input is treated as 1. Ratios saturate at 10.23.
module cu_fmax_unit
  import sla_pkg::*;
#(
  parameter int NUM_CU   = 128,
  parameter int NUM_SIMD = 4,
  localparam int CU_W = (NUM_CU > 1) ? $clog2(NUM_CU) : 1,
  localparam int DW   = FMAX_W + 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fmax_t  simd_fmax [NUM_CU][NUM_SIMD],
  output logic   busy,
  output logic   valid,
  output fmax_t  cu_fmax    [NUM_CU],
  output ratio_t ratio_x100 [NUM_CU]
);

  typedef enum logic [1:0] {S_IDLE, S_MIN, S_DIV, S_WAIT} state_t;
  state_t state_q;

  fmax_t         min_q, min_all;
  logic [CU_W-1:0] idx_q;
  logic          div_start, div_busy, div_done;
  logic [DW-1:0] quotient, dividend;

  // slowest SIMD of every CU, from the live inputs
  fmax_t cu_min_in [NUM_CU];
  always_comb begin
    for (int c = 0; c < NUM_CU; c++) begin
      cu_min_in[c] = simd_fmax[c][0];
      for (int s = 1; s < NUM_SIMD; s++)
        if (simd_fmax[c][s] < cu_min_in[c]) cu_min_in[c] = simd_fmax[c][s];
      if (cu_min_in[c] == '0) cu_min_in[c] = fmax_t'(1);
    end
  end

  // slowest CU, from the sampled values
  always_comb begin
    min_all = cu_fmax[0];
    for (int c = 1; c < NUM_CU; c++)
      if (cu_fmax[c] < min_all) min_all = cu_fmax[c];
  end

  always_comb dividend = DW'(cu_fmax[idx_q]) * DW'(100) + DW'(min_q >> 1);
  assign div_start = (state_q == S_DIV);

  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (dividend),
    .divisor  (DW'(min_q)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (quotient)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      valid   <= 1'b0;
      idx_q   <= '0;
      min_q   <= fmax_t'(1);
      for (int c = 0; c < NUM_CU; c++) begin
        cu_fmax[c]    <= fmax_t'(1);
        ratio_x100[c] <= ratio_t'(ONE_X100);
      end
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          for (int c = 0; c < NUM_CU; c++) cu_fmax[c] <= cu_min_in[c];
          valid   <= 1'b0;
          idx_q   <= '0;
          state_q <= S_MIN;
        end
        S_MIN: begin
          min_q   <= min_all;
          state_q <= S_DIV;
        end
        S_DIV: state_q <= S_WAIT;
        S_WAIT: if (div_done) begin
          ratio_x100[idx_q] <= (quotient > DW'({RATIO_W{1'b1}})) ? {RATIO_W{1'b1}}
                                                                : ratio_t'(quotient);
          if (32'(idx_q) == NUM_CU - 1) begin
            valid   <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            idx_q   <= idx_q + 1'b1;
            state_q <= S_DIV;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

endmodule
