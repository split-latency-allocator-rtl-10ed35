// vgpr_rf: behavioural model of a process-variation-affected vector register
// file. It is a model of an SRAM macro, not a circuit: the real array's cells
// are slow or fast after fabrication, and this model reproduces only the
// resulting access timing.
//
// The array holds NUM_ENTRIES rows of LANES x DATA_W bits (a row is one
// register across all 64 lanes of a SIMD). A read of two rows (operands A and
// B) completes after FAST_LAT cycles when both rows are fast and after
// SLOW_LAT cycles when either is slow: one slow row holds up the whole
// operand read. The caller passes the port-speed bits of the two rows with the
// request (rd_ps, from the issue queue entry). The 8- and 16-cycle latencies
// are the PV-free and PV-affected register access latencies of the
// architecture; the single outstanding read and the write port are this
// model's choices.
//
// Interface: rd_valid/rd_ready handshake; rd_done pulses for one cycle with
// rd_data_a/rd_data_b exactly FAST_LAT or SLOW_LAT cycles after the accepted
// request edge. Writes (wr_en) take one cycle and are not timed.
module vgpr_rf
  import sla_pkg::*;
#(
  parameter int NUM_ENTRIES = 1024,
  parameter int LANES       = 64,
  parameter int DATA_W      = 32,
  parameter int FAST_LAT    = 8,
  parameter int SLOW_LAT    = 16,
  localparam int ROW_W = LANES * DATA_W,
  localparam int LAT_W = $clog2(SLOW_LAT + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  reg_addr_t        wr_addr,
  input  logic [ROW_W-1:0] wr_data,
  input  logic             rd_valid,
  output logic             rd_ready,
  input  reg_addr_t        rd_addr_a,
  input  reg_addr_t        rd_addr_b,
  input  logic [1:0]       rd_ps,
  output logic             rd_done,
  output logic [ROW_W-1:0] rd_data_a,
  output logic [ROW_W-1:0] rd_data_b
);

  logic [ROW_W-1:0] mem [NUM_ENTRIES];
  logic [LAT_W-1:0] cnt_q;
  reg_addr_t        a_q, b_q;

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < NUM_ENTRIES) mem[wr_addr] <= wr_data;
  end

  assign rd_ready = (cnt_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      a_q       <= '0;
      b_q       <= '0;
      rd_done   <= 1'b0;
      rd_data_a <= '0;
      rd_data_b <= '0;
    end else begin
      rd_done <= 1'b0;
      if (rd_valid && rd_ready) begin
        a_q   <= rd_addr_a;
        b_q   <= rd_addr_b;
        cnt_q <= (|rd_ps) ? LAT_W'(SLOW_LAT - 1) : LAT_W'(FAST_LAT - 1);
      end else if (cnt_q == LAT_W'(1)) begin
        cnt_q     <= '0;
        rd_done   <= 1'b1;
        rd_data_a <= (int'(a_q) < NUM_ENTRIES) ? mem[a_q] : '0;
        rd_data_b <= (int'(b_q) < NUM_ENTRIES) ? mem[b_q] : '0;
      end else if (cnt_q != '0) begin
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

endmodule
