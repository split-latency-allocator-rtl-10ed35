// issue_queue: instruction issue queue carrying port-speed (PS) bits.
//
// Instructions enter with their wavefront id, opcode and two source register
// addresses (RFA, RFB). While an instruction is being written, the queue looks
// up the PS bits of both operands in the port-speed table (lk_* ports) and
// stores them in the entry, so each entry reads op_code | RFA | PS bits | RFB.
// The cycle after an entry is written, the queue reports it on cat_* to the
// wavefront categorizer: this is where wavefronts are classified while their
// instructions wait to issue. Entries leave in order through pop_valid /
// pop_ready.
//
// Interface: valid/ready on both sides; a push and a pop may happen in the
// same cycle. Latency: an entry pushed at edge t is visible at the head from
// edge t on (when the queue was empty) and cat_valid is high for the cycle
// after edge t.
// The entry fields and categorization at the queue follow the architecture;
// depth, FIFO order and the handshake are this design's choices.
module issue_queue
  import sla_pkg::*;
#(
  parameter int DEPTH = 16,
  localparam int PTR_W = $clog2(DEPTH),
  localparam int CNT_W = $clog2(DEPTH + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  // enqueue
  input  logic       push_valid,
  output logic       push_ready,
  input  wf_id_t     push_wf,
  input  opcode_t    push_op,
  input  reg_addr_t  push_rfa,
  input  reg_addr_t  push_rfb,
  // port-speed table lookup
  output reg_addr_t  lk_addr_a,
  output reg_addr_t  lk_addr_b,
  input  logic       lk_ps_a,
  input  logic       lk_ps_b,
  // dequeue (issue)
  output logic       pop_valid,
  input  logic       pop_ready,
  output iq_entry_t  head,
  output logic [CNT_W-1:0] count,
  // categorization event
  output logic       cat_valid,
  output wf_id_t     cat_wf,
  output logic [1:0] cat_ps
);

  iq_entry_t mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic do_push, do_pop;

  assign lk_addr_a  = push_rfa;
  assign lk_addr_b  = push_rfb;
  assign push_ready = (count != CNT_W'(DEPTH));
  assign pop_valid  = (count != '0);
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;
  assign head       = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push)
      mem[wr_ptr] <= '{wf: push_wf, op_code: push_op, rfa: push_rfa,
                        ps: {lk_ps_a, lk_ps_b}, rfb: push_rfb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      cat_valid <= 1'b0;
      cat_wf    <= '0;
      cat_ps    <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == PTR_W'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count     <= count + CNT_W'(do_push) - CNT_W'(do_pop);
      cat_valid <= do_push;
      cat_wf    <= push_wf;
      cat_ps    <= {lk_ps_a, lk_ps_b};
    end
  end

  // The queue never holds more than DEPTH entries.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= CNT_W'(DEPTH));

endmodule
