// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// start (when not busy) samples dividend and divisor; W clock cycles later
// done pulses for one cycle with quotient valid (it holds until the next
// start). The divisor must not be zero. Used by the threshold and
// frequency-ratio units, which divide only during configuration.
module seq_divider #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);

  logic [W-1:0]         rem_q, dvs_q, quo_q;
  logic [$clog2(W+1)-1:0] cnt_q;
  logic [W:0]           trial;

  always_comb trial = {rem_q, quo_q[W-1]} - {1'b0, dvs_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q <= '0; dvs_q <= '0; quo_q <= '0; cnt_q <= '0;
      busy  <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem_q <= '0;
          dvs_q <= divisor;
          quo_q <= dividend;
          cnt_q <= ($clog2(W+1))'(W);
          busy  <= 1'b1;
        end
      end else begin
        // shift next dividend bit into the remainder, try to subtract
        if (!trial[W]) begin
          rem_q <= trial[W-1:0];
          quo_q <= {quo_q[W-2:0], 1'b1};
        end else begin
          rem_q <= {rem_q[W-2:0], quo_q[W-1]};
          quo_q <= {quo_q[W-2:0], 1'b0};
        end
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == 1) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= trial[W] ? {quo_q[W-2:0], 1'b0} : {quo_q[W-2:0], 1'b1};
        end
      end
    end
  end

endmodule
