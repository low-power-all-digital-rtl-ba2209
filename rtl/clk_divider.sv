`timescale 1ps/1fs
// clk_divider: programmable integer clock divider.
//
// Divides clk_in by div (1 .. 2**W-1).  A down-counter reloads every div
// input cycles; the output is high for the first ceil(div/2) cycles of each
// output period, so even ratios give a 50 % duty cycle.  div = 0 is treated
// as 1 (pass-through, the output is then clk_in).  Otherwise the output is a register, one clk_in cycle behind
// the counter; a new div value takes effect at the next output period.
// restart realigns the output: a rising edge of restart is latched (a
// toggle flop clocked by restart), and the first clk_in rising edge after
// it (the oscillator's own restart edge in the loops) reloads the counter and holds the output low, so the next output rising
// edge comes exactly div input periods after that edge.
// The divider ratios (pre-divider, DCO divider, output dividers) come from
// the loop architectures; the counter structure is this design's own choice.
module clk_divider #(
  parameter int unsigned W = 7   // ratio width (the DCO divider M[6:0])
) (
  input  logic         clk_in,
  input  logic         rst_n,    // asynchronous, active low
  input  logic [W-1:0] div,      // division ratio
  input  logic         restart,  // realign to the next div input edges
  output logic         clk_out
);

  logic [W-1:0] cnt;
  logic         q;
  logic [W-1:0] ratio;
  logic [W-1:0] half;

  always_comb begin
    ratio = (div == '0) ? W'(1) : div;
    half  = W'((32'(ratio) + 32'd1) >> 1);
  end

  logic hold, req_t, ack_t;

  // a restart rising edge toggles req_t; the next clk_in edge sees
  // req_t != ack_t, reloads the counter and acknowledges
  always_ff @(posedge restart or negedge rst_n) begin
    if (!rst_n) req_t <= 1'b0;
    else        req_t <= ~req_t;
  end

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      q         <= 1'b0;
      hold      <= 1'b0;
      ack_t     <= 1'b0;
    end else if (req_t != ack_t) begin
      cnt       <= ratio - W'(1);
      q         <= 1'b0;
      hold      <= 1'b1;
      ack_t     <= req_t;
    end else begin
      if (cnt == '0) cnt <= ratio - W'(1);
      else           cnt <= cnt - W'(1);
      if (cnt == '0) hold <= 1'b0;
      // high while the remaining count is in the upper half of the period
      q <= (cnt == '0) ? 1'b1 : (!hold && (ratio - cnt) < half);
    end
  end

  // ratio 1: the input clock itself
  assign clk_out = (ratio == W'(1)) ? clk_in : q;

endmodule
