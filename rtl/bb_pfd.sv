`timescale 1ps/1fs
// bb_pfd: bang-bang phase/frequency detector (PFD / PD).
//
// Tells, at every rising edge of the reference clock, whether the feedback
// clock is ahead of it or behind it.  Two edge flags are set by the rising
// edges of ref_clk and fb_clk and both are cleared as soon as both are set
// (the tri-state PFD reset).  At a ref_clk edge, a set fb flag means the
// feedback edge of this round has already arrived: fb leads (lead = 1, the
// oscillator is early and must be slowed down).  A clear fb flag means the
// feedback edge is still to come: fb lags (lag = 1).  Several fb edges
// between two ref edges keep the flag set (too fast: lead); several ref
// edges with no fb edge keep it clear (too slow: lag), so the detector also
// tells frequency errors apart.
//
// Realign mode (realign = 1, used while a loop restarts its oscillator and
// feedback divider at every reference edge to compare frequencies): the
// flags are held clear, and lead is 1 when a feedback edge arrived since
// the previous reference edge (feedback period shorter than the reference
// period), lag otherwise.  Holding the flags clear also makes the first
// comparison after realign pair the right edges.
// Timing: lead/lag are combinational and valid at the rising edge of
// ref_clk, where the loop controller samples them; the flags are cleared
// just after that edge.  A real arbiter's dead zone is not
// modelled.  The lead/lag meaning follows the loop descriptions; the flag
// structure is this design's choice.
module bb_pfd (
  input  logic rst_n,   // asynchronous, active low
  input  logic ref_clk, // Ref_N / FIN_M / CLK_IN
  input  logic fb_clk,  // DCO_M / DCO_N / P360
  input  logic realign, // frequency-comparison mode (see above)
  output logic lead,    // feedback edge came first
  output logic lag      // reference edge came first
);

  logic ref_seen, fb_seen;
  logic clr;

  assign clr = (ref_seen & fb_seen) | ~rst_n | realign;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) ref_seen <= 1'b0;
    else     ref_seen <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) fb_seen <= 1'b0;
    else     fb_seen <= 1'b1;
  end

  // realign-mode window detector: fb edge toggle against its value at the
  // previous reference edge
  logic fb_tog, fb_snap, fb_in_window;
  always_ff @(posedge fb_clk or negedge rst_n) begin
    if (!rst_n) fb_tog <= 1'b0;
    else        fb_tog <= ~fb_tog;
  end
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) fb_snap <= 1'b0;
    else        fb_snap <= fb_tog;
  end
  assign fb_in_window = (fb_tog != fb_snap);

  assign lead = realign ? fb_in_window : fb_seen;
  assign lag  = ~lead;

endmodule
