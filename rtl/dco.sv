`timescale 1ps/1fs
// dco: behavioural model of the low-power cascaded DCO (not synthesizable
// as a circuit: the delays stand for standard-cell propagation delays).
//
// The DCO is a ring: an enable NAND, the coarse-tuning segmental delay line
// with its path-selection multiplexer, and three fine-tuning stages (P
// hysteresis delay cells, Q long-delay DCVs, R short-delay DCVs).  The
// binary control word is decoded by dco_code_decoder (synthesizable).  The
// model adds, for one pass around the ring,
//   T_INTR + c*T_COARSE + n1*T_F1 + n2*T_F2 + n3*T_F3
// where c is the selected coarse path and n1..n3 the enabled fine cells,
// and toggles the output after each pass, so the period is twice that sum.
// A larger code means more delay and a lower frequency.  If an AND gate on
// the selected path is not enabled the ring is broken and the output stops
// low.  enable = 0 also stops the ring (output low); the first edge after
// enable comes one half period later.  Code changes take effect at the next
// half period.  A rising edge on restart (used by a loop during frequency
// acquisition) restarts the ring: the output gives a fresh rising edge
// 1 fs after the restart edge, and the following rising edges fall exactly
// k periods after that one.  Internally each half period is a tagged
// transport-delay timer (four of them, reused in turn); after a restart the
// ring ignores timers whose tag is no longer current.
// Defaults: the step sizes of the 90 nm test chip (coarse 120.21 ps, fine
// 98.91 / 3.74 / 1.47 ps) and N=10 fine bits with M=5 coarse bits.
// T_INTR = 525 ps is this design's value, chosen so the fastest setting
// gives the measured 952 MHz maximum.
module dco #(
  parameter int unsigned CW  = 5,
  parameter int unsigned F1W = 2,
  parameter int unsigned F2W = 5,
  parameter int unsigned F3W = 3,
  parameter real T_INTR   = 525.0,   // ps, NAND + mux + minimum fine delay
  parameter real T_COARSE = 120.21,  // ps per SDL AND gate
  parameter real T_F1     = 98.91,   // ps per enabled HDC
  parameter real T_F2     = 3.74,    // ps per enabled long-delay DCV
  parameter real T_F3     = 1.47,    // ps per enabled short-delay DCV
  localparam int unsigned W = CW + F1W + F2W + F3W
) (
  input  logic         enable,
  input  logic [W-1:0] code,
  input  logic         restart,
  output logic         clk_out
);

  logic [CW-1:0]       path_sel;
  logic [2**CW-2:0]    en;
  logic [2**F1W-2:0]   f1on;
  logic [2**F2W-2:0]   f2on;
  logic [2**F3W-2:0]   f3on;

  dco_code_decoder #(.CW(CW), .F1W(F1W), .F2W(F2W), .F3W(F3W)) u_dec (
    .code, .path_sel, .en, .f1on, .f2on, .f3on
  );

  // the ring is broken when an AND gate on the selected path is disabled
  logic broken;
  always_comb begin
    broken = 1'b0;
    for (int i = 0; i < 2**CW - 1; i++) if (i < int'(path_sel) && !en[i]) broken = 1'b1;
  end

  // Timers: each pass around the ring is a timer event carrying a token.
  // Only the event whose token is the current one toggles the output, so
  // a restart or a disable cancels the pass in flight.  Four timers are
  // used in turn so that a new pass can start while a cancelled one is
  // still pending.
  `define DCO_PASS (T_INTR + T_COARSE * path_sel + T_F1 * $countones(f1on) \
                    + T_F2 * $countones(f2on) + T_F3 * $countones(f3on))
  logic [31:0] arm_tag  [4];
  logic        arm_fast [4];   // 1: the short step of a restart
  logic [127:0] fire_v;        // delayed tags of the four timers
  for (genvar k = 0; k < 4; k++) begin : g_tmr
    logic [31:0] f = '0;
    always @(arm_tag[k]) f <= #(arm_fast[k] ? 0.001 : `DCO_PASS) arm_tag[k];
    assign fire_v[32*k +: 32] = f;
  end
  `undef DCO_PASS

  logic [31:0]  tok, cur;
  logic [1:0]   slot;
  logic [127:0] seen;
  logic         fast_pending;

  initial begin
    clk_out = 1'b0; tok = '0; cur = '0; slot = '0; seen = '0; fast_pending = 1'b0;
    for (int k = 0; k < 4; k++) begin arm_tag[k] = '0; arm_fast[k] = 1'b0; end
  end

  task automatic arm(input logic fast);
    tok = tok + 32'd1;
    cur = tok;
    arm_fast[slot] = fast;
    arm_tag[slot]  = tok;
    slot = slot + 2'd1;
  endtask

  // restart rising edges toggle rs_req; the oscillator process compares it
  // with the last value it handled
  logic rs_req = 1'b0, rs_seen = 1'b0;
  always @(posedge restart) rs_req <= ~rs_req;

  always @(fire_v or rs_req or enable or broken) begin
    if (!enable || broken) begin
      clk_out = 1'b0;
      cur = '0;                       // cancel the pass in flight
      fast_pending = 1'b0;
      rs_seen = rs_req;
    end else if (rs_req != rs_seen) begin
      // restart edge: output low now, a fresh rising edge just after
      clk_out = 1'b0;
      fast_pending = 1'b1;
      arm(1'b1);
    end else if (cur == '0) begin
      arm(1'b0);                      // (re)start after enable or a repair
    end else begin
      for (int k = 0; k < 4; k++) begin
        if (fire_v[32*k +: 32] != seen[32*k +: 32] && fire_v[32*k +: 32] == cur) begin
          if (fast_pending) begin
            clk_out = 1'b1;
            fast_pending = 1'b0;
          end else begin
            clk_out = ~clk_out;
          end
          arm(1'b0);
        end
      end
    end
    seen = fire_v;
    rs_seen = rs_req;
  end

endmodule
