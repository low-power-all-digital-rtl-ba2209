`timescale 1ps/1fs
// rdtm_modulator: modulation controller of the spread-spectrum clock
// generator, producing a rescheduling division triangular modulation (RDTM).
//
// One modulation cycle has COUNT = 8 << SEC_SEL sub-sections, split into
// Q = COUNT/4 groups of four.  The code offset of a sub-section is a level
// L times the spreading step S = 2 << STEP.  Group g uses the magnitudes
// a = g+1 and b = Q-g: even groups play (+a, +b, -a, -b) and odd groups
// (-a, -b, +a, +b).  Each group sums to zero, so the phase drift is zero at
// every group end, and each level from -Q to +Q (without 0) occurs twice
// per cycle, giving an even frequency spread.  The largest change between
// neighbouring sub-sections is Q+1 = COUNT/4+1 steps, the RDTM figure of
// eq. (4.2) (DTM: COUNT/2-1).
// Interface: clk (FIN_M), rst_n, enable (spread-spectrum mode), sec_sel,
// step.  Each sub-section lasts SUB_CYCLES clk cycles.  At the first cycle
// of a sub-section, ss_valid is high with ss_add (+/-_SS) and ss_step
// (S_SS[15:0]) = |new level - old level| * S (combinational, taken at the
// clock edge that starts the sub-section); group_end marks the last
// cycle of each group, when the loop may apply a phase-tracking update.
// When enable falls, the modulator returns to level 0 with one final
// delta.  offset is the current signed level times S (for checking).
// Follows the document: SEC_SEL/STEP controls, +/-_SS and S_SS outputs,
// zero-sum groups of four, COUNT/4+1 peak change.  This design's choices:
// the level order inside a group, the COUNT and S decoding, SUB_CYCLES.
module rdtm_modulator #(
  parameter int unsigned SUB_CYCLES = 1    // clk cycles per sub-section
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [2:0]  sec_sel,    // SEC_SEL[2:0]: COUNT = 8 << SEC_SEL
  input  logic [2:0]  step,       // STEP[2:0]:    S = 2 << STEP
  output logic        ss_valid,
  output logic        ss_add,     // +/-_SS: 1 = add (lower frequency)
  output logic [15:0] ss_step,    // S_SS[15:0]
  output logic        group_end,
  output logic signed [17:0] offset
);

  logic [10:0] sub;          // sub-section index in the cycle
  logic [7:0]  cyc;          // clk cycles inside the sub-section
  logic signed [11:0] level; // current level in units of S
  logic        running;

  logic [10:0] count;
  logic [8:0]  q;
  logic [15:0] s;
  assign count = 11'(8) << sec_sel;
  assign q     = 9'(count >> 2);
  assign s     = 16'(2) << step;

  // level of sub-section k
  function automatic logic signed [11:0] level_of(input logic [10:0] k, input logic [8:0] qq);
    logic [8:0] g;
    logic [1:0] p;
    logic signed [11:0] a, b, v;
    g = 9'(k >> 2);
    p = k[1:0];
    a = 12'(g) + 12'sd1;
    b = 12'(qq) - 12'(g);
    case (p)
      2'd0: v = a;
      2'd1: v = b;
      2'd2: v = -a;
      default: v = -b;
    endcase
    return g[0] ? -v : v;
  endfunction

  logic signed [11:0] next_level, delta;
  logic               start_sub;

  assign start_sub  = enable && (!running || cyc == 8'(SUB_CYCLES - 1));
  assign next_level = !enable ? 12'sd0 :
                      !running ? level_of(11'd0, q) :
                      level_of((sub == count - 1) ? 11'd0 : sub + 11'd1, q);
  assign delta      = next_level - level;

  // the step requests are combinational, so the code generator applies a
  // level change at the same clock edge at which the level register moves
  logic leaving;
  logic signed [11:0] mag;
  assign leaving  = !enable && level != 0;
  assign mag      = leaving ? (level < 0 ? -level : level) : (delta < 0 ? -delta : delta);
  assign ss_valid = (start_sub && delta != 0) || leaving;
  assign ss_add   = leaving ? (level < 0) : (delta > 0);
  assign ss_step  = 16'(32'(mag) * 32'(s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub <= '0; cyc <= '0; level <= '0; running <= 1'b0;
    end else if (start_sub) begin
      running <= 1'b1;
      cyc     <= '0;
      sub     <= !running ? 11'd0 : (sub == count - 1) ? 11'd0 : sub + 11'd1;
      level   <= next_level;
    end else if (enable) begin
      cyc <= cyc + 8'd1;
    end else begin
      // leave spread mode: return to the centre
      running <= 1'b0;
      sub <= '0; cyc <= '0;
      level <= '0;
    end
  end

  assign group_end = running && enable && (sub[1:0] == 2'd3) && (cyc == 8'(SUB_CYCLES - 1));
  assign offset    = 18'(level * $signed({1'b0, s}));

endmodule
