`timescale 1ps/1fs
// dco_mono_adjust: auto-adjustment of the DCO code for monotonic delay.
//
// The cascaded DCO has overlapping stages: the range of each fine stage is
// larger than the step of the stage before it, so a code change that
// carries or borrows into a coarser stage makes the delay jump the wrong
// way.  This combinational block compares the present code with the
// proposed next code.  If the next code moves up and changes the field of
// a coarser stage, the compensation for the coarsest stage boundary
// crossed is added (coarse/1st fine: 320, 1st/2nd fine: 48, 2nd/3rd fine:
// 4).  A move down subtracts it instead.  The result saturates at the code
// limits.
// Interface: cur_code and next_code (W = C + F1W + F2W + F3W bits) ->
// adj_code and crossed (a compensation was applied).
// Follows the document: the compensation values 320, 48 and 4 and the
// add/subtract rule.  This design's choice: the crossing test compares the
// stage fields of the two codes.
module dco_mono_adjust
  import clkgen_pkg::*;
#(
  parameter int unsigned CW  = 8,   // C
  parameter int unsigned F1W = 2,   // 1st fine (X = 4 HDCs)
  parameter int unsigned F2W = 5,   // 2nd fine (Y = 32 long DCVs)
  parameter int unsigned F3W = 3,   // 3rd fine (Z = 8 short DCVs)
  parameter int unsigned COMP_C  = COMP_COARSE_F1,
  parameter int unsigned COMP_F1 = COMP_F1_F2,
  parameter int unsigned COMP_F2 = COMP_F2_F3,
  localparam int unsigned W = CW + F1W + F2W + F3W
) (
  input  logic [W-1:0] cur_code,
  input  logic [W-1:0] next_code,
  output logic [W-1:0] adj_code,
  output logic         crossed
);

  localparam logic [W:0] MAXC = {1'b0, {W{1'b1}}};

  logic up;
  logic [W-1:0] comp;
  logic [W:0]   sum;

  assign up = next_code > cur_code;

  always_comb begin
    if (cur_code[W-1 -: CW] != next_code[W-1 -: CW])
      comp = W'(COMP_C);
    else if (cur_code[F1W+F2W+F3W-1 -: F1W] != next_code[F1W+F2W+F3W-1 -: F1W])
      comp = W'(COMP_F1);
    else if (cur_code[F2W+F3W-1 -: F2W] != next_code[F2W+F3W-1 -: F2W])
      comp = W'(COMP_F2);
    else
      comp = '0;
    crossed = (comp != 0) && (next_code != cur_code);
    if (!crossed)
      sum = {1'b0, next_code};
    else if (up)
      sum = {1'b0, next_code} + {1'b0, comp};
    else
      sum = ({1'b0, next_code} < {1'b0, comp}) ? '0 : {1'b0, next_code} - {1'b0, comp};
    adj_code = (sum > MAXC) ? MAXC[W-1:0] : sum[W-1:0];
  end

endmodule
