`timescale 1ps/1fs
// dcdl: behavioural model of the 4-stage digitally controlled delay line.
//
// Behavioural model: the delays of the standard-cell coarse-delay cells
// (CDC), hysteresis delay cell (HDC) and varactors (DCV) are written as
// transport delays; this is not a gate netlist.
// Four identical stages in series, each a coarse-delay stage (16 CDCs
// selected by C[15:0]) followed by a fine-delay stage (one HDC enabled by
// F[0] and 16 DCVs switched by F[16:1]).  Stage delay =
//   T_INTR + (ones in C) * T_CDC + F[0] * T_HDC + (ones in F[16:1]) * T_DCV.
// The outputs of the stages are P90, P180, P270 and P360.  The delay of a
// stage is taken when an edge enters it (a code change affects later
// edges only).
// Interface: clk_in, c[15:0], f[16:0] -> p90, p180, p270, p360.
// Follows the document: 4 duplicated stages of CDS + FDS, 16 CDCs, one HDC
// and 16 DCVs, a fine step of 4 ps per stage (16 ps for the line).  This
// design's choices: T_CDC = 128 ps, T_HDC = 64 ps, T_INTR = 150 ps (not
// given), chosen so that the delay is linear in the code.
module dcdl #(
  parameter real T_INTR = 150.0,   // ps, multiplexer + minimum FDS
  parameter real T_CDC  = 128.0,   // ps per coarse-delay cell
  parameter real T_HDC  = 64.0,    // ps, hysteresis delay cell
  parameter real T_DCV  = 4.0      // ps per varactor (FDS resolution)
) (
  input  logic        clk_in,
  input  logic [15:0] c,
  input  logic [16:0] f,
  output logic        p90,
  output logic        p180,
  output logic        p270,
  output logic        p360
);
  // stage delay in ps
  `define DCDL_STAGE (T_INTR + T_CDC * $countones(c) + T_HDC * f[0] + T_DCV * $countones(f[16:1]))
  logic s1 = 1'b0, s2 = 1'b0, s3 = 1'b0, s4 = 1'b0;
  always @(clk_in) s1 <= #(`DCDL_STAGE) clk_in;
  always @(s1)     s2 <= #(`DCDL_STAGE) s1;
  always @(s2)     s3 <= #(`DCDL_STAGE) s2;
  always @(s3)     s4 <= #(`DCDL_STAGE) s3;
  `undef DCDL_STAGE
  assign p90 = s1;
  assign p180 = s2;
  assign p270 = s3;
  assign p360 = s4;
endmodule
