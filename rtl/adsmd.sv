`timescale 1ps/1fs
// adsmd: all-digital synchronous mirror delay with fine tuning.
//
// The delay path (IB, DDL, FDL, MCC with EMDC, BDL, FTDL, CD) produces an
// output two clock cycles after each input edge once the mirror point is
// latched; the phase detector samples the output clock at each IB_OUT
// rising edge, which is Td1 after the input edge, so the sample is taken
// through a matching delay: up = output already high at the (delayed)
// input edge means the output is early.  The timing controller blocks the
// FDL (BLK) after the coarse lock and tunes the 3-bit FTC.
// Interface: clk_in, rst_n -> clk_out, locked, ftc, mirror_k, blk,
// ftc_step.
// Follows the document: block list, coarse lock in two cycles, fine lock
// by FTC every two cycles, 10-cycle lock.  This design's choice: the
// phase detector compares clk_out delayed by Td1 with IB_OUT.
module adsmd #(
  parameter int unsigned N_CELLS = 64,
  parameter real T_D1  = 100.0,
  parameter real T_D2  = 150.0,
  parameter real T_D3  = 60.0,
  parameter real T_D4  = 80.0,
  parameter real T_AND = 80.0,
  parameter real T_FT  = 24.0
) (
  input  logic       clk_in,
  input  logic       rst_n,
  output logic       clk_out,
  output logic       locked,
  output logic [2:0] ftc,
  output logic [6:0] mirror_k,
  output logic       blk,
  output logic       ftc_step
);
  logic ib_out, latch, valid, up;

  smd_delay_path #(.N_CELLS(N_CELLS), .T_D1(T_D1), .T_D2(T_D2), .T_D3(T_D3),
                   .T_D4(T_D4), .T_AND(T_AND), .T_FT(T_FT)) u_path (
    .clk_in, .rst_n, .blk, .latch, .ftc, .ib_out, .clk_out, .mirror_k, .valid);

  // phase detector: output clock through a copy of the input buffer delay,
  // sampled at IB_OUT
  logic out_d = 1'b0;
  always @(clk_out) out_d <= #(T_D1) clk_out;
  assign up = out_d;

  smd_timing_ctrl u_tc (.clk(ib_out), .rst_n, .up, .blk, .latch, .ftc, .locked, .ftc_step);
endmodule
