`timescale 1ps/1fs
// addll: all-digital delay-locked loop producing four phases.
//
// CLK_IN drives a 4-stage DCDL.  A TDC measures the period once after
// reset and gives the coarse code; the controller then binary-searches
// the fine code so that P360 lines up with the next CLK_IN edge, which
// spaces P90, P180, P270 and P360 by a quarter period each.  The phase
// detector is a flip-flop in the controller: P360 sampled at CLK_IN.
// Interface: clk_in, rst_n -> p90..p360, dll_ctrl[8:0] (also used by the
// DCPS), tdc_code, locked, tracking pulses.
// Follows the document: DCDL + decoder + TDC + controller, DLL_CTRL[8:0],
// 13-cycle lock, 200-400 MHz.  This design's choice: cell delays (see
// dcdl).
module addll #(
  parameter real T_INTR = 150.0,
  parameter real T_CDC  = 128.0,
  parameter real T_HDC  = 64.0,
  parameter real T_DCV  = 4.0
) (
  input  logic       clk_in,
  input  logic       rst_n,
  output logic       p90,
  output logic       p180,
  output logic       p270,
  output logic       p360,
  output logic [8:0] dll_ctrl,
  output logic [3:0] tdc_code,
  output logic       locked,
  output logic       track_up,
  output logic       track_dn
);
  logic        tdc_done;
  logic [15:0] c;
  logic [16:0] f;

  dll_tdc #(.T_INTR(T_INTR), .T_CDC(T_CDC)) u_tdc (.clk_in, .rst_n, .tdc_code, .done(tdc_done));

  addll_controller u_ctrl (.clk(clk_in), .rst_n, .tdc_done, .tdc_code, .pd(p360),
                           .dll_ctrl, .locked, .track_up, .track_dn);

  dll_code_decoder u_dec (.ctrl(dll_ctrl), .c, .f);

  dcdl #(.T_INTR(T_INTR), .T_CDC(T_CDC), .T_HDC(T_HDC), .T_DCV(T_DCV)) u_dcdl (
    .clk_in, .c, .f, .p90, .p180, .p270, .p360);
endmodule
