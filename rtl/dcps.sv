`timescale 1ps/1fs
// dcps: digitally controlled phase shifter for the DDR strobe (DQS).
//
// A decoder and a delay line identical to those of the DLL.  The strobe
// is delayed by the first stage of the line, whose delay with the DLL
// code is a quarter clock period; the phase controller offsets the code
// in steps of 4 (16 ps) to shift the strobe earlier or later than 90
// degrees.
// Interface: dqs_in, code[8:0] -> dqs_out (dqs_in delayed by one stage).
// Follows the document: DCPS = decoder + DCDL as in the ADDLL, 90-degree
// nominal shift.  This design's choice: the strobe is taken from the P90
// tap.
module dcps #(
  parameter real T_INTR = 150.0,
  parameter real T_CDC  = 128.0,
  parameter real T_HDC  = 64.0,
  parameter real T_DCV  = 4.0
) (
  input  logic       dqs_in,
  input  logic [8:0] code,
  output logic       dqs_out
);
  logic [15:0] c;
  logic [16:0] f;
  logic        p180, p270, p360;
  dll_code_decoder u_dec (.ctrl(code), .c, .f);
  dcdl #(.T_INTR(T_INTR), .T_CDC(T_CDC), .T_HDC(T_HDC), .T_DCV(T_DCV)) u_dcdl (
    .clk_in(dqs_in), .c, .f, .p90(dqs_out), .p180, .p270, .p360);
endmodule
