`timescale 1ps/1fs
// dll_code_decoder: binary-to-thermometer decoder of the DLL delay line.
//
// DLL_CTRL[8:0] = {coarse[3:0], fine[4:0]}.  The coarse field selects how
// many coarse-delay cells (CDCs) of a coarse-delay stage are in the path:
// C[i] = 1 for i < coarse.  The fine field drives the fine-delay stage:
// F[0] enables the hysteresis delay cell (fine[4], worth 16 varactor
// steps) and F[16:1] switch on fine[3:0] digitally controlled varactors
// as a thermometer code.  The fine delay is therefore linear in fine[4:0].
// Purely combinational.
// Follows the document: DLL_CTRL[8:0], C[15:0], F[0] for the HDC and
// F[16:1] for 16 DCVs.  This design's choice: the field split and the HDC
// weight of 16 varactor steps.
module dll_code_decoder #(
  parameter int unsigned CTRL_W = 9
) (
  input  logic [CTRL_W-1:0] ctrl,
  output logic [15:0]       c,
  output logic [16:0]       f
);
  logic [3:0] coarse, dcv;
  assign coarse = ctrl[8:5];
  assign dcv    = ctrl[3:0];
  always_comb begin
    for (int i = 0; i < 16; i++) c[i] = (i < int'(coarse));
    f[0] = ctrl[4];
    for (int i = 0; i < 16; i++) f[i+1] = (i < int'(dcv));
  end
endmodule
