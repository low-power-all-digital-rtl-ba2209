`timescale 1ps/1fs
// dco_code_decoder: turns a binary DCO control word into the cell controls
// of the cascaded coarse/fine DCO.
//
// The word is {coarse, fine1, fine2, fine3}, MSB first.  The coarse field
// selects one of 2**CW paths of the segmental delay line (SDL): path c runs
// through c two-input AND gates.  EN[i] enables AND gate i; only the gates
// on the selected path are enabled (EN[i] = 1 for i < c) and the rest are
// held low so they do not toggle, which is the SDL power saving.  Each fine
// field is a binary count of enabled cells in its stage and is turned into a
// thermometer vector: F1ON drives the tri-state inverters of the hysteresis
// delay cells (1st stage), F2ON the long-delay DCVs (2nd stage), F3ON the
// short-delay DCVs (3rd stage).  A field of w bits controls 2**w-1 cells.
// Purely combinational.
// The field structure, EN and the stage order follow the DCO architecture;
// the binary-count-to-thermometer coding of the fine fields is this
// design's reading of the control word length (5+2+5+3 = 15 bits).
module dco_code_decoder #(
  parameter int unsigned CW  = 5,  // coarse bits: 2**CW paths, 2**CW-1 AND gates
  parameter int unsigned F1W = 2,  // 1st fine stage (HDC) bits
  parameter int unsigned F2W = 5,  // 2nd fine stage (long-delay DCV) bits
  parameter int unsigned F3W = 3,  // 3rd fine stage (short-delay DCV) bits
  localparam int unsigned W  = CW + F1W + F2W + F3W
) (
  input  logic [W-1:0]         code,
  output logic [CW-1:0]        path_sel,  // path-selection multiplexer
  output logic [2**CW-2:0]     en,        // SDL AND-gate enables
  output logic [2**F1W-2:0]    f1on,      // HDC tri-state enables
  output logic [2**F2W-2:0]    f2on,      // long-delay DCV enables
  output logic [2**F3W-2:0]    f3on       // short-delay DCV enables
);

  logic [CW-1:0]  c;
  logic [F1W-1:0] a;
  logic [F2W-1:0] b;
  logic [F3W-1:0] d;

  assign {c, a, b, d} = code;
  assign path_sel = c;

  always_comb begin
    for (int i = 0; i < 2**CW-1; i++)  en[i]   = (i < int'(c));
    for (int i = 0; i < 2**F1W-1; i++) f1on[i] = (i < int'(a));
    for (int i = 0; i < 2**F2W-1; i++) f2on[i] = (i < int'(b));
    for (int i = 0; i < 2**F3W-1; i++) f3on[i] = (i < int'(d));
  end

endmodule
