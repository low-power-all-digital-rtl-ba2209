`timescale 1ps/1fs
// tdc_period_calc: period calculator of the 2-level flash TDC.
//
// Converts the two thermometer codes to binary (L1_SEL = ones in q1,
// L2_SEL = ones in q2), forms the reference period in small-cell units,
//   Tr = (L1_SEL*8 + L2_SEL) * 2        (the TDC measured half a period),
// and divides it by the DCO divider ratio M without a divider:
//   M a power of two:  Tr >> log2(M)
//   otherwise:         MS = position of the MSB of M, ML = MS+1,
//                      tdc_code = ((Tr >> MS) + (Tr >> ML)) / 2
// (for M = 6: MS = 2, ML = 3, Tr = 36 gives (9 + 4)/2 = 6).  The result is
// saturated to the 6-bit TDC code.  ovf flags a measurement that filled
// every flip-flop (half period of 40 cells or more).  Combinational.
// The equation, the shift-and-average approximation and the 6-bit code
// width follow the ADPLL description; saturation is this design's choice.
module tdc_period_calc #(
  parameter int unsigned MW = 7          // DCO divider ratio width (M[6:0])
) (
  input  logic [3:0]    q1,
  input  logic [7:0]    q2,
  input  logic [MW-1:0] m,
  output logic [2:0]    l1_sel,
  output logic [3:0]    l2_sel,
  output logic [6:0]    tr,              // period in small-cell units
  output logic [5:0]    tdc_code,
  output logic          ovf              // every flip-flop set: out of range
);

  int unsigned ms;
  logic [6:0]  ts, tl, avg;

  always_comb begin
    ovf    = (&q1) & (&q2);
    l1_sel = 3'($countones(q1));
    l2_sel = 4'($countones(q2));
    tr     = 7'((32'(l1_sel) * 8 + 32'(l2_sel)) * 2);

    ms = 0;
    for (int i = 0; i < int'(MW); i++) if (m[i]) ms = i;

    ts  = tr >> ms;
    tl  = tr >> (ms + 1);
    avg = 7'((32'(ts) + 32'(tl)) >> 1);
    if (m == '0)                  tdc_code = 6'h3f;          // not a valid ratio
    else if ((m & (m - 1)) == '0) tdc_code = (ts > 7'd63) ? 6'h3f : ts[5:0];
    else                          tdc_code = (avg > 7'd63) ? 6'h3f : avg[5:0];
  end

endmodule
