`timescale 1ps/1fs
// tb_tdc_period_calc: exhaustive check of the TDC period arithmetic.  For
// every thermometer count of the 4 large and 8 small flip-flops and every
// M from 1 to 127 it compares Tr = (8*L1 + L2)*2, the overflow flag and
// the TDC code (Tr >> log2 M for powers of two, otherwise the mean of
// Tr >> MS and Tr >> (MS+1), MS = position of the leading one of M) with
// values computed here.
module tb_tdc_period_calc;
  logic [3:0] q1;
  logic [7:0] q2;
  logic [6:0] m;
  logic [2:0] l1_sel;
  logic [3:0] l2_sel;
  logic [6:0] tr;
  logic [5:0] tdc_code;
  logic ovf;
  int checks = 0, failures = 0;

  tdc_period_calc dut (.*);

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a <= 4; a++)
      for (int b = 0; b <= 8; b++)
        for (int mm = 1; mm < 128; mm++) begin
          int t, ms, e;
          q1 = 4'((1 << a) - 1);
          q2 = 8'((1 << b) - 1);
          m = 7'(mm);
          #1;
          t = (8 * a + b) * 2;
          ms = 0;
          for (int i = 0; i < 7; i++) if (mm & (1 << i)) ms = i;
          if ((mm & (mm - 1)) == 0) e = t >> ms;
          else e = ((t >> ms) + (t >> (ms + 1))) / 2;
          if (e > 63) e = 63;
          checks++;
          if (int'(tr) != t || int'(tdc_code) != e || ovf != (a == 4 && b == 8)) begin
            failures++;
            if (failures < 10) $display("FAIL L1=%0d L2=%0d M=%0d: tr=%0d code=%0d (exp %0d %0d)", a, b, mm, tr, tdc_code, t, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
