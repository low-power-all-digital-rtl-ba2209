`timescale 1ps/1fs
// tb_dco: checks the cascaded DCO at its default sizes (5 coarse bits,
// 2 + 5 + 3 fine bits).  For random codes the measured period must equal
// 2 * (T_INTR + coarse * T_COARSE + f1 * T_F1 + f2 * T_F2 + f3 * T_F3)
// computed here from the code fields; enable = 0 must stop the output low,
// and a restart must give a rising edge at once and the next one a full
// period later.  The lowest and highest codes give the frequency range.
module tb_dco;
  logic enable = 1'b0, restart = 1'b0, clk_out;
  logic [14:0] code = '0;
  int checks = 0, failures = 0;

  dco dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real expect_period(input logic [14:0] c);
    return 2.0 * (525.0 + 120.21 * c[14:10] + 98.91 * c[9:8] + 3.74 * c[7:3] + 1.47 * c[2:0]);
  endfunction

  task automatic measure(output realtime p);
    realtime t0;
    repeat (2) @(posedge clk_out);
    @(posedge clk_out) t0 = $realtime;
    @(posedge clk_out) p = $realtime - t0;
  endtask

  initial begin
    #100000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime p, t0, t1;
    #100 enable = 1'b1;
    code = '0;
    measure(p);
    $display("code 0: %0.2f ps (%0.1f MHz)", p, 1.0e6 / p);
    check(p > expect_period(code) - 0.01 && p < expect_period(code) + 0.01, "period at code 0");
    code = '1;
    measure(p);
    $display("code max: %0.2f ps (%0.1f MHz)", p, 1.0e6 / p);
    check(p > expect_period(code) - 0.01 && p < expect_period(code) + 0.01, "period at the largest code");
    for (int i = 0; i < 30; i++) begin
      code = 15'($urandom);
      measure(p);
      check(p > expect_period(code) - 0.01 && p < expect_period(code) + 0.01,
            $sformatf("period at code %0d: %0.2f expected %0.2f", code, p, expect_period(code)));
    end
    // restart
    code = 15'd12345;
    measure(p);
    @(posedge clk_out); #(p / 3.0);
    restart = 1'b1; t0 = $realtime;
    @(posedge clk_out) t1 = $realtime;
    check(t1 - t0 < 0.01, "rising edge at restart");
    @(posedge clk_out);
    check($realtime - t1 > p - 0.01 && $realtime - t1 < p + 0.01, "full period after restart");
    restart = 1'b0;
    // disable
    enable = 1'b0;
    #10000;
    check(clk_out == 1'b0, "stopped low when disabled");
    t0 = $realtime;
    #10000;
    check(clk_out == 1'b0, "stays low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
