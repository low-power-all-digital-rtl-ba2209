`timescale 1ps/1fs
// tb_adsmd: end-to-end test of the all-digital SMD.  For 200 MHz / 50 %,
// 300 MHz / 20 % and 400 MHz / 80 % input clocks it checks: BLK goes low
// at the second IB_OUT rising edge, the mirror point equals the number of
// FDL cells that fit into Tck - (Td1+Td2+Td3+Td4), lock within 10 cycles,
// the output edge within 25 ps of the input edge after lock (one FTC
// step of 24 ps plus margin), and the output duty cycle equals the input
// duty cycle.  It counts FTC changes.
module tb_adsmd;
  logic clk_in = 1'b0, rst_n = 1'b1;
  logic clk_out, locked, blk, ftc_step;
  logic [2:0] ftc;
  logic [6:0] mirror_k;
  int checks = 0, failures = 0, n_ftc = 0;
  realtime per = 5000.0, duty = 0.5;

  adsmd dut (.*);

  initial forever begin
    clk_in = 1'b1; #(per*duty); clk_in = 1'b0; #(per*(1.0-duty));
  end
  always @(posedge dut.ib_out) if (rst_n && ftc_step) n_ftc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  realtime t_in, t_out, t_out_f;
  always @(posedge clk_in) t_in = $realtime;
  always @(posedge clk_out) t_out = $realtime;
  always @(negedge clk_out) t_out_f = $realtime;

  task automatic run_case(input realtime p, input realtime dc);
    int cyc, blk_cyc, exp_k;
    realtime err, hi;
    per = p; duty = dc;
    rst_n = 1'b0; #(3*p);
    @(negedge clk_in) rst_n = 1'b1;
    cyc = 0; blk_cyc = -1;
    while (!locked && cyc < 40) begin
      @(posedge dut.ib_out); cyc++;
      #1;
      if (blk_cyc < 0 && !blk) blk_cyc = cyc;
    end
    exp_k = int'((p - 390.0) / 80.0 - 0.5);
    $display("%0.0f MHz duty %0.0f %%: BLK low at edge %0d, k=%0d (exp %0d), locked after %0d cycles, ftc=%0d",
             1.0e6/p, dc*100.0, blk_cyc, mirror_k, exp_k, cyc, ftc);
    check(blk_cyc == 2, "BLK low at the second IB_OUT edge");
    check(int'(mirror_k) == exp_k, "mirror point");
    check(cyc <= 10, "lock within 10 cycles");
    repeat (6) @(posedge clk_in);
    #(p/2.0);
    err = t_out - t_in;
    if (err > p/2.0) err = err - p;
    hi = t_out_f - t_out;
    if (hi < 0) hi = hi + p;
    $display("  phase error %0.1f ps, output high time %0.1f ps", err, hi);
    check(err < 25.0 && err > -25.0, "phase error within 25 ps");
    // an FTC step between the two edges of a pulse changes it by 24 ps
    check(hi > p*dc - 26.0 && hi < p*dc + 26.0, "duty cycle kept");
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #10;
    run_case(5000.0, 0.5);
    run_case(3333.0, 0.2);
    run_case(2500.0, 0.8);
    $display("FTC changes=%0d", n_ftc);
    check(n_ftc > 0, "fine tuning exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
