`timescale 1ps/1fs
// tb_ddr_phase_shift: end-to-end test of the ADDLL, phase controller and
// DCPS.  For 200, 300 and 400 MHz clocks it checks the TDC code against
// the period, lock within 13 input cycles, quarter-period spacing of P90
// to P360 (within one 16 ps line step plus a margin), and the DQS delay of
// 90 degrees + adj * 16 ps for read and write adjustments.  The strobe is
// a copy of the clock.
module tb_ddr_phase_shift;
  logic clk_in = 1'b0, rst_n = 1'b1;
  logic signed [3:0] r_adj = 0, w_adj = 0;
  logic write = 1'b0;
  logic p90, p180, p270, p360, dqs_out, locked, adjusted, track_up, track_dn;
  logic [8:0] dll_ctrl, dcps_code;
  logic [3:0] tdc_code;
  logic dqs_in;
  int checks = 0, failures = 0, n_track = 0, n_adj = 0;
  realtime per = 5000.0;

  assign dqs_in = clk_in;
  ddr_phase_shift dut (.*);

  initial forever begin #(per/2.0) clk_in = ~clk_in; end
  always @(posedge clk_in) if (rst_n) begin
    if (track_up || track_dn) n_track++;
    if (adjusted) n_adj++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // delay from a clock rising edge to the next rising edge of sig
  realtime t_clk;
  always @(posedge clk_in) t_clk = $realtime;
  task automatic delay_of(input int which, output realtime d);
    realtime t0;
    @(posedge clk_in); t0 = $realtime;
    case (which)
      0: @(posedge p90);
      1: @(posedge p180);
      2: @(posedge p270);
      3: @(posedge p360);
      default: @(posedge dqs_out);
    endcase
    d = $realtime - t0;
    if (which == 3 && d < per / 2.0) d = d + per;  // edge of the previous cycle
  endtask

  task automatic run_case(input realtime p);
    int cyc, exp_tdc;
    realtime d;
    per = p;
    rst_n = 1'b0; #(3*p);
    @(negedge clk_in) rst_n = 1'b1;
    cyc = 0;
    // locked is sampled half a cycle after each counted rising edge
    while (!locked && cyc < 50) begin @(posedge clk_in); cyc++; @(negedge clk_in); end
    exp_tdc = int'((p - 600.0) / 512.0 - 0.5);
    $display("%0.0f MHz: locked after %0d cycles, tdc=%0d (exp %0d), ctrl=%0d",
             1.0e6/p, cyc, tdc_code, exp_tdc, dll_ctrl);
    check(cyc <= 13, "lock within 13 cycles");
    check(int'(tdc_code) == exp_tdc, "TDC code");
    repeat (10) @(posedge clk_in);
    for (int k = 0; k < 4; k++) begin
      delay_of(k, d);
      $display("  P%0d delay %0.1f ps (ideal %0.1f)", 90*(k+1), d, p*(k+1)/4.0);
      check(d > p*(k+1)/4.0 - 16.0*(k+1)/4.0 - 12.0 && d < p*(k+1)/4.0 + 12.0, "phase spacing");
    end
    // read adjust +3 (48 ps later), write adjust -2 (32 ps earlier)
    r_adj = 4'sd3; w_adj = -4'sd2; write = 1'b0;
    repeat (4) @(posedge clk_in);
    delay_of(4, d);
    check(d > p/4.0 + 48.0 - 20.0 && d < p/4.0 + 48.0 + 12.0, "read adjust +48 ps");
    $display("  DQS read  delay %0.1f ps", d);
    write = 1'b1;
    repeat (4) @(posedge clk_in);
    delay_of(4, d);
    check(d > p/4.0 - 32.0 - 20.0 && d < p/4.0 - 32.0 + 12.0, "write adjust -32 ps");
    $display("  DQS write delay %0.1f ps", d);
    r_adj = 0; w_adj = 0; write = 1'b0;
    check(locked, "still locked");
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #10;
    run_case(5000.0);
    run_case(3333.0);
    run_case(2500.0);
    $display("tracking moves=%0d adjusted cycles=%0d", n_track, n_adj);
    check(n_track > 0 && n_adj > 0, "tracking and adjustment exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
