`timescale 1ps/1fs
// tb_adpll_tdc: end-to-end test of the TDC-based ADPLL.
// For each case the reference runs at a known frequency; the test checks
// that the TDC finishes in two Ref_N cycles, that the controller reaches
// tracking within 2 + 27 Ref_N cycles, that the TDC code equals the value
// worked out from the reference period and the cell delay, and that the
// locked DCO produces M edges per Ref_N cycle on average (64 cycles).  It also
// counts PFD polarity flips and speed-up events; a -1 % reference step
// while tracking must be followed (this exercises the speed-up).
module tb_adpll_tdc;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic [2:0] n_div;
  logic [6:0] m_div;
  logic dco_clk, ref_n, locked, flip, speedup;
  logic [13:0] dco_code;
  logic [5:0] tdc_code;
  logic [6:0] tdc_period;
  clkgen_pkg::lock_state_e state;
  int checks = 0, failures = 0;
  int n_flip = 0, n_speedup = 0;
  realtime ref_per;

  adpll_tdc dut (.*);

  initial forever begin #(ref_per/2.0) ref_clk = ~ref_clk; end

  always @(posedge ref_n) if (rst_n) begin
    if (flip) n_flip++;
    if (speedup) n_speedup++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DCO rising edges over 64 Ref_N cycles: a phase-locked loop gives
  // 64*M of them (a bounded phase error changes the count by at most M)
  int dco_edges = 0;
  always @(posedge dco_clk) dco_edges++;
  task automatic dco_count(output int n);
    int e0;
    @(posedge ref_n); e0 = dco_edges;
    repeat (64) @(posedge ref_n);
    n = dco_edges - e0;
  endtask

  task automatic run_case(input realtime per, input int n, input int m, input int exp_tdc);
    int cyc, tdc_cyc, n_edges;
    ref_per = per; n_div = 3'(n); m_div = 7'(m);
    rst_n = 1'b0;
    #(4*per);
    @(negedge ref_clk) rst_n = 1'b1;
    cyc = 0; tdc_cyc = -1;
    while (!locked && cyc < 200) begin
      @(posedge ref_n); cyc++;
      if (tdc_cyc < 0 && dut.tdc_done) tdc_cyc = cyc;
    end
    $display("case ref=%0.1f MHz N=%0d M=%0d: tdc done after %0d cycles, code=%0d, locked after %0d cycles",
             1.0e6/per, n, m, tdc_cyc, tdc_code, cyc);
    // two measuring cycles; the code is loaded at the third Ref_N edge
    check(tdc_cyc == 3, "TDC takes two Ref_N cycles");
    check(int'(tdc_code) == exp_tdc, $sformatf("tdc_code %0d expected %0d", tdc_code, exp_tdc));
    check(locked && cyc <= 29, $sformatf("lock in %0d cycles (<= 29)", cyc));
    repeat (40) @(posedge ref_n);
    dco_count(n_edges);
    $display("  %0d DCO edges in 64 Ref_N cycles, expected %0d", n_edges, 64 * m);
    check(n_edges >= 63 * m && n_edges <= 65 * m, "DCO runs at M times Ref_N");
    check(locked, "still tracking");
  endtask

  initial begin
    #50ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ref_per = 10000.0; n_div = 3'd1; m_div = 7'd2;
    // 100 MHz, M=2: half period 5000 ps = 30.3 cells: L1=3, L2=6,
    // Tr=(24+6)*2=60, tdc=60/2=30
    run_case(10000.0, 1, 2, 30);
    // 40 MHz / N=2 = 20 MHz Ref_N, M=10 (200 MHz): the half period (25 ns)
    // is beyond the 40-cell range, L1=4 L2=8, Tr=80, M=10 -> (10+5)/2 = 7
    run_case(25000.0, 2, 10, 7);
    // 50 MHz, M=6: half period 10 ns = 60.6 cells -> saturated Tr=80,
    // MS=2, ML=3: (20+10)/2 = 15
    run_case(20000.0, 1, 6, 15);
    // reference frequency step of -1 % while tracking: the loop must follow,
    // which needs runs of same-direction moves (speed-up)
    begin
      int n_edges, su0;
      su0 = n_speedup;
      ref_per = 20200.0;
      repeat (400) @(posedge ref_n);
      dco_count(n_edges);
      $display("after -1 %% step: %0d DCO edges in 64 cycles, speed-ups %0d", n_edges, n_speedup - su0);
      check(n_edges >= 63 * 6 && n_edges <= 65 * 6, "follows a reference frequency step");
    end
    check(n_flip > 0, "polarity flips seen");
    check(n_speedup > 0, "phase-tracking speed-up seen");
    $display("flips=%0d speedups=%0d", n_flip, n_speedup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
