`timescale 1ps/1fs
// tb_clockgen_top: end-to-end test of the whole clock generator set at its
// default sizes (no parameter overrides), all generators running at once:
//  - stand-alone DCO: code 0 and a mid code, period against the cell sums;
//  - ADPLL: 40 MHz reference, N = 2, M = 10 -> 200 MHz; lock within 29
//    Ref_N cycles and 10 DCO edges per Ref_N cycle once locked;
//  - spread-spectrum generator: 27 MHz in, M = 1, N = 2 -> 54 MHz, then
//    spreading with SEC_SEL = 2, STEP = 2; edge count stays 2 per cycle;
//  - DDR phase shift: 300 MHz, lock within 13 cycles, P360 one period
//    after the clock, read adjust +2 = +32 ps on the strobe;
//  - SMD: 400 MHz, 30 % duty, lock within 10 cycles, phase error < 25 ps.
// Each mechanism is counted (TDC coarse lock, PFD flips, speed-ups, LOAD,
// auto-adjust compensations, spread steps, DLL lock, DCPS adjustment,
// SMD blocking and FTC steps) and must have happened.
module tb_clockgen_top;
  logic rst_n = 1'b1;
  logic dco_enable = 1'b0;
  logic [14:0] dco_code = '0;
  logic dco_clk;
  logic pll_ref_clk = 1'b0;
  logic [2:0] pll_n = 3'd2;
  logic [6:0] pll_m = 7'd10;
  logic pll_clk, pll_avg_valid, pll_locked, pll_flip, pll_speedup;
  logic [13:0] pll_code, pll_avg_code;
  logic [5:0] pll_tdc_code;
  logic ss_fin = 1'b0;
  logic [3:0] ss_m = 4'd1, ss_n = 4'd2;
  logic ss_mode = 1'b0;
  logic [2:0] ss_sec_sel = 3'd2, ss_step = 3'd2;
  logic ss_clk, ss_locked, ss_load, ss_comp, ss_valid;
  logic [17:0] ss_code;
  logic ddr_clk = 1'b0, ddr_write = 1'b0;
  logic signed [3:0] ddr_r_adj = 0, ddr_w_adj = 0;
  logic ddr_dqs, ddr_p90, ddr_p180, ddr_p270, ddr_p360, ddr_dqs_out, ddr_locked, ddr_adjusted;
  logic [8:0] ddr_ctrl;
  logic smd_clk_in = 1'b0;
  logic smd_clk_out, smd_locked, smd_blk, smd_ftc_step;

  int checks = 0, failures = 0;
  int n_flip = 0, n_speedup = 0, n_load = 0, n_comp = 0, n_ss = 0, n_adj = 0, n_ftc = 0;

  assign ddr_dqs = ddr_clk;
  clockgen_top dut (.*);

  initial forever #12500.0 pll_ref_clk = ~pll_ref_clk;            // 40 MHz
  initial forever #(1.0e6 / 27.0 / 2.0) ss_fin = ~ss_fin;          // 27 MHz
  initial forever #(3333.0 / 2.0) ddr_clk = ~ddr_clk;              // 300 MHz
  initial forever begin smd_clk_in = 1'b1; #750.0; smd_clk_in = 1'b0; #1750.0; end  // 400 MHz, 30 %

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge dut.pll_ref_n) if (rst_n) begin
    if (pll_flip) n_flip++;
    if (pll_speedup) n_speedup++;
  end
  always @(posedge dut.ss_fin_m) if (rst_n) begin
    if (ss_load) n_load++;
    if (ss_comp) n_comp++;
    if (ss_valid) n_ss++;
  end
  always @(posedge ddr_clk) if (rst_n && ddr_adjusted) n_adj++;
  always @(posedge dut.u_smd.ib_out) if (rst_n && smd_ftc_step) n_ftc++;

  int pll_edges = 0, ss_edges = 0;
  always @(posedge pll_clk) pll_edges++;
  always @(posedge ss_clk) ss_edges++;

  initial begin
    #60000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stand-alone DCO: period = 2 * (T_INTR + coarse*T_COARSE + fine sums)
  task automatic dco_test();
    realtime t0, t1, expect_p;
    dco_enable = 1'b1;
    dco_code = 15'd0;
    repeat (3) @(posedge dco_clk);
    @(posedge dco_clk) t0 = $realtime;
    @(posedge dco_clk) t1 = $realtime;
    check(t1 - t0 > 1049.0 && t1 - t0 < 1051.0, "DCO period at code 0 (2 x 525 ps)");
    // coarse 10, 1st fine 2, 2nd fine 16, 3rd fine 4
    dco_code = {5'd10, 2'd2, 5'd16, 3'd4};
    repeat (3) @(posedge dco_clk);
    @(posedge dco_clk) t0 = $realtime;
    @(posedge dco_clk) t1 = $realtime;
    expect_p = 2.0 * (525.0 + 10 * 120.21 + 2 * 98.91 + 16 * 3.74 + 4 * 1.47);
    $display("DCO: period %0.2f ps, expected %0.2f ps", t1 - t0, expect_p);
    check(t1 - t0 > expect_p - 0.1 && t1 - t0 < expect_p + 0.1, "DCO period at a mid code");
  endtask

  task automatic pll_test();
    int cyc, e0;
    cyc = 0;
    while (!pll_locked && cyc < 100) begin @(posedge dut.pll_ref_n); cyc++; end
    $display("ADPLL: tdc code %0d, locked after %0d Ref_N cycles", pll_tdc_code, cyc);
    check(pll_locked && cyc <= 29, "ADPLL lock within 29 cycles");
    repeat (40) @(posedge dut.pll_ref_n);
    e0 = pll_edges;
    repeat (64) @(posedge dut.pll_ref_n);
    $display("ADPLL: %0d DCO edges in 64 Ref_N cycles (expect 640)", pll_edges - e0);
    check(pll_edges - e0 >= 630 && pll_edges - e0 <= 650, "ADPLL at 10 x Ref_N");
    repeat (200) @(posedge dut.pll_ref_n);
    check(pll_avg_valid, "code averager produced an average");
  endtask

  task automatic ss_test();
    int cyc, e0;
    cyc = 0;
    while (!ss_locked && cyc < 200) begin @(posedge dut.ss_fin_m); cyc++; end
    $display("SSCG: locked after %0d FIN_M cycles", cyc);
    check(ss_locked && cyc <= 80, "SSCG lock within 80 cycles");
    repeat (20) @(posedge dut.ss_fin_m);
    ss_mode = 1'b1;
    repeat (8) @(posedge dut.ss_fin_m);
    e0 = ss_edges;
    repeat (128) @(posedge dut.ss_fin_m);
    $display("SSCG: %0d output edges in 128 FIN_M cycles while spreading (expect 256)", ss_edges - e0);
    check(ss_edges - e0 >= 252 && ss_edges - e0 <= 260, "SSCG keeps N x FIN_M while spreading");
  endtask

  task automatic ddr_test();
    int cyc;
    realtime t0, d;
    cyc = 0;
    while (!ddr_locked && cyc < 50) begin @(posedge ddr_clk); cyc++; @(negedge ddr_clk); end
    $display("DDR: DLL locked after %0d cycles, DLL_CTRL %0d", cyc, ddr_ctrl);
    check(cyc <= 13, "DLL lock within 13 cycles");
    repeat (10) @(posedge ddr_clk);
    @(posedge ddr_clk) t0 = $realtime;
    @(posedge ddr_p90) d = $realtime - t0;
    check(d > 833.25 - 20.0 && d < 833.25 + 12.0, "P90 a quarter period after the clock");
    ddr_r_adj = 4'sd2;
    repeat (4) @(posedge ddr_clk);
    @(posedge ddr_clk) t0 = $realtime;
    @(posedge ddr_dqs_out) d = $realtime - t0;
    $display("DDR: strobe delay with adjust +2: %0.1f ps", d);
    check(d > 833.25 + 32.0 - 20.0 && d < 833.25 + 32.0 + 12.0, "DCPS read adjust +32 ps");
  endtask

  task automatic smd_test();
    int cyc;
    realtime t0, d;
    cyc = 0;
    while (!smd_locked && cyc < 40) begin @(posedge dut.u_smd.ib_out); cyc++; #1; end
    $display("SMD: locked after %0d cycles, BLK=%0b", cyc, smd_blk);
    check(cyc <= 10 && !smd_blk, "SMD lock within 10 cycles with the FDL blocked");
    repeat (8) @(posedge smd_clk_in);
    @(posedge smd_clk_in) t0 = $realtime;
    @(posedge smd_clk_out) d = $realtime - t0;
    if (d > 1250.0) d = d - 2500.0;
    $display("SMD: phase error %0.1f ps", d);
    check(d < 25.0 && d > -25.0, "SMD phase error within 25 ps");
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #100000 rst_n = 1'b1;
    fork
      dco_test();
      pll_test();
      ss_test();
      ddr_test();
      smd_test();
    join
    $display("mechanisms: flips=%0d speedups=%0d loads=%0d compensations=%0d spread steps=%0d dcps adjust=%0d ftc steps=%0d",
             n_flip, n_speedup, n_load, n_comp, n_ss, n_adj, n_ftc);
    check(n_flip > 0, "PFD polarity flips");
    check(n_load > 0, "SSCG baseline LOAD");
    check(n_comp > 0, "DCO auto-adjust compensation");
    check(n_ss > 0, "RDTM spread steps");
    check(n_adj > 0, "DCPS adjustment");
    check(n_ftc > 0, "SMD FTC steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
