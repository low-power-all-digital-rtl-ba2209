`timescale 1ps/1fs
// tb_adsscg: end-to-end test of the spread-spectrum clock generator.
// Case: FIN = 27 MHz, M = 1, N = 2 (54 MHz output).  Checks: the loop locks
// (baseline loaded) within 80 FIN_M cycles; in normal mode the DCO gives N
// edges per FIN_M cycle over 64 cycles; in spread mode (SEC_SEL = 1: 16
// sub-sections, STEP = 3: S = 16) the modulation offset stays within
// +/-Q*S, neighbouring sub-sections differ by at most (Q+1)*S, the DCO
// period spreads to both sides of the centre period, and the output still
// gives N edges per FIN_M cycle on average over 128 cycles (phase tracking
// holds).  It counts LOAD, flips, auto-adjust compensations and spread
// steps, and prints the measured spreading ratio.
module tb_adsscg;
  logic fin = 1'b0, rst_n = 1'b1;
  logic [3:0] m_div = 4'd1, n_div = 4'd2;
  logic mode = 1'b0;
  logic [2:0] sec_sel = 3'd1, step = 3'd3;
  logic dco_clk, fin_m, locked, flip, load, comp, ss_valid;
  logic [17:0] dco_code;
  logic signed [17:0] ss_offset;
  int checks = 0, failures = 0;
  int n_load = 0, n_flip = 0, n_comp = 0, n_ss = 0;
  realtime fin_per = 1.0e6 / 27.0;

  adsscg dut (.*);

  initial forever begin #(fin_per/2.0) fin = ~fin; end

  always @(posedge fin_m) if (rst_n) begin
    if (load) n_load++;
    if (flip) n_flip++;
    if (comp) n_comp++;
    if (ss_valid) n_ss++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int dco_edges = 0;
  realtime last_edge = 0, pmin = 1.0e9, pmax = 0;
  always @(posedge dco_clk) begin
    if (last_edge > 0) begin
      if ($realtime - last_edge < pmin) pmin = $realtime - last_edge;
      if ($realtime - last_edge > pmax) pmax = $realtime - last_edge;
    end
    last_edge = $realtime;
    dco_edges++;
  end

  task automatic count_edges(input int cycles, output int n);
    int e0;
    @(posedge fin_m); e0 = dco_edges;
    repeat (cycles) @(posedge fin_m);
    n = dco_edges - e0;
  endtask

  // modulation offset bounds and neighbour step
  int q, s;
  logic signed [17:0] last_ofs = 0;
  int max_jump = 0, ofs_max = 0, ofs_min = 0;
  always @(posedge fin_m) if (mode && locked) begin
    int j;
    j = int'(ss_offset) - int'(last_ofs);
    if (j < 0) j = -j;
    if (j > max_jump) max_jump = j;
    if (int'(ss_offset) > ofs_max) ofs_max = int'(ss_offset);
    if (int'(ss_offset) < ofs_min) ofs_min = int'(ss_offset);
    last_ofs = ss_offset;
  end

  initial begin
    #3000000000; $display("watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc, n;
    realtime pc, tc;
    #10 rst_n = 1'b0;
    #(3*fin_per) rst_n = 1'b1;
    cyc = 0;
    while (!locked && cyc < 200) begin @(posedge fin_m); cyc++; end
    $display("locked after %0d FIN_M cycles, code=%0d", cyc, dco_code);
    check(locked && cyc <= 80, "lock within 80 cycles");
    repeat (20) @(posedge fin_m);
    count_edges(64, n);
    $display("normal mode: %0d DCO edges in 64 FIN_M cycles", n);
    check(n >= 126 && n <= 130, "normal mode N edges per cycle");
    pmin = 1.0e9; pmax = 0;
    repeat (8) @(posedge fin_m);
    tc = (pmin + pmax) / 2.0;
    $display("centre period %0.1f ps (min %0.1f max %0.1f)", tc, pmin, pmax);
    // spreading
    q = (8 << sec_sel) / 4; s = 2 << step;
    mode = 1'b1;
    repeat (4) @(posedge fin_m);
    pmin = 1.0e9; pmax = 0;
    count_edges(128, n);
    $display("spread mode: %0d DCO edges in 128 FIN_M cycles, period %0.1f..%0.1f ps, SR %0.2f %%",
             n, pmin, pmax, (pmax - pmin) / 2.0 / tc * 100.0);
    check(n >= 252 && n <= 260, "spread mode keeps N edges per cycle");
    check(pmax > tc + 0.5 * q * s * 1.1 && pmin < tc - 0.5 * q * s * 1.1, "period spreads both ways");
    check(ofs_max == q * s && ofs_min == -q * s, "offset reaches +/-Q*S");
    check(max_jump <= (q + 1) * s, "neighbour change at most (Q+1)*S");
    check(locked, "still locked");
    mode = 1'b0;
    repeat (40) @(posedge fin_m);
    count_edges(64, n);
    check(n >= 126 && n <= 130, "back to normal mode");
    $display("loads=%0d flips=%0d compensations=%0d spread steps=%0d max jump=%0d", n_load, n_flip, n_comp, n_ss, max_jump);
    check(n_load > 0 && n_comp > 0 && n_ss > 0, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
