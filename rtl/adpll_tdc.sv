`timescale 1ps/1fs
// adpll_tdc: TDC-based fast lock-in all-digital PLL.
//
// Ref. CLK -> pre-divider (N) -> Ref_N.  The DCO output is divided by M
// (DCO_M) and compared with Ref_N in a bang-bang PFD.  After reset the
// 2-level flash TDC measures Ref_N in two reference cycles; the controller
// turns the measured period into a coarse DCO code (coarse lock) and then
// runs the binary search on the 14-bit DCO code until the step is 1 (fine
// lock, at most 27 reference cycles), after which it tracks phase.  The
// output is DCO CLK = M/N times the reference frequency.
// Interface: ref_clk, rst_n (asynchronous, active low, also restarts the
// TDC), n_div[2:0], m_div[6:0]; dco_clk, the DCO code, the TDC code, the
// controller state and locked.  All control logic runs on Ref_N.
// The block set and signal widths (N[2:0], M[6:0], TDC code[5:0], DCO
// code[13:0]) follow the ADPLL architecture; the DCO split into 4 coarse
// and 10 fine bits, the 165 ps coarse cell (equal to the TDC cell) and the
// binary-weighted fine stages (T/4, T/128, T/1024, so that the 14-bit code
// is monotonic for the binary search) are this design's choices.
module adpll_tdc #(
  parameter real T_CELL = 165.0     // ps, TDC small cell = DCO coarse cell
) (
  input  logic        ref_clk,
  input  logic        rst_n,
  input  logic [2:0]  n_div,
  input  logic [6:0]  m_div,
  output logic        dco_clk,
  output logic        ref_n,
  output logic [13:0] dco_code,
  output logic [5:0]  tdc_code,
  output logic [6:0]  tdc_period,       // Tr, reference period in cells
  output clkgen_pkg::lock_state_e state,
  output logic        locked,
  output logic        flip,
  output logic        speedup
);

  logic       dco_m;
  logic       realign, restart;
  logic       lead, lag;
  logic [3:0] q1;
  logic [7:0] q2;
  logic       tdc_done;
  logic       tdc_ovf;
  logic [2:0] l1_sel;
  logic [3:0] l2_sel;

  clk_divider #(.W(3)) u_prediv (.clk_in(ref_clk), .rst_n, .div(n_div), .restart(1'b0), .clk_out(ref_n));
  clk_divider #(.W(7)) u_dcodiv (.clk_in(dco_clk), .rst_n, .div(m_div), .restart, .clk_out(dco_m));

  // frequency acquisition: restart the DCO and its divider at each Ref_N edge
  assign restart = ref_n & realign;

  bb_pfd u_pfd (.rst_n, .ref_clk(ref_n), .fb_clk(dco_m), .realign, .lead, .lag);

  flash_tdc_2level #(.T_CELL(T_CELL)) u_tdc (
    .start_n(rst_n), .ref_n, .q1, .q2, .done(tdc_done)
  );

  tdc_period_calc #(.MW(7)) u_pcalc (
    .q1, .q2, .m(m_div), .l1_sel, .l2_sel, .tr(tdc_period), .tdc_code, .ovf(tdc_ovf)
  );

  adpll_controller #(.W(14), .CW(4)) u_ctrl (
    .clk(ref_n), .rst_n, .use_tdc(1'b1), .tdc_done, .tdc_code, .tdc_ovf, .lead, .lag,
    .dco_code, .state, .locked, .realign, .flip, .speedup
  );

  dco #(.CW(4), .F1W(2), .F2W(5), .F3W(3), .T_COARSE(T_CELL),
        .T_F1(T_CELL / 4.0), .T_F2(T_CELL / 128.0), .T_F3(T_CELL / 1024.0)) u_dco (
    .enable(rst_n), .code(dco_code), .restart, .clk_out(dco_clk)
  );

endmodule
