`timescale 1ps/1fs
// adsscg: all-digital spread-spectrum clock generator.
//
// FIN -> divider M -> FIN_M (controller clock).  DCO -> divider N -> DCO_N.
// A bang-bang PFD compares FIN_M and DCO_N.  The controller is the loop
// filter (search step S_N, LOAD, BASELINE CODE), the RDTM modulation
// controller (+/-_SS, S_SS) and the DCO code generator with the
// auto-adjustment for monotonic delay.  The 18-bit code drives a cascaded
// DCO with 8 coarse bits and 10 fine bits (2 + 5 + 3).
// MODE = 0: normal clock generation, the output locks to N/M times FIN.
// MODE = 1 (after lock): the code is modulated around the stored centre
// code with COUNT = 8 << SEC_SEL sub-sections of step S = 2 << STEP, and
// the loop applies a tracking step after every group of four
// sub-sections.  Spreading ratio SR = S * RES * COUNT / 2 / Tc (RES =
// finest DCO step), as in eq. (4.3).
// Interface: fin, rst_n (asynchronous, active low), m_div, n_div, mode,
// sec_sel, step -> dco_clk, dco_code, locked, status pulses for the test
// bench (flip, load, comp, ss_valid).  All control runs on FIN_M.
// Follows the document: block structure and signal names, C=8 F=10 X=4
// Y=32 Z=8, Table 4.2 delay steps, compensation codes 320/48/4.  This
// design's choices: divider widths, the intrinsic DCO delay, realign
// acquisition, the RDTM level order and the SEC_SEL/STEP decoding.
module adsscg #(
  parameter int unsigned DW = 4,         // divider ratio width
  parameter real T_INTR   = 2638.0,      // ps, shortest DCO half period path
  parameter real T_COARSE = 242.41,      // ps, Table 4.2 coarse step
  parameter real T_F1     = 102.82,      // ps, 1st fine step
  parameter real T_F2     = 3.92,        // ps, 2nd fine step
  parameter real T_F3     = 1.1          // ps, 3rd fine step
) (
  input  logic          fin,
  input  logic          rst_n,
  input  logic [DW-1:0] m_div,
  input  logic [DW-1:0] n_div,
  input  logic          mode,
  input  logic [2:0]    sec_sel,
  input  logic [2:0]    step,
  output logic          dco_clk,
  output logic          fin_m,
  output logic [17:0]   dco_code,
  output logic          locked,
  output logic          flip,
  output logic          load,
  output logic          comp,
  output logic          ss_valid,
  output logic signed [17:0] ss_offset
);

  logic dco_n, lead, lag, realign, restart;
  logic [15:0] s_n, ss_step;
  logic sn_valid, sn_add, ss_add, group_end;
  logic [17:0] baseline, center;

  clk_divider #(.W(DW)) u_mdiv (.clk_in(fin), .rst_n, .div(m_div), .restart(1'b0), .clk_out(fin_m));
  clk_divider #(.W(DW)) u_ndiv (.clk_in(dco_clk), .rst_n, .div(n_div), .restart, .clk_out(dco_n));

  assign restart = fin_m & realign;

  bb_pfd u_pfd (.rst_n, .ref_clk(fin_m), .fb_clk(dco_n), .realign, .lead, .lag);

  sscg_loop_filter #(.W(18)) u_lf (
    .clk(fin_m), .rst_n, .lead, .lag, .mode, .group_end, .code(dco_code),
    .s_n, .sn_valid, .sn_add, .load, .baseline, .center, .realign, .locked, .flip);

  rdtm_modulator u_mod (
    .clk(fin_m), .rst_n, .enable(mode & locked), .sec_sel, .step,
    .ss_valid, .ss_add, .ss_step, .group_end, .offset(ss_offset));

  dco_code_gen #(.CW(8), .F1W(2), .F2W(5), .F3W(3)) u_dcg (
    .clk(fin_m), .rst_n, .load, .baseline, .sn_valid, .sn_add, .s_n,
    .ss_valid, .ss_add, .ss_step, .code(dco_code), .comp);

  dco #(.CW(8), .F1W(2), .F2W(5), .F3W(3), .T_INTR(T_INTR), .T_COARSE(T_COARSE),
        .T_F1(T_F1), .T_F2(T_F2), .T_F3(T_F3)) u_dco (
    .enable(rst_n), .code(dco_code), .restart, .clk_out(dco_clk));

endmodule
