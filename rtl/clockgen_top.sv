`timescale 1ps/1fs
// clockgen_top: the set of low-power all-digital clock generators.
//
// Five independent clock generators side by side, each with its own input
// clock and reset-released controls:
//  - u_dco:    the cascaded low-power DCO (segmental coarse line, HDC and
//              two varactor banks) driven directly by an external code;
//  - u_adpll:  TDC-based fast lock-in ADPLL (Ref. CLK x M / N), with a
//              max/min code averager on its DCO code;
//  - u_sscg:   spread-spectrum clock generator with RDTM;
//  - u_ddr:    ADDLL four-phase generator with the DQS phase shifter;
//  - u_smd:    all-digital synchronous mirror delay (clock deskew).
// Interface: see the port list; every block shares rst_n (asynchronous,
// active low).  Status outputs expose locked flags and event pulses.
// Follows the document: the generators and their parameters.  This
// design's choice: putting them in one top with separate clock inputs.
module clockgen_top (
  input  logic              rst_n,
  // stand-alone DCO
  input  logic              dco_enable,
  input  logic [14:0]       dco_code,
  output logic              dco_clk,
  // ADPLL
  input  logic              pll_ref_clk,
  input  logic [2:0]        pll_n,
  input  logic [6:0]        pll_m,
  output logic              pll_clk,
  output logic [13:0]       pll_code,
  output logic [13:0]       pll_avg_code,
  output logic              pll_avg_valid,
  output logic [5:0]        pll_tdc_code,
  output logic              pll_locked,
  output logic              pll_flip,
  output logic              pll_speedup,
  // spread-spectrum clock generator
  input  logic              ss_fin,
  input  logic [3:0]        ss_m,
  input  logic [3:0]        ss_n,
  input  logic              ss_mode,
  input  logic [2:0]        ss_sec_sel,
  input  logic [2:0]        ss_step,
  output logic              ss_clk,
  output logic [17:0]       ss_code,
  output logic              ss_locked,
  output logic              ss_load,
  output logic              ss_comp,
  output logic              ss_valid,
  // DDR phase shift
  input  logic              ddr_clk,
  input  logic              ddr_dqs,
  input  logic              ddr_write,
  input  logic signed [3:0] ddr_r_adj,
  input  logic signed [3:0] ddr_w_adj,
  output logic              ddr_p90,
  output logic              ddr_p180,
  output logic              ddr_p270,
  output logic              ddr_p360,
  output logic              ddr_dqs_out,
  output logic [8:0]        ddr_ctrl,
  output logic              ddr_locked,
  output logic              ddr_adjusted,
  // SMD
  input  logic              smd_clk_in,
  output logic              smd_clk_out,
  output logic              smd_locked,
  output logic              smd_blk,
  output logic              smd_ftc_step
);
  // stand-alone DCO (Chapter 2 sizing: 5 coarse bits, 10 fine bits)
  dco #(.CW(5), .F1W(2), .F2W(5), .F3W(3)) u_dco (
    .enable(dco_enable & rst_n), .code(dco_code), .restart(1'b0), .clk_out(dco_clk));

  logic pll_ref_n, pll_flip_i;
  logic [6:0] pll_tdc_period;
  clkgen_pkg::lock_state_e pll_state;
  adpll_tdc u_adpll (
    .ref_clk(pll_ref_clk), .rst_n, .n_div(pll_n), .m_div(pll_m),
    .dco_clk(pll_clk), .ref_n(pll_ref_n), .dco_code(pll_code), .tdc_code(pll_tdc_code),
    .tdc_period(pll_tdc_period), .state(pll_state), .locked(pll_locked),
    .flip(pll_flip), .speedup(pll_speedup));

  code_averager #(.W(14)) u_avg (
    .clk(pll_ref_n), .rst_n, .sample(pll_state == clkgen_pkg::ST_TRACK),
    .code(pll_code), .avg_code(pll_avg_code), .avg_valid(pll_avg_valid));

  logic ss_fin_m, ss_flip;
  logic signed [17:0] ss_offset;
  adsscg u_sscg (
    .fin(ss_fin), .rst_n, .m_div(ss_m), .n_div(ss_n), .mode(ss_mode),
    .sec_sel(ss_sec_sel), .step(ss_step), .dco_clk(ss_clk), .fin_m(ss_fin_m),
    .dco_code(ss_code), .locked(ss_locked), .flip(ss_flip), .load(ss_load),
    .comp(ss_comp), .ss_valid, .ss_offset);

  logic [8:0] ddr_dcps_code;
  logic [3:0] ddr_tdc_code;
  logic ddr_track_up, ddr_track_dn;
  ddr_phase_shift u_ddr (
    .clk_in(ddr_clk), .rst_n, .dqs_in(ddr_dqs), .write(ddr_write),
    .r_adj(ddr_r_adj), .w_adj(ddr_w_adj), .p90(ddr_p90), .p180(ddr_p180),
    .p270(ddr_p270), .p360(ddr_p360), .dqs_out(ddr_dqs_out), .dll_ctrl(ddr_ctrl),
    .dcps_code(ddr_dcps_code), .tdc_code(ddr_tdc_code), .locked(ddr_locked),
    .adjusted(ddr_adjusted), .track_up(ddr_track_up), .track_dn(ddr_track_dn));

  logic [2:0] smd_ftc;
  logic [6:0] smd_k;
  adsmd u_smd (
    .clk_in(smd_clk_in), .rst_n, .clk_out(smd_clk_out), .locked(smd_locked),
    .ftc(smd_ftc), .mirror_k(smd_k), .blk(smd_blk), .ftc_step(smd_ftc_step));
endmodule
