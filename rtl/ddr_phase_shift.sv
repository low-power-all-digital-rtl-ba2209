`timescale 1ps/1fs
// ddr_phase_shift: tunable DQS phase-shift scheme for a DDR memory
// controller (ADDLL + phase controller + DCPS).
//
// The ADDLL locks to the memory clock and gives four phases and the
// quarter-period code DLL_CTRL.  The phase controller adds the read or
// write adjustment (16 ps steps) and the DCPS delays the strobe by
// 90 degrees plus that adjustment, so the strobe can be placed in the
// middle of the data eye when DQS leads or lags DQ.
// Interface: clk_in, rst_n, dqs_in, write, r_adj, w_adj -> p90..p360,
// dqs_out, dll_ctrl, dcps_code, tdc_code, locked, status pulses.
// Follows the document: block structure, DQS_R_ADJ/DQS_W_ADJ, 200-400 MHz.
// This design's choice: the adjust format (see phase_controller).
module ddr_phase_shift (
  input  logic              clk_in,
  input  logic              rst_n,
  input  logic              dqs_in,
  input  logic              write,
  input  logic signed [3:0] r_adj,
  input  logic signed [3:0] w_adj,
  output logic              p90,
  output logic              p180,
  output logic              p270,
  output logic              p360,
  output logic              dqs_out,
  output logic [8:0]        dll_ctrl,
  output logic [8:0]        dcps_code,
  output logic [3:0]        tdc_code,
  output logic              locked,
  output logic              adjusted,
  output logic              track_up,
  output logic              track_dn
);
  addll u_dll (.clk_in, .rst_n, .p90, .p180, .p270, .p360, .dll_ctrl, .tdc_code,
               .locked, .track_up, .track_dn);
  phase_controller u_pc (.clk(clk_in), .rst_n, .write, .r_adj, .w_adj, .dll_ctrl,
                         .dcps_code, .adjusted);
  dcps u_dcps (.dqs_in, .code(dcps_code), .dqs_out);
endmodule
