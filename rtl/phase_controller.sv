`timescale 1ps/1fs
// phase_controller: phase-adjust controller for the DQS phase shifter.
//
// Selects the read (DQS_R_ADJ) or write (DQS_W_ADJ) adjustment, a signed
// 4-bit count of 16 ps steps, and turns the DLL code into the DCPS code:
//   dcps_code = DLL_CTRL + GAIN * adj   (saturated to 0 .. 511)
// DLL_CTRL gives a quarter-period delay per stage, so the DCPS output is
// the 90-degree shift plus adj * 16 ps (GAIN 4 times the 4 ps stage step).
// The code is registered on clk (the DLL input clock); adjusted marks a
// non-zero adjustment for counting.
// Interface: clk, rst_n, write (1: write operation), r_adj, w_adj,
// dll_ctrl -> dcps_code[8:0], adjusted.
// Follows the document: DQS_R_ADJ / DQS_W_ADJ, control-code gain of 4,
// 16 ps minimum tuning step.  This design's choice: 4-bit two's-complement
// adjust inputs and saturation.
module phase_controller #(
  parameter int unsigned GAIN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              write,
  input  logic signed [3:0] r_adj,
  input  logic signed [3:0] w_adj,
  input  logic [8:0]        dll_ctrl,
  output logic [8:0]        dcps_code,
  output logic              adjusted
);
  logic signed [3:0]  adj;
  logic signed [11:0] sum;
  assign adj = write ? w_adj : r_adj;
  assign sum = $signed({3'b0, dll_ctrl}) + 12'(adj) * $signed(12'(GAIN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcps_code <= '0;
      adjusted  <= 1'b0;
    end else begin
      dcps_code <= (sum < 0) ? 9'd0 : (sum > 12'sd511) ? 9'd511 : sum[8:0];
      adjusted  <= (adj != 0);
    end
  end
endmodule
