`timescale 1ps/1fs
// dco_code_gen: DCO code generator (DCG) of the spread-spectrum clock
// generator.
//
// Holds the DCO control code.  Every clk (FIN_M) cycle it forms the next
// code: LOAD replaces the code with the baseline; otherwise the search
// step S_N is added (sn_add, PFD lead) or subtracted, and the spreading
// step S_SS is added (+/-_SS = 1) or subtracted, both when valid.  The sum
// saturates at 0 and at all ones and then passes through dco_mono_adjust,
// which adds or subtracts the boundary compensation code when a stage
// boundary is crossed.
// Interface: clk, rst_n, load, baseline, sn_valid/sn_add/s_n,
// ss_valid/ss_add/ss_step -> code (registered), comp (a compensation was
// applied this update).  Reset code is 2**(W-2), a quarter of the range:
// with a first search step of 2**15 the search covers codes 0 to 2**(W-1)-1.
// Follows the document: adding the code lowers the frequency, LOAD of the
// baseline, the auto-adjustment on boundary crossings.  This design's
// choice: both step requests are combined in one update.
module dco_code_gen #(
  parameter int unsigned CW  = 8,
  parameter int unsigned F1W = 2,
  parameter int unsigned F2W = 5,
  parameter int unsigned F3W = 3,
  localparam int unsigned W = CW + F1W + F2W + F3W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] baseline,
  input  logic         sn_valid,
  input  logic         sn_add,
  input  logic [15:0]  s_n,
  input  logic         ss_valid,
  input  logic         ss_add,
  input  logic [15:0]  ss_step,
  output logic [W-1:0] code,
  output logic         comp
);

  logic signed [W+2:0] sum;
  logic [W-1:0] raw, adj;
  logic crossed;

  always_comb begin
    sum = $signed({3'b0, code});
    if (sn_valid) sum = sn_add ? sum + $signed({3'b0, W'(s_n)}) : sum - $signed({3'b0, W'(s_n)});
    if (ss_valid) sum = ss_add ? sum + $signed({3'b0, W'(ss_step)}) : sum - $signed({3'b0, W'(ss_step)});
    if (sum < 0)                              raw = '0;
    else if (sum > $signed({3'b0, {W{1'b1}}})) raw = '1;
    else                                      raw = sum[W-1:0];
  end

  dco_mono_adjust #(.CW(CW), .F1W(F1W), .F2W(F2W), .F3W(F3W)) u_adj (
    .cur_code(code), .next_code(raw), .adj_code(adj), .crossed);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= W'(1) << (W - 2);
      comp <= 1'b0;
    end else if (load) begin
      code <= baseline;
      comp <= 1'b0;
    end else begin
      code <= adj;
      comp <= crossed;
    end
  end

endmodule
