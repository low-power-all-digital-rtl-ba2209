`timescale 1ps/1fs
// dll_tdc: behavioural model of the DLL time-to-digital converter.
//
// Behavioural model: delay cells are transport delays, not gates.
// After reset Pulse_Start rises at the first rising edge of clk_in and
// Pulse_End at the second; both then stay high (one measurement per
// reset).  Pulse_Start passes a dummy intrinsic chain equal to the
// minimum path of the delay line (4 * T_INTR) and then a chain of 15
// cells, each as long as 4 CDCs (one CDC in each of the 4 stages).  At the
// rising edge of Pulse_End the chain taps are latched; the number of taps
// already reached is TDC_CODE[3:0], i.e. the number of coarse cells per
// stage that fits into one clock period.  done rises with Pulse_End.
// Interface: clk_in, rst_n -> tdc_code[3:0], done.
// Follows the document: Pulse_Start/Pulse_End, dummy intrinsic chain,
// quantisation in 4-CDC units, TDC_CODE[3:0], one measurement after reset.
// This design's choice: the cell delays (same as dcdl).
module dll_tdc #(
  parameter real T_INTR = 150.0,
  parameter real T_CDC  = 128.0
) (
  input  logic       clk_in,
  input  logic       rst_n,
  output logic [3:0] tdc_code,
  output logic       done
);
  logic pulse_start, pulse_end;
  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      pulse_start <= 1'b0;
      pulse_end   <= 1'b0;
    end else begin
      pulse_start <= 1'b1;
      pulse_end   <= pulse_start;
    end
  end

  logic start_d = 1'b0;
  always @(pulse_start) start_d <= #(4.0 * T_INTR) pulse_start;

  logic [15:0] tap;
  assign tap[0] = start_d;
  for (genvar i = 0; i < 15; i++) begin : g_chain
    logic o = 1'b0;
    always @(tap[i]) o <= #(4.0 * T_CDC) tap[i];
    assign tap[i+1] = o;
  end

  logic [14:0] q;
  always_ff @(posedge pulse_end or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= tap[15:1];
  end
  assign tdc_code = 4'($countones(q));
  assign done = pulse_end;
endmodule
