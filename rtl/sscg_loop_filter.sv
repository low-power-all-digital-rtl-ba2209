`timescale 1ps/1fs
// sscg_loop_filter: loop filter of the spread-spectrum clock generator.
//
// It turns the bang-bang PFD decisions into a search step and add/subtract
// request for the DCO code generator.
//  acquisition  the step S_N starts at 2**15 (MSB of S_N) and halves at every change
//               of PFD polarity (binary search); DCO and DCO divider are
//               restarted at each FIN_M edge (realign) so that each decision
//               compares one period.  When the step reaches 1 the filter
//               goes to tracking.
//  tracking     S_N = 1 each cycle in the PFD direction.  At a polarity
//               change LOAD pulses with BASELINE CODE = mean of the codes
//               at the last two changes (the averaged DCO code), and locked
//               is set at the second change.
//  spreading    (MODE = 1 and locked) decisions are applied only on
//               group_end from the modulator; no LOAD.  The centre code is
//               the baseline stored when spreading starts.
// Interface: clk (FIN_M), rst_n, lead, lag, mode, group_end, code (the
// present DCO code, for the averaging) -> s_n, sn_valid, sn_add, load,
// baseline, realign, locked, flip.  s_n, sn_valid, sn_add, load, baseline
// and flip are combinational from the PFD result and the filter state, so
// the code generator applies a decision at the edge where it is sampled.
// Follows the document: LEAD adds S_N (lower frequency), LAG subtracts,
// LOAD of the averaged baseline at each polarity change, baseline stored as
// centre before spreading.  This design's choices: the binary search,
// realign during acquisition, the two-point average.
module sscg_loop_filter #(
  parameter int unsigned W = 18    // DCO code width (BASELINE CODE[17:0])
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lead,
  input  logic         lag,
  input  logic         mode,       // 1: spread-spectrum operation
  input  logic         group_end,
  input  logic [W-1:0] code,
  output logic [15:0]  s_n,        // S_N[15:0]
  output logic         sn_valid,
  output logic         sn_add,
  output logic         load,       // LOAD
  output logic [W-1:0] baseline,   // BASELINE CODE
  output logic [W-1:0] center,     // centre code stored for spreading
  output logic         realign,
  output logic         locked,
  output logic         flip
);

  logic         acq, have_last, last_lead, have_flip;
  logic [W-1:0] flip_code;
  logic [15:0]  step;
  logic         spread, decide, changed;

  assign spread  = mode & locked;
  assign realign = acq;

  // decisions are combinational so that the code generator applies them at
  // the same FIN_M edge at which the PFD result is sampled
  assign decide   = acq | ~spread | group_end;
  assign changed  = decide & have_last & (lead != last_lead);
  assign flip     = changed;
  assign load     = changed & ~acq & ~spread & have_flip;
  assign baseline = W'(({1'b0, flip_code} + {1'b0, code}) >> 1);
  assign sn_valid = decide & ~load;
  assign sn_add   = lead;
  assign s_n      = (acq && changed && step > 16'd1) ? step >> 1 : step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq <= 1'b1; have_last <= 1'b0; last_lead <= 1'b0; have_flip <= 1'b0;
      flip_code <= '0; step <= 16'h8000; center <= '0; locked <= 1'b0;
    end else begin
      if (decide) begin
        have_last <= 1'b1;
        last_lead <= lead;
      end
      if (acq) begin
        if (changed) begin
          step <= s_n;
          if (s_n == 16'd1) begin
            acq <= 1'b0;
            have_last <= 1'b0;
          end
        end
      end else if (changed && !spread) begin
        have_flip <= 1'b1;
        flip_code <= code;
        if (have_flip) locked <= 1'b1;
      end
      if (!locked || !mode) center <= baseline;
    end
  end

endmodule
