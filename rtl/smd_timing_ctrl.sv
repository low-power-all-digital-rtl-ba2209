`timescale 1ps/1fs
// smd_timing_ctrl: timing controller of the all-digital SMD.
//
// Clocked by IB_OUT.  Coarse locking: at the second rising edge after
// reset it asserts latch (the mirror point is captured at that edge) and
// drives BLK low from then on, blocking the forward delay line.  Fine
// locking: the 3-bit FTC is set by a binary search starting at 100b,
// with one decision every two clock cycles from the phase detector (up =
// output edge early, more delay needed), followed by one final +/-1
// correction, so lock is reached after 2 + 2*4 = 10 cycles.  Afterwards
// FTC follows up/dn by one step every two cycles (saturating).
// Interface: clk (IB_OUT), rst_n, up -> blk, latch, ftc[2:0], locked,
// ftc_step (FTC changed this edge).
// Follows the document: BLK low at the second rising edge of IB_OUT, FTC
// updated every two cycles from UP/DN, 10-cycle lock.  This design's
// choices: the binary search order and the final correction step.
module smd_timing_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       up,
  output logic       blk,
  output logic       latch,
  output logic [2:0] ftc,
  output logic       locked,
  output logic       ftc_step
);
  logic [3:0] cyc;      // cycle counter during locking
  logic [1:0] bit_pos;  // 2..0 binary search, 3 = final correction

  assign latch = blk && cyc == 4'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= '0; blk <= 1'b1; ftc <= 3'b100; locked <= 1'b0;
      bit_pos <= 2'd2; ftc_step <= 1'b0;
    end else begin
      ftc_step <= 1'b0;
      if (!locked) cyc <= cyc + 4'd1;
      if (latch) blk <= 1'b0;
      if (!locked && cyc >= 4'd3 && cyc[0]) begin
        // decisions at cycles 4, 6, 8, 10 (cyc counts from 0)
        ftc_step <= 1'b1;
        if (bit_pos != 2'd3) begin
          if (!up) ftc[bit_pos] <= 1'b0;
          if (bit_pos == 2'd0) bit_pos <= 2'd3;
          else begin
            ftc[bit_pos - 2'd1] <= 1'b1;
            bit_pos <= bit_pos - 2'd1;
          end
        end else begin
          if (up && ftc != 3'd7) ftc <= ftc + 3'd1;
          else if (!up && ftc != 3'd0) ftc <= ftc - 3'd1;
          locked <= 1'b1;
        end
      end else if (locked) begin
        cyc <= cyc + 4'd1;
        if (cyc[0]) begin
          if (up && ftc != 3'd7) begin ftc <= ftc + 3'd1; ftc_step <= 1'b1; end
          else if (!up && ftc != 3'd0) begin ftc <= ftc - 3'd1; ftc_step <= 1'b1; end
        end
      end
    end
  end
endmodule
