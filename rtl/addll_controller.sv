`timescale 1ps/1fs
// addll_controller: lock controller of the all-digital DLL.
//
// Runs on the input clock.  After reset it waits for the TDC; at the
// first edge with tdc_done the coarse field of DLL_CTRL is loaded with
// TDC_CODE and the fine field starts a 5-bit binary search (successive
// approximation) with the MSB trial set.  A trial needs two clock edges:
// the edge after the code change is the first to travel the new delay,
// and P360 of that edge is sampled at the next edge.  pd = P360 sampled
// at the clock edge: 1 means the line is shorter than one period (keep
// the trial bit), 0 longer (clear it).  After the last bit locked is set
// and the controller tracks: every two edges the code moves by one fine
// step (16 ps for the line) in the direction given by pd.
// Timing: TDC done at edge 2, search from edge 3, decisions at edges 5,
// 7, 9, 11 and 13: lock at the 13th input cycle.
// Interface: clk (CLK_IN), rst_n, tdc_done, tdc_code[3:0], pd ->
// dll_ctrl[8:0], locked, track_up/track_dn pulses.
// Follows the document: TDC coarse code, 5-bit fine binary search, lock in
// 13 cycles.  This design's choices: the two-edge trial timing and the
// tracking rule.
module addll_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tdc_done,
  input  logic [3:0] tdc_code,
  input  logic       pd,
  output logic [8:0] dll_ctrl,
  output logic       locked,
  output logic       track_up,
  output logic       track_dn
);
  logic       started, wait_cyc;
  logic [2:0] bit_idx;   // fine bit under trial (4..0)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dll_ctrl <= '0; locked <= 1'b0; started <= 1'b0; wait_cyc <= 1'b0;
      bit_idx <= 3'd4; track_up <= 1'b0; track_dn <= 1'b0;
    end else begin
      track_up <= 1'b0;
      track_dn <= 1'b0;
      if (!started) begin
        if (tdc_done) begin
          started  <= 1'b1;
          dll_ctrl <= {tdc_code, 5'b10000};
          bit_idx  <= 3'd4;
          wait_cyc <= 1'b1;
        end
      end else if (wait_cyc) begin
        wait_cyc <= 1'b0;
      end else if (!locked) begin
        wait_cyc <= 1'b1;
        if (!pd) dll_ctrl[bit_idx] <= 1'b0;
        if (bit_idx == 3'd0) begin
          locked <= 1'b1;
        end else begin
          dll_ctrl[bit_idx - 3'd1] <= 1'b1;
          bit_idx <= bit_idx - 3'd1;
        end
      end else begin
        wait_cyc <= 1'b1;
        if (pd && dll_ctrl != 9'h1FF) begin
          dll_ctrl <= dll_ctrl + 9'd1; track_up <= 1'b1;
        end else if (!pd && dll_ctrl != 9'h000) begin
          dll_ctrl <= dll_ctrl - 9'd1; track_dn <= 1'b1;
        end
      end
    end
  end
endmodule
