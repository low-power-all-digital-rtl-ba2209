`timescale 1ps/1fs
// adpll_controller: lock controller of the TDC-based fast lock-in ADPLL.
//
// Clocked by the divided reference Ref_N.  After reset it runs three modes:
//  ST_COARSE  waits for the TDC (two reference cycles).  The TDC code is
//             the reference period divided by M in delay-cell units, i.e.
//             the DCO period in cells; half of it (the ring period is two
//             passes) less the fixed ring delay INTR_CELLS is loaded into the
//             coarse field of the DCO code and the
//             fine field is set to its middle.  The search step then starts
//             at a quarter of the fine range.  With use_tdc = 0 the code
//             starts at the middle of the DCO band and the step at a quarter
//             of the whole range (the plain binary-search ADPLL); the same
//             happens when the TDC reports that the reference half period
//             exceeded its 40-cell range (tdc_ovf).
//  ST_ACQ     binary search on frequency: realign is high, so the DCO and
//             its divider restart at each Ref_N edge and the PFD reports
//             whether M DCO periods were shorter than one Ref_N period.
//             Every cycle the code moves by the search step,
//             up on lead (DCO_M early: more delay) and down on lag.  Each
//             time the PFD output changes polarity the step is halved.  The
//             step starts at a quarter of the code range; when it reaches 1
//             acquisition is complete (at most 2*W-1 cycles for W bits).
//  ST_TRACK   phase tracking: a polarity change halves the step (not below
//             1) and clears the speed-up count; each same-direction move
//             counts up, and at SPEEDUP_BOUNDARY (8) the step is doubled
//             (not above TRACK_MAX_STEP) and the count restarts.
// The code saturates at 0 and at all ones.  lead/lag are sampled at each
// rising edge of clk; a new code is applied from that edge on.
// The modes, the step rules and the boundary value of 8 follow the ADPLL
// description; the TDC-to-code mapping (half the TDC code into the coarse
// field) is this design's reading.
module adpll_controller
  import clkgen_pkg::*;
#(
  parameter int unsigned W  = 14,   // DCO code width (DCO_code[13:0])
  parameter int unsigned CW = 4,    // coarse field width
  // fixed DCO delay (NAND, mux, fine stages at mid code) in coarse cells,
  // removed from the TDC estimate of the coarse path length
  parameter int unsigned INTR_CELLS = 5,
  // largest step the speed-up may reach while tracking
  parameter int unsigned TRACK_MAX_STEP = 16
) (
  input  logic          clk,        // Ref_N
  input  logic          rst_n,      // asynchronous, active low
  input  logic          use_tdc,    // 1: TDC coarse lock, 0: start mid-band
  input  logic          tdc_done,
  input  logic [5:0]    tdc_code,
  input  logic          tdc_ovf,    // reference period beyond the TDC range
  input  logic          lead,
  input  logic          lag,
  output logic [W-1:0]  dco_code,
  output lock_state_e   state,
  output logic          locked,     // frequency acquisition complete
  output logic          realign,    // restart DCO and divider at each Ref_N edge
  output logic          flip,       // this cycle's decision reversed the last one
  output logic          speedup     // this cycle doubled the step
);

  localparam int unsigned FW        = W - CW;
  localparam logic [W-1:0] INIT_STEP = W'(1) << (W - 2);   // mid-band start
  localparam logic [W-1:0] TDC_STEP  = W'(1) << (FW - 2);  // after TDC lock
  localparam logic [W-1:0] MAX_CODE  = '1;

  logic [W-1:0] step;
  logic         last_up, have_last;
  logic [3:0]   su_cnt;
  logic         up;

  assign up = lead & ~lag;

  function automatic logic [W-1:0] move(input logic [W-1:0] c, input logic [W-1:0] s,
                                        input logic u);
    if (u) return (MAX_CODE - c < s) ? MAX_CODE : c + s;
    else   return (c < s) ? '0 : c - s;
  endfunction

  function automatic logic [W-1:0] coarse_code(input logic [5:0] t);
    logic [5:0] h;
    h = t >> 1;
    h = (32'(h) > INTR_CELLS) ? h - 6'(INTR_CELLS) : 6'd0;
    if (32'(h) > (2**CW) - 1) h = 6'((2**CW) - 1);
    return {CW'(h), 1'b1, {(FW-1){1'b0}}};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_COARSE;
      dco_code  <= {1'b1, {(W-1){1'b0}}};
      step      <= INIT_STEP;
      last_up   <= 1'b0;
      have_last <= 1'b0;
      su_cnt    <= '0;
      flip      <= 1'b0;
      speedup   <= 1'b0;
    end else begin
      flip    <= 1'b0;
      speedup <= 1'b0;
      unique case (state)
        ST_COARSE: begin
          if (!use_tdc) begin
            dco_code <= {1'b1, {(W-1){1'b0}}};
            state    <= ST_ACQ;
          end else if (tdc_done && tdc_ovf) begin
            dco_code <= {1'b1, {(W-1){1'b0}}};
            state    <= ST_ACQ;
          end else if (tdc_done) begin
            dco_code <= coarse_code(tdc_code);
            step     <= TDC_STEP;
            state    <= ST_ACQ;
          end
        end
        ST_ACQ: begin
          logic [W-1:0] s;
          s = step;
          if (have_last && up != last_up) begin
            s    = step >> 1;
            flip <= 1'b1;
          end
          dco_code  <= move(dco_code, s, up);
          step      <= s;
          last_up   <= up;
          have_last <= 1'b1;
          if (s == W'(1)) begin
            state  <= ST_TRACK;
            su_cnt <= '0;
          end
        end
        ST_TRACK: begin
          logic [W-1:0] s;
          s = step;
          if (up != last_up) begin
            if (step > W'(1)) s = step >> 1;
            su_cnt <= '0;
            flip   <= 1'b1;
          end else if (32'(su_cnt) + 1 == SPEEDUP_BOUNDARY) begin
            if (32'(step) < TRACK_MAX_STEP) s = step << 1;
            su_cnt  <= '0;
            speedup <= 1'b1;
          end else begin
            su_cnt <= su_cnt + 4'd1;
          end
          dco_code <= move(dco_code, s, up);
          step     <= s;
          last_up  <= up;
        end
        default: state <= ST_COARSE;
      endcase
    end
  end

  assign locked  = (state == ST_TRACK);
  assign realign = (state == ST_ACQ);

endmodule
