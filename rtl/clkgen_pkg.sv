`timescale 1ps/1fs
// clkgen_pkg: constants and types shared by the all-digital clock generators.
//
// Holds the lock-state encoding used by the loop controllers, the phase
// tracking speed-up boundary of the binary-search loop, and the boundary
// compensation codes of the monotonic DCO code adjustment.  Values marked
// "design choice" are not fixed by the architecture description and were
// picked for this implementation.
package clkgen_pkg;

  // Loop controller states (ADPLL and ADDLL).
  typedef enum logic [2:0] {
    ST_RESET  = 3'd0,  // waiting for reset release
    ST_COARSE = 3'd1,  // TDC-based coarse lock
    ST_ACQ    = 3'd2,  // binary-search frequency / phase acquisition
    ST_TRACK  = 3'd3   // phase tracking (locked)
  } lock_state_e;

  // Phase tracking: consecutive same-direction corrections before the
  // search step is doubled (binary-search ADPLL, chosen by simulation).
  localparam int unsigned SPEEDUP_BOUNDARY = 8;

  // Reference cycles over which the averaging mechanism takes max/min.
  localparam int unsigned AVG_WINDOW = 256;

  // Extra compensation codes of the ADSSCG auto-adjustment algorithm,
  // applied when a DCO code update crosses a tuning-stage boundary.
  localparam int unsigned COMP_COARSE_F1 = 320;  // coarse / 1st fine
  localparam int unsigned COMP_F1_F2     = 48;   // 1st fine / 2nd fine
  localparam int unsigned COMP_F2_F3     = 4;    // 2nd fine / 3rd fine

endpackage
