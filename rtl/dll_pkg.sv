`timescale 1ns/1fs
// dll_pkg: constants and types shared by the delta-sigma DLL clock synchronizer.
//
// Tap numbering follows the delay line: tap k is the output of delay cell k
// (1..13). Output phases are taken from taps 4..13, feedback phases from taps
// 7..11 in two overlapping groups of four (8..11 and 7..10). These numbers and
// the modulator's 10-bit input / 16-bit internal width and 5..7-bit resolution
// are the published design's; the state encoding is this implementation's.
package dll_pkg;

  localparam int NUM_CELLS     = 13;  // delay cells in the VCDL
  localparam int TAP_W         = 4;   // width of a tap index (0..15)
  localparam int OUT_TAP_FIRST = 4;   // first tap usable as output phase
  localparam int OUT_TAP_LAST  = 13;  // last tap usable as output phase
  localparam int OUT_TAP_INIT  = 8;   // coarse search starts here
  localparam int FB_BASE_8_11  = 8;   // first tap of feedback group 8..11
  localparam int FB_BASE_7_10  = 7;   // first tap of feedback group 7..10

  localparam int K_W           = 10;  // modulator input width
  localparam int DSM_W         = 16;  // modulator internal width (K_W + 6)
  localparam int M_MIN         = 5;   // smallest programmable resolution m
  localparam int M_MAX         = 7;   // largest programmable resolution m

  // Feedback tap group, selected by the FSM and carried by the modulator.
  typedef enum logic {
    GRP_8_11 = 1'b0,  // N = 9, N_average from 9 to 10
    GRP_7_10 = 1'b1   // N = 8, N_average from 8 to 9
  } fb_group_e;

  // Clock synchronization FSM states.
  typedef enum logic [2:0] {
    ST_IDLE,      // core loop running, waiting for start
    ST_GRP_CHECK, // group just switched to 7..10, checking HOLD
    ST_COARSE,    // walk the output tap until HOLD
    ST_FINE_TRY,  // one bit of K inverted, waiting for the core loop
    ST_LOCKED     // synchronized, counting towards revalidation
  } sync_state_e;

  // First tap of a feedback group.
  function automatic int unsigned fb_base(fb_group_e g);
    return (g == GRP_7_10) ? FB_BASE_7_10 : FB_BASE_8_11;
  endfunction

endpackage
