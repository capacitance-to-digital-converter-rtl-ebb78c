// Shared types and constants of the swappable-oscillator capacitance-to-digital
// converter (CDC).
//
// The CDC digitises an unknown capacitance Cx against an on-chip reference CREF
// by letting one relaxation oscillator define a window of M periods (counter #1,
// a down-counter) and counting the periods of the other oscillator inside that
// window (counter #2, an up-counter). Both the capacitor loads and the counters
// can be swapped between the two oscillators; the two "connection" selects
// below name the two positions of each swap.
//
// Widths follow the test chip: 12-bit counters and 4-bit binary-weighted
// calibration capacitor codes.
package cdc_pkg;

  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CNT_W_DEF = 12;  // counter bit width of the test chip
  localparam int unsigned CAL_W_DEF = 4;   // bits of each calibration capacitor bank

  // Position of a swap (loads in the cap switch box, or counters in the muxes).
  typedef enum logic {
    CONN_DIRECT  = 1'b0,  // loads: Cx on OSC1, CREF on OSC2; counters: OSC1->#1, OSC2->#2
    CONN_SWAPPED = 1'b1   // loads: CREF on OSC1, Cx on OSC2; counters: OSC1->#2, OSC2->#1
  } conn_e;

  // Which calibration bank the SAR search tunes.
  typedef enum logic [1:0] {
    CAL_SEL_NONE = 2'd0,
    CAL_SEL_CAL1 = 2'd1,  // n1 < n2: OSC1 is faster, slow it with CCAL1
    CAL_SEL_CAL2 = 2'd2   // n1 > n2: OSC2 is faster, slow it with CCAL2
  } cal_sel_e;

endpackage
