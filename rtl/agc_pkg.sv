// agc_pkg: constants and types shared by the digital AGC blocks.
//
// The default word sizes are those of the WCDMA base-station receiver the
// AGC was built for: 14-bit signed baseband I/Q in, 5-bit I/Q out. The gain
// accumulator size P = 10, the step shift K = 7 and the averaging window
// M = 128 complex samples are this design's reading of the published
// convergence curve (gain starting at its minimum 2^K = 128, slope changes
// every 128 accumulator steps at a 128-sample update period).
//
// ctrl_e encodes the loop control u_m = sgn(P_ref - P_m): raise the gain,
// lower it, or hold it when the average power equals the reference.
package agc_pkg;

  localparam int unsigned AGC_NI = 14;   // input bits per rail
  localparam int unsigned AGC_NO = 5;    // output bits per rail
  localparam int unsigned AGC_P  = 10;   // gain accumulator bits
  localparam int unsigned AGC_K  = 7;    // gain step = G / 2^K
  localparam int unsigned AGC_M  = 128;  // complex samples per gain update

  typedef enum logic [1:0] {
    CTRL_HOLD = 2'b00,   // sgn(...) = 0
    CTRL_UP   = 2'b01,   // sgn(...) = +1 : average power below reference
    CTRL_DOWN = 2'b10    // sgn(...) = -1 : average power above reference
  } ctrl_e;

endpackage
