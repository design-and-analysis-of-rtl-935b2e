// rap_cla_pkg: types and defaults shared by the reconfigurable approximate
// carry look-ahead adder (RAP-CLA).
//
// The adder has two working modes chosen by one mode signal: exact, in which
// every carry is the full carry look-ahead sum of products, and approximate,
// in which each carry keeps only the terms of the few most significant bit
// positions below it. The 4-bit default width is the adder drawn in the
// reference schematic; the window size and the mode encoding are choices of
// this design.
package rap_cla_pkg;

  // Working mode. The source names the two modes but gives no encoding;
  // approximate = 0 so that a cleared control register selects the
  // low-power mode is this design's choice.
  typedef enum logic {
    MODE_APPROX = 1'b0,
    MODE_EXACT  = 1'b1
  } rap_mode_e;

  // Default operand width: the 4-bit adder of the reference schematic.
  localparam int unsigned DEFAULT_WIDTH  = 4;
  // Default window size W (number of most significant product terms kept in
  // approximate mode). No value is given for it; 2 is this design's choice.
  localparam int unsigned DEFAULT_WINDOW = 2;

endpackage : rap_cla_pkg
