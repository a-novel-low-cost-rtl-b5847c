// dlrs_pkg: types shared by the dynamic logic reconfigurable structure (DLRS)
// arithmetic units.
//
// Every DLRS unit holds two structures that compute the same function: a
// slow one that switches little (low power) and a fast one that switches
// more (high speed). A one-bit mode selects which of the two produces the
// result; the other one has its inputs held at zero so that it does not
// toggle. The two-structure idea is the design's own basis; the encoding
// below (0 = low power, 1 = high speed) is a choice of this RTL.
package dlrs_pkg;

  typedef enum logic {
    MODE_LOW_POWER  = 1'b0,  // ripple-carry adder / array multiplier
    MODE_HIGH_SPEED = 1'b1   // carry look-ahead adder / Wallace-tree multiplier
  } dlrs_mode_e;

endpackage
