// roba_pkg: sizes shared by the RoBA FIR filter and the RoBA multiplier.
//
// The FIR defaults (five taps, 8-bit unsigned samples, 3-bit coefficient
// exponents) and the 8x8 multiplier width are the sizes of the reference
// design. Nothing here is clocked; the package only holds constants.
package roba_pkg;
  localparam int unsigned FIR_TAPS   = 5;  // h0..h4
  localparam int unsigned FIR_DATA_W = 8;  // x[7:0], dataout[7:0]
  localparam int unsigned FIR_COEF_W = 3;  // h[2:0]: weight of a tap is 2^-h
  localparam int unsigned MUL_W      = 8;  // signed operands of the RoBA multiplier
endpackage
