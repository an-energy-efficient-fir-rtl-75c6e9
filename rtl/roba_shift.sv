// roba_shift: the tap multiplier of the RoBA FIR filter.
//
// A RoBA multiplier forms B_r*A + A_r*B - A_r*B_r from shifts, where A_r and
// B_r are the operands rounded to powers of two. When the coefficient B is
// itself a power of two, B_r = B and the expression collapses to one shift.
// The filter's coefficients are given as exponents: tap weight 2^-sh, so the
// multiplier is a logical right shift with zero fill, dout = din >> sh.
// Purely combinational.
module roba_shift #(
  parameter int unsigned DATA_W = roba_pkg::FIR_DATA_W,
  parameter int unsigned COEF_W = roba_pkg::FIR_COEF_W
) (
  input  logic [DATA_W-1:0] din,
  input  logic [COEF_W-1:0] sh,
  output logic [DATA_W-1:0] dout
);
  always_comb dout = din >> sh;
endmodule
