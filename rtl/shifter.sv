// shifter: multiplies an operand by a power of two 2^exp with a left shift,
// which is how the RoBA multiplier forms B_r*A, A_r*B and A_r*B_r without a
// multiplier array. When the power of two is zero (the rounded operand was
// 0) the output is 0. dout = zero ? 0 : din << exp, OUT_W bits wide.
// Purely combinational.
module shifter #(
  parameter int unsigned IN_W  = roba_pkg::MUL_W,
  parameter int unsigned OUT_W = 2 * roba_pkg::MUL_W,
  parameter int unsigned SH_W  = $clog2(roba_pkg::MUL_W + 1)
) (
  input  logic [IN_W-1:0]  din,
  input  logic [SH_W-1:0]  exp,
  input  logic             zero,
  output logic [OUT_W-1:0] dout
);
  always_comb dout = zero ? '0 : (OUT_W'(din) << exp);
endmodule
