// sign_detection: front end of the RoBA multiplier.
//
// RoBA rounding only works on non-negative numbers, so the operands are
// turned into magnitudes first and the sign of the product is kept aside:
//   abs_a = |a|, abs_b = |b|, sign = a[W-1] ^ b[W-1].
// a and b are two's complement; |-2^(W-1)| = 2^(W-1) still fits in W
// unsigned bits. Purely combinational.
module sign_detection #(
  parameter int unsigned W = roba_pkg::MUL_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] abs_a,
  output logic [W-1:0] abs_b,
  output logic         sign
);
  always_comb begin
    abs_a = a[W-1] ? W'(-a) : a;
    abs_b = b[W-1] ? W'(-b) : b;
    sign  = a[W-1] ^ b[W-1];
  end
endmodule
