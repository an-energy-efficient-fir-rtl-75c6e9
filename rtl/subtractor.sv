// subtractor: removes the A_r*B_r term from the RoBA sum, d = a - b.
// For the RoBA terms the result is never negative: A/A_r and B/B_r both lie
// in [3/4, 3/2], so A_r*B + B_r*A - A_r*B_r = A_r*B_r*(A/A_r + B/B_r - 1)
// is at least A_r*B_r/2. Unsigned, W bits. Purely combinational.
module subtractor #(
  parameter int unsigned W = 2 * roba_pkg::MUL_W + 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] d
);
  always_comb d = a - b;
endmodule
