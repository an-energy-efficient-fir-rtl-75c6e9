// sign_set: back end of the RoBA multiplier. It gives the unsigned
// magnitude the sign found by sign_detection, by two's complement negation:
// p = sign ? -mag : mag. Purely combinational.
module sign_set #(
  parameter int unsigned W = 2 * roba_pkg::MUL_W
) (
  input  logic [W-1:0] mag,
  input  logic         sign,
  output logic [W-1:0] p
);
  always_comb p = sign ? (~mag + 1'b1) : mag;
endmodule
