// adder: adds the two RoBA cross terms B_r*A and A_r*B. The sum is one bit
// wider than the operands so that no carry is lost. Purely combinational.
module adder #(
  parameter int unsigned W = 2 * roba_pkg::MUL_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  always_comb s = {1'b0, a} + {1'b0, b};
endmodule
