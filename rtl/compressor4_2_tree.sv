// compressor4_2_tree: DATA_W-bit two-operand adder made of a row of 4:2
// compressor cells; the FIR filter accumulates its tap products with a chain
// of these.
//
// Bit i feeds a[i] and b[i] to x1/x2 of its cell, and takes the two
// double-weight outputs of bit i-1 as x3 (cout) and cin (carry); x4 is 0.
// Both carries of a bit therefore enter the next bit, and each cell's sum is
// a final result bit: sum = (a + b) mod 2^DATA_W. The carries out of the top
// bit are dropped, as the output is DATA_W bits wide like the operands.
// The name and the two-operand interface follow the reference schematic; the
// way the cells are chained is this design's choice. Purely combinational.
module compressor4_2_tree #(
  parameter int unsigned DATA_W = roba_pkg::FIR_DATA_W
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] sum
);
  // c_cout[i] / c_carry[i]: double-weight outputs of bit i-1 (0 at bit 0).
  logic [DATA_W:0] c_cout, c_carry;

  assign c_cout[0]  = 1'b0;
  assign c_carry[0] = 1'b0;

  for (genvar i = 0; i < DATA_W; i++) begin : g_bit
    compressor4_2 u_cmp (
      .x1   (a[i]),
      .x2   (b[i]),
      .x3   (c_cout[i]),
      .x4   (1'b0),
      .cin  (c_carry[i]),
      .sum  (sum[i]),
      .carry(c_carry[i+1]),
      .cout (c_cout[i+1])
    );
  end
endmodule
