// compressor4_2: one 4:2 compressor cell built from XOR-XNOR gates and
// multiplexers.
//
// It reduces five bits of equal weight (x1..x4 and cin) to one bit of that
// weight (sum) and two bits of double weight (carry, cout):
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// cout does not depend on cin, so a row of cells has no rippling carry
// through cout alone. Gate form (a common XOR-XNOR/multiplexer style, the
// exact circuit being this design's choice):
//   cout  = (x1 ^ x2)           ? x3  : x1
//   carry = (x1 ^ x2 ^ x3 ^ x4) ? cin : x4
//   sum   =  x1 ^ x2 ^ x3 ^ x4 ^ cin
// Purely combinational.
module compressor4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s12, s12n, s34, s34n, s1234, s1234n;

  xor_xnor u_x12   (.a(x1),  .b(x2),  .x(s12),   .xn(s12n));
  xor_xnor u_x34   (.a(x3),  .b(x4),  .x(s34),   .xn(s34n));

  always_comb begin
    // Each multiplexer is steered by a complementary XOR/XNOR pair; the
    // four-input parity is itself a multiplexer choosing s12 or s12n.
    s1234  = (s34 & s12n) | (s34n & s12);
    s1234n = (s34 & s12)  | (s34n & s12n);
    cout  = (s12   & x3)  | (s12n   & x1);
    carry = (s1234 & cin) | (s1234n & x4);
    sum   = (s1234 & ~cin) | (s1234n & cin);
  end
endmodule
