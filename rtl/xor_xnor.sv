// xor_xnor: the XOR-XNOR pair that drives the select lines of the
// multiplexer-based 4:2 compressor.
//
// The module gives a^b and its complement from the same two inputs, which is
// the logic function of a dual-rail XOR-XNOR gate. The transistor circuit of
// such a gate is a cell-level matter; here only its function is written.
// Purely combinational.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,   // a xor b
  output logic xn   // a xnor b
);
  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end
endmodule
