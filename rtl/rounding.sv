// rounding: rounds an unsigned value to the nearest power of two, the core
// step of the RoBA (rounding-based approximate) multiplier.
//
// With k the position of the leading one of a, the value lies between 2^k
// and 2^(k+1), and the midpoint 3*2^(k-1) is exactly where bit k-1 becomes
// 1. So a rounds up to 2^(k+1) when a[k-1] is 1 and down to 2^k otherwise;
// midpoints 3*2^(p-2) round up, because that needs the least logic. The one
// exception is a = 3, which rounds down to 2. a = 0 gives ar = 0 with the
// zero flag set. Outputs: the rounded value ar (one-hot, W+1 bits so that
// 2^W fits), its exponent exp = log2(ar) for the shifters, and zero.
// Purely combinational.
module rounding #(
  parameter int unsigned W   = roba_pkg::MUL_W,
  parameter int unsigned EXP_W = $clog2(W + 1)
) (
  input  logic [W-1:0]     a,
  output logic [W:0]       ar,
  output logic [EXP_W-1:0] exp,
  output logic             zero
);
  logic [EXP_W-1:0] k;   // leading-one position

  always_comb begin
    k = '0;
    for (int unsigned i = 0; i < W; i++)
      if (a[i]) k = EXP_W'(i);

    zero = (a == '0);
    exp  = k;
    if (k != '0 && a[$clog2(W)'(k - 1'b1)] && a != W'(3))
      exp = k + 1'b1;

    ar = zero ? '0 : ((W+1)'(1) << exp);
  end
endmodule
