// roba_mult: signed W x W rounding-based approximate (RoBA) multiplier.
//
// Main idea: with A_r, B_r the operands rounded to the nearest power of two,
//   A*B = (A_r - A)(B_r - B) + A_r*B + B_r*A - A_r*B_r.
// The first term is small when A and B are close to A_r and B_r and is the
// only one that needs a real multiplier, so it is dropped; the other three
// are shifts. Datapath, in order:
//   sign_detection  |A|, |B| and the product sign
//   rounding (x2)   A_r, B_r as exponents
//   shifter (x3)    B_r*|A|, A_r*|B|, A_r*B_r
//   adder           B_r*|A| + A_r*|B|
//   subtractor      ... - A_r*B_r
//   sign_set        apply the sign -> p (2W bits, two's complement)
// The result can be above or below the exact product. For W = 8 the
// magnitude never exceeds 2^14, so p never overflows.
// Purely combinational: p follows a and b with no clock.
// The block order and names follow the reference block diagram; stripping
// the sign before rounding follows the method (a netlist drawing of the
// reference puts rounding first). Internal widths are this design's choice.
module roba_mult #(
  parameter int unsigned W = roba_pkg::MUL_W
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned EXP_W = $clog2(W + 1);

  logic [W-1:0]     abs_a, abs_b;
  logic             sign;
  logic [W:0]       ar;
  logic [EXP_W-1:0] ea, eb;
  logic             za, zb;
  logic [2*W-1:0]   br_a, ar_b, ar_br;
  logic [2*W:0]     cross_sum, mag_wide;

  sign_detection #(.W(W)) u_sign (
    .a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .sign(sign)
  );

  rounding #(.W(W), .EXP_W(EXP_W)) u_rnd_a (.a(abs_a), .ar(ar), .exp(ea), .zero(za));
  rounding #(.W(W), .EXP_W(EXP_W)) u_rnd_b (.a(abs_b), .ar(),   .exp(eb), .zero(zb));

  // B_r * |A|
  shifter #(.IN_W(W), .OUT_W(2*W), .SH_W(EXP_W)) u_sh_bra (
    .din(abs_a), .exp(eb), .zero(zb), .dout(br_a)
  );
  // A_r * |B|
  shifter #(.IN_W(W), .OUT_W(2*W), .SH_W(EXP_W)) u_sh_arb (
    .din(abs_b), .exp(ea), .zero(za), .dout(ar_b)
  );
  // B_r * A_r: A_r shifted by B_r's exponent (B_r itself is not needed as a
  // value, so that rounding output is left open).
  shifter #(.IN_W(W+1), .OUT_W(2*W), .SH_W(EXP_W)) u_sh_arbr (
    .din(ar), .exp(eb), .zero(zb), .dout(ar_br)
  );

  adder #(.W(2*W)) u_add (.a(br_a), .b(ar_b), .s(cross_sum));

  // The difference never exceeds 2^(2W-2) (see subtractor), so its top bit
  // is always 0 and only the low 2W bits go on.
  subtractor #(.W(2*W+1)) u_sub (.a(cross_sum), .b({1'b0, ar_br}), .d(mag_wide));

  sign_set #(.W(2*W)) u_sset (.mag(mag_wide[2*W-1:0]), .sign(sign), .p(p));
endmodule
