// roba_fir_top: the RoBA FIR filter and the stand-alone signed RoBA
// multiplier, side by side.
//
// The filter (roba_fir) is a TAPS-tap direct-form FIR whose tap weights are
// powers of two 2^-h[i], multiplied by RoBA shifts and summed by a chain of
// 4:2-compressor adders; its delay line is clocked by clk and cleared by rst
// (active high, synchronous), and dataout is combinational from x. The
// multiplier (roba_mult) is the general signed RoBA multiplier for operands
// that are not powers of two; it is combinational and shares nothing with
// the filter. Defaults: 5 taps, 8-bit samples, 3-bit exponents, 8x8 -> 16.
module roba_fir_top #(
  parameter int unsigned TAPS   = roba_pkg::FIR_TAPS,
  parameter int unsigned DATA_W = roba_pkg::FIR_DATA_W,
  parameter int unsigned COEF_W = roba_pkg::FIR_COEF_W,
  parameter int unsigned MUL_W  = roba_pkg::MUL_W
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [DATA_W-1:0]             x,
  input  logic [TAPS-1:0][COEF_W-1:0]   h,
  output logic [DATA_W-1:0]             dataout,
  input  logic [MUL_W-1:0]              mul_a,
  input  logic [MUL_W-1:0]              mul_b,
  output logic [2*MUL_W-1:0]            mul_p
);
  roba_fir #(.TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_fir (
    .clk(clk), .rst(rst), .x(x), .h(h), .dataout(dataout)
  );

  roba_mult #(.W(MUL_W)) u_mult (.a(mul_a), .b(mul_b), .p(mul_p));
endmodule
