// roba_fir: direct-form FIR filter whose multipliers are RoBA shift
// multipliers and whose adders are 4:2-compressor adders.
//
//   dataout(n) = sum_{i=0}^{TAPS-1} ( x(n-i) >> h[i] )   mod 2^DATA_W
//
// Tap 0 uses the current input x; taps 1..TAPS-1 use a chain of TAPS-1
// "lut" registers. Tap products are added in a linear chain of two-operand
// compressor4_2_tree adders (tap0+tap1, then +tap2, ...), as in the
// reference netlist. Samples are unsigned; the sum wraps at DATA_W bits.
//
// Timing: the delay line shifts on each rising clk edge; dataout is
// combinational from x, h and the registers, so it is valid in the same
// cycle as x. rst (active high, synchronous) clears the delay line.
// h is an array of coefficient exponents, h[i] for tap i.
module roba_fir #(
  parameter int unsigned TAPS   = roba_pkg::FIR_TAPS,
  parameter int unsigned DATA_W = roba_pkg::FIR_DATA_W,
  parameter int unsigned COEF_W = roba_pkg::FIR_COEF_W
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [DATA_W-1:0]             x,
  input  logic [TAPS-1:0][COEF_W-1:0]   h,
  output logic [DATA_W-1:0]             dataout
);
  // tap[i] = x(n-i); tap[0] is the input itself.
  logic [TAPS-1:0][DATA_W-1:0] tap;
  logic [TAPS-1:0][DATA_W-1:0] prod;
  // acc[i] = sum of prod[0..i]
  logic [TAPS-1:0][DATA_W-1:0] acc;

  assign tap[0] = x;

  for (genvar i = 1; i < TAPS; i++) begin : g_delay
    lut #(.DATA_W(DATA_W)) u_reg (
      .clk(clk), .rst(rst), .d(tap[i-1]), .q(tap[i])
    );
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_mul
    roba_shift #(.DATA_W(DATA_W), .COEF_W(COEF_W)) u_mul (
      .din(tap[i]), .sh(h[i]), .dout(prod[i])
    );
  end

  assign acc[0] = prod[0];

  for (genvar i = 1; i < TAPS; i++) begin : g_add
    compressor4_2_tree #(.DATA_W(DATA_W)) u_add (
      .a(acc[i-1]), .b(prod[i]), .sum(acc[i])
    );
  end

  assign dataout = acc[TAPS-1];
endmodule
