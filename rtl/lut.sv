// lut: one z^-1 element of the FIR delay line, a DATA_W-bit register.
//
// The reference schematic labels these cells "LUT" and the name is kept,
// but the cell is a plain register: q takes d on every rising clock edge.
// rst is active high and synchronous and clears q to zero (the reset
// polarity and style are this design's choice). Latency: one clock.
module lut #(
  parameter int unsigned DATA_W = roba_pkg::FIR_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
