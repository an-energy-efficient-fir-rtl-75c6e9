// tb_shifter: checks dout = din * 2^exp (and 0 when zero is set) for all
// 8-bit inputs and exponents 0..8, against multiplication.
module tb_shifter;
  logic [7:0] din;
  logic [3:0] exp;
  logic zero;
  logic [15:0] dout;
  int checks = 0, failures = 0;
  shifter #(.IN_W(8), .OUT_W(16), .SH_W(4)) dut (.din(din), .exp(exp), .zero(zero), .dout(dout));
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int d = 0; d < 256; d++)
      for (int e = 0; e <= 8; e++)
        for (int z = 0; z < 2; z++) begin
          din = 8'(d); exp = 4'(e); zero = 1'(z); #1;
          checks++;
          if (int'(dout) != (z ? 0 : d * (2 ** e))) begin
            failures++;
            if (failures < 10) $display("FAIL %0d * 2^%0d zero=%0d: %0d", d, e, z, dout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
