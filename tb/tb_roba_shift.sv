// tb_roba_shift: exhaustive check of the tap multiplier: for every 8-bit
// sample and every 3-bit exponent, dout must equal floor(din / 2^sh).
module tb_roba_shift;
  logic [7:0] din, dout;
  logic [2:0] sh;
  int checks = 0, failures = 0;
  roba_shift #(.DATA_W(8), .COEF_W(3)) dut (.din(din), .sh(sh), .dout(dout));
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int d = 0; d < 256; d++)
      for (int s = 0; s < 8; s++) begin
        din = 8'(d); sh = 3'(s); #1;
        checks++;
        if (int'(dout) != d / (1 << s)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d >> %0d = %0d", d, s, dout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
