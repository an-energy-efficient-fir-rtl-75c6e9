// tb_sign_detection: exhaustive check over all 8-bit signed pairs that the
// magnitudes are |a| and |b| (|-128| = 128) and sign is set exactly when one
// operand is negative.
module tb_sign_detection;
  logic [7:0] a, b, abs_a, abs_b;
  logic sign;
  int checks = 0, failures = 0;
  sign_detection #(.W(8)) dut (.a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .sign(sign));
  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (int'(abs_a) != (i < 0 ? -i : i) || int'(abs_b) != (j < 0 ? -j : j)
            || sign != ((i < 0) != (j < 0))) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d: %0d %0d %0d", i, j, abs_a, abs_b, sign);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
