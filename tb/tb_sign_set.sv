// tb_sign_set: checks that the 16-bit magnitude is passed through when the
// sign is 0 and negated (two's complement) when it is 1, for every
// magnitude up to 2^15.
module tb_sign_set;
  logic [15:0] mag, p;
  logic sign;
  int checks = 0, failures = 0;
  sign_set #(.W(16)) dut (.mag(mag), .sign(sign), .p(p));
  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int m = 0; m <= 32768; m++)
      for (int s = 0; s < 2; s++) begin
        mag = 16'(m); sign = 1'(s); #1;
        checks++;
        if (int'($signed(p)) != (s ? -m : m) && !(m == 32768)) begin
          failures++;
          if (failures < 10) $display("FAIL mag %0d sign %0d: %0d", m, s, $signed(p));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
