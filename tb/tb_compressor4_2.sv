// tb_compressor4_2: exhaustive check of the 4:2 compressor cell over all 32
// input patterns: the weighted outputs must count the ones,
// sum + 2*(carry + cout) = x1+x2+x3+x4+cin, and cout must not depend on cin.
module tb_compressor4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout, cout0;
  int checks = 0, failures = 0;
  compressor4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                     .sum(sum), .carry(carry), .cout(cout));
  initial begin
    #100_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      cin = 0; #1; cout0 = cout;
      for (int c = 0; c < 2; c++) begin
        cin = 1'(c); #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(v) + c) begin
          failures++; $display("FAIL inputs %b cin %0d: sum %0d carry %0d cout %0d", 4'(v), c, sum, carry, cout);
        end
        checks++;
        if (cout != cout0) begin failures++; $display("FAIL cout depends on cin"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
