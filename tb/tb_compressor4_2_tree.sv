// tb_compressor4_2_tree: exhaustive check of the 8-bit compressor adder:
// sum must equal (a + b) mod 256 for all 65536 operand pairs.
module tb_compressor4_2_tree;
  logic [7:0] a, b, sum;
  int checks = 0, failures = 0;
  compressor4_2_tree #(.DATA_W(8)) dut (.a(a), .b(b), .sum(sum));
  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (int'(sum) != (i + j) % 256) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d = %0d", i, j, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
