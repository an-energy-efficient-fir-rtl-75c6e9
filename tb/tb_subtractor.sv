// tb_subtractor: checks the 17-bit subtractor a - b for a >= b on corner
// cases and 20000 random pairs.
module tb_subtractor;
  logic [16:0] a, b, d;
  int checks = 0, failures = 0;
  subtractor #(.W(17)) dut (.a(a), .b(b), .d(d));
  task automatic check(int x, int y);
    a = 17'(x); b = 17'(y); #1;
    checks++;
    if (int'(d) != x - y) begin
      failures++;
      if (failures < 10) $display("FAIL %0d - %0d = %0d", x, y, d);
    end
  endtask
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int x, y;
    check(0, 0); check(131071, 1); check(65536, 65535); check(4096, 4096);
    for (int n = 0; n < 20000; n++) begin
      x = int'($urandom) & 17'h1ffff;
      y = int'($urandom % 32'(x + 1));
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
