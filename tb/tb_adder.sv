// tb_adder: checks the 16-bit adder with its 17-bit result on corner cases
// and 20000 random pairs.
module tb_adder;
  logic [15:0] a, b;
  logic [16:0] s;
  int checks = 0, failures = 0;
  adder #(.W(16)) dut (.a(a), .b(b), .s(s));
  task automatic check(int x, int y);
    a = 16'(x); b = 16'(y); #1;
    checks++;
    if (int'(s) != x + y) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d = %0d", x, y, s);
    end
  endtask
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    check(0, 0); check(65535, 65535); check(65535, 1); check(32768, 32768);
    for (int n = 0; n < 20000; n++) check(int'($urandom) & 16'hffff, int'($urandom) & 16'hffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
