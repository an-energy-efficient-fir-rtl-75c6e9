// tb_lut: checks the delay register: q follows d one clock later, holds
// between edges, and a synchronous reset clears it at the next edge.
module tb_lut;
  logic clk = 0, rst;
  logic [7:0] d, q, prev;
  int checks = 0, failures = 0;
  lut #(.DATA_W(8)) dut (.clk(clk), .rst(rst), .d(d), .q(q));
  always #5 clk = ~clk;
  task automatic expect_q(logic [7:0] e, string what);
    checks++;
    if (q !== e) begin failures++; $display("FAIL %s: q=%0d expected %0d", what, q, e); end
  endtask
  initial begin
    #100_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 1; d = 8'hA5;
    @(posedge clk); #1; expect_q(8'd0, "reset");
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      prev = d;
      @(posedge clk); #1;
      expect_q(prev, "delay");
      d = 8'($urandom);
      #2; expect_q(prev, "hold");
    end
    d = 8'h3C; rst = 1;
    #1; expect_q(prev, "reset is synchronous");
    @(posedge clk); #1; expect_q(8'd0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
