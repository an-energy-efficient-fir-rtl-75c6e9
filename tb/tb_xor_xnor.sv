// tb_xor_xnor: truth-table check of the XOR-XNOR pair.
module tb_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;
  localparam logic [3:0] XOR_TT = 4'b0110;   // indexed by {a, b}
  xor_xnor dut (.a(a), .b(b), .x(x), .xn(xn));
  initial begin
    #100_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); #1;
      checks += 2;
      if (x  != XOR_TT[v])  begin failures++; $display("FAIL xor %b", 2'(v)); end
      if (xn != !XOR_TT[v]) begin failures++; $display("FAIL xnor %b", 2'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
