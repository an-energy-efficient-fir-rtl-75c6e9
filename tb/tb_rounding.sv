// tb_rounding: exhaustive check of rounding to the nearest power of two for
// all 8-bit values. Reference: pick the lower and upper powers of two
// around the value and take the closer one, the upper on a tie, except that
// 3 goes to 2 and 0 stays 0. Also checks exp = log2(ar) and the zero flag,
// and a few hand-worked cases (5 -> 4, 6 -> 8, 127 -> 128, 255 -> 256).
module tb_rounding;
  logic [7:0] a;
  logic [8:0] ar;
  logic [3:0] exp;
  logic zero;
  int checks = 0, failures = 0;
  rounding #(.W(8)) dut (.a(a), .ar(ar), .exp(exp), .zero(zero));

  function automatic int ref_round(int v);
    int lo;
    if (v == 0) return 0;
    if (v == 3) return 2;
    lo = 1;
    while (lo * 2 <= v) lo *= 2;
    return ((v - lo) >= (2 * lo - v)) ? 2 * lo : lo;
  endfunction

  task automatic check(int v, int e);
    a = 8'(v); #1;
    checks++;
    if (int'(ar) != e || (e != 0 && (1 << exp) != e) || zero != (v == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d: ar=%0d exp=%0d zero=%0d expected %0d", v, ar, exp, zero, e);
    end
  endtask

  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    check(5, 4); check(6, 8); check(3, 2); check(2, 2); check(1, 1);
    check(127, 128); check(255, 256); check(96, 128); check(95, 64);
    for (int v = 0; v < 256; v++) check(v, ref_round(v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
