// tb_roba_fir_top: end-to-end test of the top level at its default sizes
// (5 taps, 8-bit samples, 3-bit exponents, 8x8 multiplier).
//
// Filter: reset, an impulse through every tap (latency i clocks at tap i),
// a long random stream with coefficient changes and an all-ones stream that
// wraps the 8-bit sum, all against a software model of
// sum (x(n-i) >> h[i]) mod 256. Multiplier: random signed pairs and chosen
// operands against a reference that rounds to the nearest power of two by
// search. Each mechanism is counted (reset, each tap's impulse, sum wrap,
// rounding up, rounding down, the 3 -> 2 exception, tie rounding, negative
// product, zero operand); one that never happens is a failure.
module tb_roba_fir_top;
  localparam int TAPS = 5, DW = 8, CW = 3, MW = 8;
  logic clk = 0, rst;
  logic [DW-1:0] x, dataout;
  logic [TAPS-1:0][CW-1:0] h;
  logic [MW-1:0] mul_a, mul_b;
  logic [2*MW-1:0] mul_p;
  int checks = 0, failures = 0;
  int hist [TAPS];
  int n_reset = 0, n_wrap = 0, n_up = 0, n_down = 0, n_three = 0, n_tie = 0,
      n_neg = 0, n_zero = 0;
  int n_tap [TAPS];

  roba_fir_top dut (
    .clk(clk), .rst(rst), .x(x), .h(h), .dataout(dataout),
    .mul_a(mul_a), .mul_b(mul_b), .mul_p(mul_p));

  always #5 clk = ~clk;

  function automatic int fir_model();
    int s = 0;
    for (int i = 0; i < TAPS; i++) s += hist[i] >> h[i];
    if (s > 255) n_wrap++;
    return s % 256;
  endfunction

  task automatic fir_check(string what);
    int e;
    #1;
    hist[0] = x;
    e = fir_model();
    checks++;
    if (dataout != DW'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL fir %s: %0d expected %0d", what, dataout, e);
    end
  endtask

  task automatic fir_step();
    @(posedge clk);
    for (int i = TAPS-1; i > 0; i--) hist[i] = hist[i-1];
    #1;
  endtask

  function automatic int round_ref(int v);
    int lo;
    if (v == 0) return 0;
    if (v == 3) begin n_three++; return 2; end
    lo = 1;
    while (lo * 2 <= v) lo *= 2;
    if (v == lo) return lo;
    if ((v - lo) == (2 * lo - v)) n_tie++;
    if ((v - lo) >= (2 * lo - v)) begin n_up++; return 2 * lo; end
    n_down++;
    return lo;
  endfunction

  task automatic mul_check(int sa, int sb);
    int ma, mb, ra, rb, m, e;
    ma = sa < 0 ? -sa : sa;
    mb = sb < 0 ? -sb : sb;
    ra = round_ref(ma);
    rb = round_ref(mb);
    m  = rb * ma + ra * mb - ra * rb;
    e  = ((sa < 0) != (sb < 0)) ? -m : m;
    if (e < 0) n_neg++;
    if (ma == 0 || mb == 0) n_zero++;
    mul_a = MW'(sa); mul_b = MW'(sb);
    #1;
    checks++;
    if (int'($signed(mul_p)) != e) begin
      failures++;
      if (failures < 10) $display("FAIL mult %0d * %0d = %0d expected %0d", sa, sb, $signed(mul_p), e);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < TAPS; i++) n_tap[i] = 0;
    mul_a = '0; mul_b = '0;
    // Fill the delay line with non-zero data, then reset it.
    rst = 0; h = '0; x = 8'd9;
    for (int i = 0; i < TAPS; i++) @(posedge clk);
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    x = 8'd0;
    #1;
    checks++;
    if (dataout == 8'd0) n_reset++;
    else begin failures++; $display("FAIL reset left %0d", dataout); end
    for (int i = 0; i < TAPS; i++) hist[i] = 0;

    // Impulse of 200 through every tap with weights 2^-(i mod 3): tap i
    // must show 200 >> (i mod 3) exactly i clocks after the impulse.
    for (int i = 0; i < TAPS; i++) h[i] = CW'(i % 3);
    x = 8'd200;
    fir_check("impulse");
    for (int n = 0; n < TAPS; n++) begin
      checks++;
      if (dataout == DW'(200 >> (n % 3))) n_tap[n]++;
      else begin failures++; $display("FAIL impulse at tap %0d: %0d", n, dataout); end
      fir_step();
      x = 8'd0;
      fir_check("impulse");
    end

    // Random stream, coefficients change every 64 samples.
    for (int n = 0; n < 2000; n++) begin
      if (n % 64 == 0) h = (TAPS*CW)'($urandom);
      x = DW'($urandom);
      fir_check("random");
      fir_step();
    end
    h = '0;
    for (int n = 0; n < TAPS + 1; n++) begin x = 8'd255; fir_check("wrap"); fir_step(); end

    // Multiplier: the four operand pairs of the reference simulation, the
    // 3 -> 2 exception, zero, and random pairs.
    mul_check(-17, -28); mul_check(-18, 27); mul_check(-15, 30); mul_check(24, 16);
    mul_check(3, -5); mul_check(0, 100); mul_check(-128, -128); mul_check(127, -1);
    for (int n = 0; n < 5000; n++) mul_check(int'($signed(8'($urandom))), int'($signed(8'($urandom))));

    if (n_reset == 0) begin failures++; $display("FAIL reset never exercised"); end
    for (int i = 0; i < TAPS; i++)
      if (n_tap[i] == 0) begin failures++; $display("FAIL tap %0d never exercised", i); end
    if (n_wrap == 0)  begin failures++; $display("FAIL sum never wrapped"); end
    if (n_up == 0)    begin failures++; $display("FAIL no rounding up"); end
    if (n_down == 0)  begin failures++; $display("FAIL no rounding down"); end
    if (n_three == 0) begin failures++; $display("FAIL no 3 -> 2 rounding"); end
    if (n_tie == 0)   begin failures++; $display("FAIL no tie rounding"); end
    if (n_neg == 0)   begin failures++; $display("FAIL no negative product"); end
    if (n_zero == 0)  begin failures++; $display("FAIL no zero operand"); end
    $display("mechanisms: reset=%0d wrap=%0d round_up=%0d round_down=%0d three=%0d tie=%0d neg=%0d zero=%0d",
             n_reset, n_wrap, n_up, n_down, n_three, n_tie, n_neg, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
