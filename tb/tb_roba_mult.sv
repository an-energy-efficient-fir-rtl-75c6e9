// tb_roba_mult: exhaustive self-checking test of the 8x8 signed RoBA
// multiplier. The reference rounds each magnitude by searching for the
// nearest power of two (ties upward, 3 -> 2) and evaluates
// B_r*|A| + A_r*|B| - A_r*B_r with the product sign, independently of the
// RTL's leading-one logic. It also checks four operand pairs against hand-
// worked RoBA values. The block is combinational: outputs are sampled 1 ns
// after the inputs change.
module tb_roba_mult;
  localparam int W = 8;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  roba_mult #(.W(W)) dut (.a(a), .b(b), .p(p));

  function automatic int nearest_pow2(int v);
    int lo;
    if (v == 0) return 0;
    if (v == 3) return 2;
    lo = 1;
    while (lo * 2 <= v) lo *= 2;
    return ((v - lo) >= (2 * lo - v)) ? 2 * lo : lo;
  endfunction

  function automatic int roba_ref(int sa, int sb);
    int ma, mb, ra, rb, m;
    ma = sa < 0 ? -sa : sa;
    mb = sb < 0 ? -sb : sb;
    ra = nearest_pow2(ma);
    rb = nearest_pow2(mb);
    m  = rb * ma + ra * mb - ra * rb;
    return ((sa < 0) != (sb < 0)) ? -m : m;
  endfunction

  task automatic check(int sa, int sb, int expected);
    a = W'(sa); b = W'(sb);
    #1;
    checks++;
    if ($signed(p) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d expected %0d", sa, sb, $signed(p), expected);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Hand-worked values: 17 -> 16, 28 -> 32: 32*17 + 16*28 - 512 = 480.
    check(-17, -28,  480);
    check(-18,  27, -496);   // 18 -> 16, 27 -> 32
    check(-15,  30, -448);   // 15 -> 16, 30 -> 32
    check( 24,  16,  384);   // 24 is a tie -> 32: 16*24 + 32*16 - 512
    check(  3,   3,    8);   // 3 -> 2: 2*3 + 2*3 - 4
    check(  0, -77,    0);
    for (int i = -(1 << (W-1)); i < (1 << (W-1)); i++)
      for (int j = -(1 << (W-1)); j < (1 << (W-1)); j++)
        check(i, j, roba_ref(i, j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
