// tb_roba_fir: self-checking test of the 5-tap RoBA FIR filter.
// A software model keeps the last TAPS input samples and computes
// sum (x(n-i) >> h[i]) mod 2^8. The test checks: reset clears the delay
// line; an impulse of 128 comes out at tap i exactly i clocks later,
// weighted by 2^-h[i] (latency check); and 400 cycles of random samples
// with coefficients changed every 50 cycles, which also makes the 8-bit
// sum wrap. dataout is combinational, so it is sampled before each edge.
module tb_roba_fir;
  localparam int TAPS = 5, DW = 8, CW = 3;
  logic clk = 0, rst;
  logic [DW-1:0] x;
  logic [TAPS-1:0][CW-1:0] h;
  logic [DW-1:0] dataout;
  int checks = 0, failures = 0, wraps = 0;
  int hist [TAPS];   // hist[i] = x(n-i) of the model

  roba_fir #(.TAPS(TAPS), .DATA_W(DW), .COEF_W(CW)) dut (
    .clk(clk), .rst(rst), .x(x), .h(h), .dataout(dataout));

  always #5 clk = ~clk;

  function automatic int model();
    int s = 0;
    for (int i = 0; i < TAPS; i++) s += hist[i] >> h[i];
    if (s > 255) wraps++;
    return s % 256;
  endfunction

  task automatic check_out(string what);
    int e;
    #1;
    hist[0] = x;
    e = model();
    checks++;
    if (dataout != DW'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: dataout=%0d expected %0d", what, dataout, e);
    end
  endtask

  task automatic step();   // clock edge; model shifts its delay line
    @(posedge clk);
    for (int i = TAPS-1; i > 0; i--) hist[i] = hist[i-1];
    #1;
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h = '0; x = 8'hff; rst = 1;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    // After reset only tap 0 (= x) contributes.
    x = 8'd77; h = {3'd0, 3'd1, 3'd2, 3'd3, 3'd0};   // h[0]=0, h[1]=3, ...
    check_out("after reset");
    checks++;
    if (dataout != 8'd77) begin failures++; $display("FAIL reset did not clear"); end
    // Impulse: 128 enters, then zeros. Tap i shows 128 >> h[i] at cycle i.
    h = {3'd4, 3'd3, 3'd2, 3'd1, 3'd0};   // h[i] = i
    x = 8'd128;
    check_out("impulse");
    for (int n = 1; n < TAPS + 2; n++) begin
      step();
      x = 8'd0;
      check_out("impulse");
      checks++;
      if (dataout != ((n < TAPS) ? DW'(128 >> n) : DW'(0))) begin
        failures++;
        $display("FAIL impulse at cycle %0d: %0d", n, dataout);
      end
    end
    // Random run.
    for (int n = 0; n < 400; n++) begin
      if (n % 50 == 0) h = (TAPS*CW)'($urandom);
      x = DW'($urandom);
      check_out("random");
      step();
    end
    // All-ones samples with no attenuation must wrap: 5*255 mod 256 = 251.
    h = '0;
    for (int n = 0; n < TAPS; n++) begin x = 8'd255; check_out("wrap"); step(); end
    x = 8'd255; check_out("wrap");
    checks++;
    if (dataout != 8'd251) begin failures++; $display("FAIL wrap %0d", dataout); end
    if (wraps == 0) begin failures++; $display("FAIL sum never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
