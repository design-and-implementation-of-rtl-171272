// Testbench for fir_lpf at its full size (251 taps, 450 Hz at 40 kHz).
//
// The tap values are derived here on their own: a Hamming-windowed sinc,
// scaled to unity DC gain, times 4096, rounded.  The filter is then fed
//   1. an impulse of height 1: the 251 outputs must be the taps themselves;
//   2. random samples in -64..63: every output must equal the convolution
//      computed here;
//   3. a constant 31: the settled output must be 31 times the tap sum
//      (about 31*4096), the DC gain the design is meant to have.
// Every result must arrive exactly 251 clocks after the strobe that
// delivered its sample, and the output must stay zero until the impulse,
// which shows the sample history is cleared after reset.
module tb_fir_lpf;
  localparam int TAPS = 251;
  localparam real PI = 3.14159265358979;
  localparam int GAP = 300;                 // clocks between sample strobes

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [7:0] din = '0;
  logic signed [23:0] sout;
  logic sout_valid;
  int checks = 0, failures = 0;
  int h [TAPS];
  int x [$];

  fir_lpf dut (.clk, .rst, .en, .din, .sout, .sout_valid);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int conv();
    int acc;
    acc = 0;
    for (int i = 0; i < TAPS; i++)
      if (x.size() - 1 - i >= 0) acc += h[i] * x[x.size() - 1 - i];
    return acc;
  endfunction

  // One sample: strobe, then wait for the result and compare.
  task automatic push(input int v);
    int lat;
    din = 8'(v);
    x.push_back(v);
    en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    lat = 0;
    while (!sout_valid && lat < GAP) begin
      @(posedge clk); #1;
      lat++;
    end
    check(lat == TAPS, $sformatf("latency %0d", lat));
    check(int'(sout) == conv(), $sformatf("output %0d want %0d", sout, conv()));
    repeat (GAP - lat - 1) @(posedge clk);
    #1;
  endtask

  initial begin
    real raw [TAPS];
    real sum, wc, t;
    int hsum;
    sum = 0.0; wc = 2.0 * 450.0 / 40000.0;
    for (int n = 0; n < TAPS; n++) begin
      t = real'(n - (TAPS - 1) / 2);
      raw[n] = (t == 0.0 ? wc : $sin(PI * wc * t) / (PI * t))
             * (0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(TAPS - 1)));
      sum += raw[n];
    end
    hsum = 0;
    for (int n = 0; n < TAPS; n++) begin
      h[n] = $rtoi($floor(raw[n] / sum * 4096.0 + 0.5));
      hsum += h[n];
    end
    check(h[125] > 80 && h[125] < 100 && h[0] == h[TAPS-1], "tap shape");

    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (TAPS + 5) @(posedge clk);
    #1 check(sout == '0, "clear after reset");

    // 1. impulse response
    push(1);
    check(int'(sout) == h[0], "impulse first tap");
    for (int n = 1; n < TAPS; n++) begin
      push(0);
      check(int'(sout) == h[n], $sformatf("impulse tap %0d: %0d want %0d", n, sout, h[n]));
    end
    // 2. random input
    for (int n = 0; n < 300; n++) push(int'($urandom_range(127)) - 64);
    // 3. DC gain
    for (int n = 0; n < TAPS; n++) push(31);
    check(int'(sout) == 31 * hsum, "DC gain");
    check(hsum > 4080 && hsum < 4112, $sformatf("tap sum %0d", hsum));
    $display("tap sum %0d, centre tap %0d", hsum, h[125]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((TAPS * 2 + 400) * GAP) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
