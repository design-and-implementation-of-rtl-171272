// Testbench for car_ddfs: 40000 sample strobes (one second at 40 kHz), one
// every four clocks.  After each strobe both phases are compared with
// k*503316 and k*880804 mod 2^24, and two clocks after it both carrier
// words with round(128 + 127*cos(2*pi*phase[23:11]/8192)).  Upward
// crossings of mid-scale are counted: one second must hold 1200 and 2100.
module tb_car_ddfs;
  localparam int unsigned W = 24;
  localparam longint unsigned STEP0 = 503316, STEP1 = 880804;
  localparam int NSAMP = 40000;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [W-1:0] phase0, phase1;
  logic [7:0] carr0, carr1;
  int checks = 0, failures = 0;

  car_ddfs dut (.clk, .rst, .en, .phase0, .phase1, .carr0, .carr1);

  always #10 clk = ~clk;

  function automatic int word_of(longint unsigned ph);
    int a;
    a = int'(ph >> 11);
    return $rtoi($floor(128.0 + 127.0 * $cos(TWO_PI * real'(a) / 8192.0) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    longint unsigned k, p0, p1;
    int up0, up1;
    logic [7:0] last0, last1;
    k = 0; up0 = 0; up1 = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(phase0 == '0 && phase1 == '0, "reset phases");
    repeat (2) @(posedge clk);
    #1 check(carr0 == 8'd255 && carr1 == 8'd255, "carriers start at the cosine peak");
    last0 = carr0; last1 = carr1;
    for (int s = 0; s < NSAMP; s++) begin
      en = 1'b1;
      @(posedge clk); #1;
      en = 1'b0;
      k++;
      p0 = (k * STEP0) % (64'd1 << W);
      p1 = (k * STEP1) % (64'd1 << W);
      check(phase0 == W'(p0) && phase1 == W'(p1), "phases");
      @(posedge clk); #1;
      check(int'(carr0) == word_of(p0), $sformatf("carr0 %0d want %0d", carr0, word_of(p0)));
      check(int'(carr1) == word_of(p1), $sformatf("carr1 %0d want %0d", carr1, word_of(p1)));
      if (last0 < 8'd128 && carr0 >= 8'd128) up0++;
      if (last1 < 8'd128 && carr1 >= 8'd128) up1++;
      last0 = carr0; last1 = carr1;
      repeat (2) @(posedge clk);
      #1;
    end
    check(up0 == 1200, $sformatf("carrier 0 cycles per second %0d", up0));
    check(up1 == 2100, $sformatf("carrier 1 cycles per second %0d", up1));
    $display("carrier 0: %0d Hz, carrier 1: %0d Hz", up0, up1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * 4 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
