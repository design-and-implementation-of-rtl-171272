// Testbench for cos_rom: reads all 8192 words in a scrambled order and
// compares each, one clock after its address, with
// round(128 + 127*cos(2*pi*k/8192)) computed here; also checks the
// extremes 255 (k = 0), 1 (k = 4096) and 128 at a quarter period.
module tb_cos_rom;
  localparam int unsigned AW = 13;
  localparam int unsigned N = 2 ** AW;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [7:0] q;
  int checks = 0, failures = 0;

  cos_rom dut (.clk, .addr, .q);

  always #10 clk = ~clk;

  function automatic int expect_word(int k);
    return $rtoi($floor(128.0 + 127.0 * $cos(TWO_PI * real'(k) / real'(N)) + 0.5));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int k;
    for (int i = 0; i < N; i++) begin
      k = (i * 2731 + 17) % N;            // 2731 is odd: visits every word
      addr = AW'(k);
      @(posedge clk); #1;
      check(int'(q) == expect_word(k), $sformatf("word %0d = %0d", k, q));
    end
    addr = 0;    @(posedge clk); #1 check(q == 8'd255, "peak");
    addr = 4096; @(posedge clk); #1 check(q == 8'd1, "trough");
    addr = 2048; @(posedge clk); #1 check(q == 8'd128, "quarter");
    // registered read: the output does not follow the address before the edge
    addr = 0; #2 check(q == 8'd128, "registered read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
