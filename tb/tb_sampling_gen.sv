// Testbench for sampling_gen: compares the accumulator with n*13422 mod
// 2^24 on every clock, checks that samp is its MSB, that samp_en pulses
// exactly one clock after each rising edge of samp, that the strobe period
// is 1249 or 1250 clocks, and that 400000 clocks (8 ms) hold 320 strobes.
module tb_sampling_gen;
  localparam int unsigned W = 24;
  localparam longint unsigned STEP = 13422;
  localparam int NCYC = 400000;

  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] sam;
  logic samp, samp_en;
  int checks = 0, failures = 0;

  sampling_gen dut (.clk, .rst, .sam, .samp, .samp_en);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit msb_of(longint signed k);
    if (k < 0) return 1'b0;
    return bit'(((64'(k) * STEP) % (64'd1 << W)) >> (W - 1));
  endfunction

  initial begin
    longint unsigned n;
    int last_strobe, strobes, period;
    n = 0; last_strobe = -1; strobes = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(sam == '0 && samp_en == 1'b0, "reset value");
    for (int c = 1; c <= NCYC; c++) begin
      @(posedge clk); #1;
      n++;
      check(sam == W'((n * STEP) % (64'd1 << W)), "accumulator");
      check(samp == sam[W-1], "samp is MSB");
      check(samp_en == (msb_of(n - 1) & ~msb_of(n - 2)), "strobe timing");
      if (samp_en) begin
        strobes++;
        if (last_strobe >= 0) begin
          period = c - last_strobe;
          check(period == 1249 || period == 1250, "strobe period");
        end
        last_strobe = c;
      end
    end
    check(strobes == 320, $sformatf("strobe count %0d", strobes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
