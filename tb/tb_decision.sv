// Testbench for decision: random channel levels with many ties; z must be
// 0 after y0 > y1, 1 after y1 > y0, unchanged after a tie, and 0 after reset.
module tb_decision;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] y0 = '0, y1 = '0;
  logic z;
  int checks = 0, failures = 0, ties = 0;

  decision dut (.clk, .rst, .y0, .y1, .z);

  always #10 clk = ~clk;

  initial begin
    logic want;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (z != 1'b0) failures++;
    rst = 1'b0;
    want = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      y0 = 8'($urandom_range(140, 120));
      y1 = 8'($urandom_range(140, 120));
      @(posedge clk); #1;
      if (y0 > y1) want = 1'b0;
      else if (y1 > y0) want = 1'b1;
      else ties++;
      checks++;
      if (z != want) begin
        failures++;
        if (failures < 10) $display("FAIL y0=%0d y1=%0d z=%0d", y0, y1, z);
      end
    end
    checks++;
    if (ties < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
