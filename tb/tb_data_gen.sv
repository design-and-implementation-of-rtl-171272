// Testbench for data_gen: enables the accumulator on every third clock,
// compares it with k*41943 mod 2^24 after each enabled edge, checks that it
// holds between enables, and that the data bit stays 200 or 201 samples
// in each level (100 Hz at a 40 kHz sample rate).
module tb_data_gen;
  localparam int unsigned W = 24;
  localparam longint unsigned STEP = 41943;
  localparam int NSAMP = 2500;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [W-1:0] data;
  logic data_bit;
  int checks = 0, failures = 0;

  data_gen dut (.clk, .rst, .en, .data, .data_bit);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    longint unsigned k;
    int run, edges;
    logic last;
    k = 0; run = 0; edges = 0; last = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(data == '0, "reset value");
    for (int s = 0; s < NSAMP; s++) begin
      en = 1'b1;
      @(posedge clk); #1;
      en = 1'b0;
      k++;
      check(data == W'((k * STEP) % (64'd1 << W)), "accumulator");
      check(data_bit == data[W-1], "data bit is MSB");
      if (data_bit != last) begin
        if (edges > 0) check(run == 200 || run == 201, $sformatf("half period %0d", run));
        edges++;
        run = 0;
      end
      run++;
      last = data_bit;
      repeat (2) @(posedge clk);
      #1 check(data == W'((k * STEP) % (64'd1 << W)), "hold without enable");
    end
    check(edges >= 12, "edge count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * 3 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
