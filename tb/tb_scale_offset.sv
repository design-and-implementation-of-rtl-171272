// Testbench for scale_offset: random 24-bit filter words; the registered
// output must be bits [19:12] plus 128, modulo 256, one clock later.
module tb_scale_offset;
  logic clk = 1'b0;
  logic signed [23:0] k = '0;
  logic [7:0] filter;
  int checks = 0, failures = 0;

  scale_offset dut (.clk, .k, .filter);

  always #10 clk = ~clk;

  initial begin
    int v, want;
    for (int i = 0; i < 3000; i++) begin
      v = (i < 1000) ? int'($urandom_range(400000)) - 200000 : int'($signed(24'($urandom)));
      k = 24'(v);
      @(posedge clk); #1;
      want = ((v >>> 12) + 128) & 255;
      checks++;
      if (int'(filter) != want) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d -> %0d want %0d", v, filter, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
