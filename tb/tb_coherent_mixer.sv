// Testbench for coherent_mixer: random offset-binary inputs plus the corner
// values; the registered output must equal floor((a-128)*(b-128)/256) one
// clock after the inputs, and hold it until the next edge.
module tb_coherent_mixer;
  logic clk = 1'b0;
  logic [7:0] bfsk_sig = 8'd128, car_sig = 8'd128;
  logic signed [7:0] out_dem;
  int checks = 0, failures = 0;

  coherent_mixer dut (.clk, .bfsk_sig, .car_sig, .out_dem);

  always #10 clk = ~clk;

  function automatic int model(int a, int b);
    int p;
    p = (a - 128) * (b - 128);
    return (p >= 0) ? p / 256 : -((-p + 255) / 256);   // floor division
  endfunction

  task automatic apply(input int a, input int b);
    bfsk_sig = 8'(a); car_sig = 8'(b);
    @(posedge clk); #1;
    checks++;
    if (int'(out_dem) != model(a, b)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d x %0d -> %0d, want %0d", a, b, out_dem, model(a, b));
    end
  endtask

  initial begin
    int corner [5] = '{0, 1, 128, 254, 255};
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int i = 0; i < 5000; i++) apply(int'($urandom_range(255)), int'($urandom_range(255)));
    // output is registered: changing inputs between edges does not move it
    bfsk_sig = 8'd255; car_sig = 8'd255; #3;
    checks++;
    if (int'(out_dem) == model(255, 255) && model(255, 255) != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
