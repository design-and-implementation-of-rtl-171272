// Testbench for bfsk_ddfs: random carrier samples and data bits; the output
// must be carrier 1 for bit 1 and carrier 0 for bit 0.
module tb_bfsk_ddfs;
  logic [7:0] car0, car1, bfsk;
  logic data;
  int checks = 0, failures = 0, ones = 0;

  bfsk_ddfs dut (.car0, .car1, .data, .bfsk);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      car0 = 8'($urandom); car1 = 8'($urandom); data = 1'($urandom);
      #5;
      checks++;
      if (bfsk != (data ? car1 : car0)) begin
        failures++;
        if (failures < 10) $display("FAIL data=%0d car0=%0d car1=%0d bfsk=%0d", data, car0, car1, bfsk);
      end
      ones += int'(data);
    end
    checks++;
    if (ones < 100 || ones > 1900) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
