// tb_mod4_test: exhaustive test of the (C + D) mod 4 != 0 decision.
module tb_mod4_test;
  logic [1:0] cs, cc, ds, dc;
  logic       ne0;
  int checks = 0, failures = 0;

  mod4_test dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {cs, cc, ds, dc} = 8'(v);
      #1;
      checks++;
      if (ne0 != (((int'(cs) + int'(cc) + int'(ds) + int'(dc)) % 4) != 0)) begin
        failures++;
        $display("FAIL %b", v[7:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
