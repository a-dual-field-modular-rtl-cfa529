// tb_delta_counter: random clear / decrement / negate sequences against an
// integer model of delta.
module tb_delta_counter;
  localparam int DW = 8;
  logic          clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, neg = 1'b0, dec = 1'b0;
  logic [DW-1:0] delta;
  logic          is_neg;
  int checks = 0, failures = 0;

  delta_counter #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      clr = ($urandom % 50 == 0); en = 1'($urandom); neg = 1'($urandom); dec = ($urandom % 4 != 0);
      if (clr) m = 0;
      else if (en) m = (neg ? -m : m) - int'(dec);
      if (m < -100 || m > 100) begin m = 0; clr = 1'b1; end
      @(negedge clk);
      checks++;
      if ($signed(delta) != m || is_neg != (m < 0)) begin
        failures++;
        $display("FAIL t=%0d delta=%0d model=%0d", t, $signed(delta), m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
