// tb_adder_latch: the storage between the adders captures when en is high
// (phase phi1) and holds through the following cycles (phi2).
module tb_adder_latch;
  localparam int W = 16;
  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d_s = '0, d_c = '0, q_s, q_c;
  int checks = 0, failures = 0;

  adder_latch #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] es = '0, ec = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q_s != '0 || q_c != '0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      d_s = W'($urandom); d_c = W'($urandom); en = 1'($urandom);
      if (en) begin es = d_s; ec = d_c; end
      @(negedge clk);
      checks++;
      if (q_s != es || q_c != ec) begin
        failures++;
        $display("FAIL t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
