// tb_zero_test: carry-save pairs that sum to zero (vc = -vs) and pairs that
// do not, with the two-cycle latency of the registered test, and clr.
module tb_zero_test;
  localparam int W = 37;
  logic         clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [W-1:0] vs = '0, vc = '0;
  logic         is_zero;
  int checks = 0, failures = 0, nzero = 0;

  zero_test #(.W(W), .CHUNK(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [3];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hist = '{0, 0, 0};
    for (int t = 0; t < 1000; t++) begin
      vs = {$urandom, $urandom};
      case ($urandom % 4)
        0, 1: vc = W'(-vs);
        2:    vc = W'(-vs) ^ (W'(1) << ($urandom % W));
        default: vc = {$urandom, $urandom};
      endcase
      if (t % 4 == 0) begin
        vs = '0;
        vc = '0;
      end
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = (W'(vs + vc) == '0);
      if (hist[0]) nzero++;
      @(negedge clk);
      if (t >= 1) begin
        checks++;
        if (is_zero != hist[1]) begin
          failures++;
          $display("FAIL t=%0d is_zero=%0d expected %0d", t, is_zero, hist[1]);
        end
      end
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    checks++;
    if (is_zero) failures++;
    checks++;
    if (nzero < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
