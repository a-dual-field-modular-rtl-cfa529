// tb_umd_regs: initial load (C=Y, D=p, U=X, W=0) and random write-backs of
// the datapath results into C or D and U or W, against a register model.
module tb_umd_regs;
  localparam int W = 16;
  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic         load_c = 1'b0, load_d = 1'b0, load_u = 1'b0, load_w = 1'b0;
  logic [W-1:0] y = '0, p = '0, x = '0, cout_s = '0, cout_c = '0, uout_s = '0, uout_c = '0;
  logic [W-1:0] rc_s, rc_c, rd_s, rd_c, ru_s, ru_c, rw_s, rw_c;
  int checks = 0, failures = 0;

  umd_regs #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8*W-1:0] m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      {y, p, x} = {$urandom, $urandom};
      {cout_s, cout_c, uout_s, uout_c} = {$urandom, $urandom};
      load = ($urandom % 10 == 0);
      {load_c, load_d, load_u, load_w} = 4'($urandom);
      if (load) m = {y, W'(0), p, W'(0), x, W'(0), W'(0), W'(0)};
      else begin
        if (load_c) m[8*W-1:6*W] = {cout_s, cout_c};
        if (load_d) m[6*W-1:4*W] = {cout_s, cout_c};
        if (load_u) m[4*W-1:2*W] = {uout_s, uout_c};
        if (load_w) m[2*W-1:0]   = {uout_s, uout_c};
      end
      @(negedge clk);
      checks++;
      if ({rc_s, rc_c, rd_s, rd_c, ru_s, ru_c, rw_s, rw_c} != m) begin
        failures++;
        $display("FAIL t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
