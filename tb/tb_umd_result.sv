// tb_umd_result: final conversion of W. GF(p): random carry-save W in
// (-4p, 4p) and D = +1 or -1 must give (D*W) mod p within a few cycles.
// GF(2^n): z is the sum vector of W, in one cycle.
module tb_umd_result;
  localparam int N = 16;
  localparam int W = N + 5;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, fsel = 1'b1;
  logic [W-1:0] ws = '0, wc = '0, ds = '0, dc = '0, p = '0;
  logic [N-1:0] z;
  logic         done;
  int checks = 0, failures = 0;

  umd_result #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint pv, wv, dv, ez;
    int     cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      fsel = (t % 4 != 0);
      pv = longint'($urandom % (1 << N)) | (1 << (N - 1)) | 1;
      if (fsel) begin
        wv = longint'($urandom % (8 * pv)) - 4 * pv;
        dv = ($urandom % 2) ? 1 : -1;
        ws = W'($urandom); wc = W'(wv) - ws;
        ds = W'($urandom); dc = W'(dv) - ds;
        ez = (dv * wv) % pv;
        if (ez < 0) ez += pv;
      end else begin
        ws = W'($urandom % (1 << N)); wc = '0;
        ds = W'($urandom); dc = W'(1) - ds;
        ez = longint'(ws);
      end
      p = W'(pv);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 20) begin
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (!done || longint'(z) != ez) begin
        failures++;
        $display("FAIL fsel=%0d W=%0d p=%0d z=%0d expected %0d", fsel, wv, pv, z, ez);
      end
      if (cyc > 12) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
