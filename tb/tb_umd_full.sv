// tb_umd_full: the divider at its default size, N = 512.
//
// Runs inversions, Montgomery-domain inversions (X = r = 2^N or x^N mod p,
// giving Y^-1 * r) and divisions with a fixed 512-bit prime and with the
// field polynomial x^512 + x^8 + x^5 + x^2 + 1, on pseudo-random operands.
// Each result is checked against the plain reference model (quotient and
// iteration count) and by multiplying back, Z * Y == X mod p; the cycle
// count is checked against the two-cycles-per-iteration schedule.
module tb_umd_full;
  import tb_umd_ref_pkg::*;

  localparam int N = 512;
  localparam logic [N:0] P_PRIME = {1'b0, 512'h969067fbd3797379f4bcf11baa85cd6102409484704e3636100e44d756b2fc0fe3ffedb66bd44acdb5f5842d83be43900e2806fca96042fb126e3664488383bf};
  localparam logic [N:0] P_POLY  = (513'(1) << 512) | 513'h125;   // x^512+x^8+x^5+x^2+1
  localparam int NOPS = 10;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, field = 1'b1;
  logic [N-1:0] x = '0, y = '0;
  logic [N:0]   p = '0;
  logic         busy, done;
  logic [N-1:0] z;
  logic [31:0]  iterations;

  umd_divider dut (
    .clk(clk), .rst_n(rst_n), .start(start), .field(field), .x(x), .y(y), .p(p),
    .busy(busy), .done(done), .z(z), .iterations(iterations)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic big_t rand_bits(int n);
    big_t r = '0;
    for (int i = 0; i < n; i++) r[i] = 1'($urandom);
    return r;
  endfunction

  initial begin : watchdog
    repeat (NOPS * (6 * N + 100)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t pv, xv, yv, zr, prod;
    int   it, cyc;
    bit   ok, dneg, gfp;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      gfp = (op % 2 == 0);
      pv  = gfp ? big_t'(P_PRIME) : big_t'(P_POLY);
      do begin
        if (op < 2)      xv = big_t'(1);
        else if (op < 4) xv = gfp ? (big_t'(1) <<< N) - pv : pv ^ (big_t'(1) << N);  // r = 2^N (x^N) mod p
        else             xv = rand_bits(N);
        yv = rand_bits(N);
        if (gfp) begin
          while (xv >= pv) xv = xv - pv;
          while (yv >= pv) yv = yv - pv;
        end
        umd_ref(xv, yv, pv, gfp, zr, it, ok, dneg);
      end while (yv == 0 || !ok);
      @(negedge clk);
      field = gfp; x = xv[N-1:0]; y = yv[N-1:0]; p = pv[N:0];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 6 * N + 50) begin
        @(negedge clk);
        cyc++;
      end
      prod = gfp ? mulmod_p(big_t'(z), yv, pv, N) : mulmod_2n(big_t'(z), yv, pv, N);
      $display("%s %s: %0d iterations (%0.2f per bit), %0d cycles",
               gfp ? "GF(p)   " : "GF(2^n) ", (op < 2) ? "inverse " : (op < 4) ? "Montgomery inverse" : "division",
               iterations, real'(iterations) / N, cyc);
      checks += 4;
      if (!done || z != zr[N-1:0]) begin
        failures++;
        $display("FAIL quotient z=%h expected %h", z, zr[N-1:0]);
      end
      if (prod != xv) begin
        failures++;
        $display("FAIL product check");
      end
      if (iterations != 32'(it + 1)) begin
        failures++;
        $display("FAIL iterations %0d, reference %0d (+1)", iterations, it);
      end
      if (cyc < 2 * int'(iterations) + 3 || cyc > 2 * int'(iterations) + 12) begin
        failures++;
        $display("FAIL cycle count %0d", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
