// tb_umd_sizes: operand-size sweep on the full-size divider (N = 512).
//
// For each operand size n in {128, 160, 192, 224, 256, 512} it computes
// integer-domain inverses (X = 1) and divisions of random operands, with an
// n-bit prime in GF(p) and an irreducible degree-n pentanomial in GF(2^n),
// on the same 512-bit hardware. Results are checked by multiplying back and
// against the reference model; the iterations per bit are printed per size
// and field, and bounded by 2n+2 in GF(2^n) and 2.5n in GF(p).
module tb_umd_sizes;
  import tb_umd_ref_pkg::*;

  localparam int N     = 512;
  localparam int NSZ   = 6;
  localparam int PER   = 10;     // operations per size and field

  localparam int SIZES [NSZ] = '{128, 160, 192, 224, 256, 512};
  localparam logic [511:0] PRIMES [NSZ] = '{
    512'hea46ecf954366c219c3ecb54c5cefdd9,
    512'h815b29f219d22b977805ec944d3b8462577adfd5,
    512'hff1e84d2bdde6946a3103d722190d8d58420ca1dcf5cb235,
    512'hce5670e55a416f043be1dd1d8c5a5b374c6988d7e72acbc989f14b63,
    512'h861a48ada0995c4b13562b21c57f3f6d376ff541f13fed93b510c539937ff02b,
    512'hfbff80c4cb28805919aa919178c1f38916cf9ddd5ae75e0d7d3222ad73b0075c0b4518854d885ffad7626c72bca15d17173127dfc4d6106e7857006d50bd68c7};
  // middle terms (a, b, c) of x^n + x^a + x^b + x^c + 1
  localparam int TERMS [NSZ][3] = '{'{7, 2, 1}, '{5, 3, 2}, '{7, 2, 1}, '{9, 8, 3}, '{10, 5, 2}, '{8, 5, 2}};

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
    repeat (NSZ * 2 * PER * (6 * N + 100)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t pv, xv, yv, zr, prod;
    int   it, n, sum_it, cyc;
    bit   ok, dneg, gfp;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSZ; s++) begin
      n = SIZES[s];
      for (int f = 1; f >= 0; f--) begin
        gfp = 1'(f);
        if (gfp) pv = big_t'(PRIMES[s]);
        else     pv = (big_t'(1) << n) | (big_t'(1) << TERMS[s][0]) | (big_t'(1) << TERMS[s][1]) |
                      (big_t'(1) << TERMS[s][2]) | big_t'(1);
        sum_it = 0;
        for (int k = 0; k < PER; k++) begin
          do begin
            xv = (k == 0) ? big_t'(1) : rand_bits(n);
            yv = rand_bits(n);
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
          prod = gfp ? mulmod_p(big_t'(z), yv, pv, n) : mulmod_2n(big_t'(z), yv, pv, n);
          checks += 4;
          if (!done || big_t'(z) != zr) begin
            failures++;
            $display("FAIL n=%0d gfp=%0d quotient mismatch", n, gfp);
          end
          if (prod != xv) begin
            failures++;
            $display("FAIL n=%0d gfp=%0d product check", n, gfp);
          end
          if (iterations != 32'(it + 1)) begin
            failures++;
            $display("FAIL n=%0d gfp=%0d iterations %0d reference %0d", n, gfp, iterations, it);
          end
          if (gfp ? (int'(iterations) > (5 * n) / 2) : (int'(iterations) > 2 * n + 2)) begin
            failures++;
            $display("FAIL n=%0d gfp=%0d iterations %0d above bound", n, gfp, iterations);
          end
          sum_it += int'(iterations);
        end
        $display("n=%0d %s: mean %0.1f iterations, %0.2f per bit, %0.2f clk cycles per bit",
                 n, gfp ? "GF(p)   " : "GF(2^n) ", real'(sum_it) / PER, real'(sum_it) / (PER * n),
                 2.0 * real'(sum_it) / (PER * n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
