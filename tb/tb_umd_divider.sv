// tb_umd_divider: end-to-end test of the unified modular divider.
//
// Runs random divisions and inversions at a reduced operand width (N = 24)
// in both fields. Every result is checked two ways: against the plain
// reference model of the algorithm (quotient and iteration count; the
// hardware reports one extra iteration for its registered zero test), and
// by multiplying back, Z * Y == X mod p. The cycle count of each division is
// checked against the two-cycles-per-iteration schedule. Counters record
// that every mechanism occurred: C/D swaps, k = -1 steps, even-C steps,
// carry-save wrap corrections, D = -1 at the end, and the result reduction.
module tb_umd_divider;
  import tb_umd_ref_pkg::*;

  localparam int N      = 24;
  localparam int NOPS   = 300;
  localparam int W      = N + 5;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, field = 1'b1;
  logic [N-1:0] x = '0, y = '0;
  logic [N:0]   p = '0;
  logic         busy, done;
  logic [N-1:0] z;
  logic [31:0]  iterations;

  umd_divider #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .field(field), .x(x), .y(y), .p(p),
    .busy(busy), .done(done), .z(z), .iterations(iterations)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap = 0, n_kneg = 0, n_even = 0, n_wrap = 0, n_dneg = 0, n_corr = 0;
  int n_gfp = 0, n_gf2 = 0, n_inv = 0;

  // Mechanism counters, sampled on every iteration's phi2.
  always @(posedge clk) if (rst_n && dut.phase) begin
    if (dut.u_ctrl.swap) n_swap++;
    if (dut.mn)          n_kneg++;
    if (dut.mz)          n_even++;
    if (dut.fsel && (dut.u_dp.r2_s[W-1:W-2] == dut.u_dp.r2_c[W-1:W-2]) &&
        (dut.u_dp.r2_s[W-1] != dut.u_dp.r2_s[W-2])) n_wrap++;
  end
  always @(posedge clk) if (rst_n && dut.u_res.active && !dut.u_res.start &&
                            ((dut.u_res.v < 0) || ($unsigned(dut.u_res.v) >= dut.u_res.p))) n_corr++;

  task automatic run_one(input bit gfp, input big_t xv, input big_t yv, input big_t pv);
    big_t zr, prod;
    int   it, cyc;
    bit   ok, dneg;
    umd_ref(xv, yv, pv, gfp, zr, it, ok, dneg);
    if (dneg) n_dneg++;
    @(negedge clk);
    field = gfp; x = xv[N-1:0]; y = yv[N-1:0]; p = pv[N:0];
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 8 * N + 50) break;
    end
    checks++;
    if (!done || z != zr[N-1:0]) begin
      failures++;
      $display("FAIL gfp=%0d x=%h y=%h p=%h z=%h expected %h", gfp, xv[N-1:0], yv[N-1:0], pv[N:0], z, zr[N-1:0]);
    end
    prod = gfp ? mulmod_p(big_t'(z), yv, pv, N) : mulmod_2n(big_t'(z), yv, pv, N);
    checks++;
    if (prod != xv) begin
      failures++;
      $display("FAIL product check gfp=%0d z*y=%h x=%h", gfp, prod[N-1:0], xv[N-1:0]);
    end
    checks++;
    if (iterations != 32'(it + 1)) begin
      failures++;
      $display("FAIL iterations %0d, reference %0d (+1)", iterations, it);
    end
    // start edge, LOAD, 2 cycles per iteration, final phi1, result steps, done.
    checks++;
    if (cyc < 2 * int'(iterations) + 3 || cyc > 2 * int'(iterations) + 12) begin
      failures++;
      $display("FAIL cycle count %0d for %0d iterations", cyc, iterations);
    end
    if (gfp) n_gfp++; else n_gf2++;
  endtask

  function automatic big_t rand_bits(int n);
    big_t r = '0;
    for (int i = 0; i < n; i++) r[i] = 1'($urandom);
    return r;
  endfunction

  initial begin : watchdog
    repeat (NOPS * (12 * N + 100)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t pv, xv, yv, zr;
    int   it;
    bit   ok, dneg;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      bit gfp;
      gfp = (op % 2 == 0);
      if (gfp) begin
        do pv = big_t'({1'b1, rand_bits(N - 1)[N-2:0]}) | big_t'(1);
        while (!is_prime32(longint'(pv)));
      end else begin
        pv = rand_bits(N) | big_t'(1);
        pv[N] = 1'b1;
      end
      do begin
        xv = (op % 5 == 0) ? big_t'(1) : rand_bits(N);
        yv = rand_bits(N);
        if (gfp) begin
          while (xv >= pv) xv = xv - pv;
          while (yv >= pv) yv = yv - pv;
        end
        umd_ref(xv, yv, pv, gfp, zr, it, ok, dneg);
      end while (yv == 0 || !ok);
      if (xv == 1) n_inv++;
      run_one(gfp, xv, yv, pv);
    end
    $display("ops: gfp=%0d gf2n=%0d inverses=%0d | swaps=%0d k=-1=%0d even=%0d wraps=%0d D=-1=%0d corrections=%0d",
             n_gfp, n_gf2, n_inv, n_swap, n_kneg, n_even, n_wrap, n_dneg, n_corr);
    checks += 9;
    if (n_gfp == 0) failures++;
    if (n_gf2 == 0) failures++;
    if (n_inv == 0) failures++;
    if (n_swap == 0) failures++;
    if (n_kneg == 0) failures++;
    if (n_even == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_dneg == 0) failures++;
    if (n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
