// tb_umd_datapath: one iteration of the datapath at a time (W = 20).
//
// Random carry-save operands are applied through phi1 and phi2 and the new
// C and U are compared with the algorithm on plain values:
//   GF(p):   C' = (C + k*D)/2 (or C/2 when C is even),
//            U' = (U + k*W + u0*p)/2 with u0 the parity of U + k*W;
//   GF(2^n): the same with XOR instead of addition.
// Outputs must also be normalised pairs (their signed sum equals the value
// with no wrap-around), which the following iterations rely on.
module tb_umd_datapath;
  localparam int W = 20;
  localparam int N = W - 5;
  logic         clk = 1'b0, rst_n = 1'b0, phase = 1'b0, fsel = 1'b1, z = 1'b0, n = 1'b0;
  logic [W-1:0] c_s, c_c, d_s, d_c, u_s, u_c, w_s, w_c, p;
  logic [W-1:0] cout_s, cout_c, uout_s, uout_c;
  int checks = 0, failures = 0, n_odd = 0, n_neg = 0;

  umd_datapath #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  // Random normalised carry-save split of a signed value.
  task automatic split(input longint v, output logic [W-1:0] s, output logic [W-1:0] c);
    longint sv;
    do begin
      s  = W'($urandom);
      c  = W'(v) - s;
      sv = longint'($signed(s)) + longint'($signed(c));
    end while (sv != v);
  endtask

  function automatic longint rnd(longint lim);   // uniform in (-lim, lim)
    return longint'($urandom % (2 * lim - 1)) - (lim - 1);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint pv, cv, dv, uv, wv, t, ec, eu, gc, gu;
    bit     odd;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      fsel = (it % 3 != 0);
      pv = longint'($urandom % (1 << N)) | (1 << (N - 1)) | 1;
      if (fsel) begin
        cv = rnd(pv); dv = rnd(pv) | 1; uv = rnd(4 * pv); wv = rnd(4 * pv);
        odd = cv[0];
        z = !odd;
        n = odd && (((cv + dv) & 3) != 0);
        split(cv, c_s, c_c); split(dv, d_s, d_c); split(uv, u_s, u_c); split(wv, w_s, w_c);
        ec = odd ? (n ? (cv - dv) : (cv + dv)) / 2 : cv / 2;
        t  = odd ? (n ? uv - wv : uv + wv) : uv;
        if (t[0]) t = t + pv;
        eu = t / 2;
      end else begin
        pv = pv | (longint'(1) << N);
        cv = longint'($urandom % (1 << N)); dv = longint'($urandom % (1 << N)) | 1;
        uv = longint'($urandom % (1 << N)); wv = longint'($urandom % (1 << N));
        odd = cv[0];
        z = !odd; n = 1'b0;
        c_s = W'(cv); d_s = W'(dv); u_s = W'(uv); w_s = W'(wv);
        c_c = '0; d_c = '0; u_c = '0; w_c = '0;
        ec = odd ? (cv ^ dv) >> 1 : cv >> 1;
        t  = odd ? uv ^ wv : uv;
        if (t[0]) t = t ^ pv;
        eu = t >> 1;
      end
      if (odd) n_odd++;
      if (n) n_neg++;
      p = W'(pv);
      phase = 1'b0;
      @(negedge clk);
      phase = 1'b1;
      #1;
      if (fsel) begin
        gc = longint'($signed(cout_s)) + longint'($signed(cout_c));
        gu = longint'($signed(uout_s)) + longint'($signed(uout_c));
      end else begin
        gc = longint'(cout_s ^ cout_c);
        gu = longint'(uout_s ^ uout_c);
      end
      checks += 2;
      if (gc != ec) begin
        failures++;
        $display("FAIL C: fsel=%0d C=%0d D=%0d z=%0d n=%0d got %0d expected %0d", fsel, cv, dv, z, n, gc, ec);
      end
      if (gu != eu) begin
        failures++;
        $display("FAIL U: fsel=%0d U=%0d W=%0d z=%0d n=%0d got %0d expected %0d", fsel, uv, wv, z, n, gu, eu);
      end
      @(negedge clk);
    end
    checks += 2;
    if (n_odd == 0) failures++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
