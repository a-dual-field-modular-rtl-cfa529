// umd_datapath: the unified datapath of the modular divider.
//
// One algorithm iteration takes two cycles of clk, phase phi1 (phase = 0)
// and phi2 (phase = 1), following the adder schedule of the architecture:
//   phi1: CSUA1 computes A1 = U + k*W; the result is captured in adder_latch.
//   phi2: CSUA1 computes A3 = (C + k*D)/2 and CSUA2 computes
//         A2 = (A1 + u0*p)/2, where u0 is bit 0 of A1 and an AND gate
//         selects p or 0. Both results are presented on cout/uout and are
//         written to the registers at the end of phi2.
// k*W and k*D come from MUX2: z = 1 gives 0 (C even), n = 1 gives the bit
// complement (k = -1). All values are carry-save pairs of W-bit vectors in
// two's complement; fsel selects GF(p) (carries on) or GF(2^n) (XOR only).
//
// Design choices that the architecture leaves open:
// * Negating a carry-save pair needs +2. For A1 both +1 go into CSUA1's two
//   free bit-0 carry inputs. For A3 the division by two is applied to the
//   four operand vectors before CSUA1 (arithmetic shift right) and the bit-0
//   column, which is known to add up to 0 or 2, is passed on as a carry into
//   CSUA1's sideways carry input; the halved +2 of the negation then fits in
//   the carry-vector input. This keeps A3 exact without a third carry slot.
// * A carry-save pair may wrap around modulo 2^W even when the value it
//   stands for is small, and halving a wrapped pair is wrong. Every pair that
//   is halved or stored is first normalised: if both vectors have top bits
//   01 (or both 10) the pair has wrapped by +2^W (or -2^W) and both top bits
//   are flipped. This is exact while |value| < 2^(W-2).
module umd_datapath #(
  parameter int unsigned W = 517
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         phase,   // 0 = phi1, 1 = phi2
  input  logic         fsel,    // 1 = GF(p), 0 = GF(2^n)
  input  logic         z,       // MUX2 zero
  input  logic         n,       // MUX2 negate (k = -1)
  input  logic [W-1:0] c_s, c_c,
  input  logic [W-1:0] d_s, d_c,
  input  logic [W-1:0] u_s, u_c,
  input  logic [W-1:0] w_s, w_c,
  input  logic [W-1:0] p,
  output logic [W-1:0] cout_s, cout_c,
  output logic [W-1:0] uout_s, uout_c
);
  // Arithmetic shift right by one in GF(p); logical in GF(2^n).
  function automatic logic [W-1:0] half(input logic [W-1:0] v, input logic f);
    return {f & v[W-1], v[W-1:1]};
  endfunction

  // Remove a wrap-around of +-2^W from a carry-save pair (GF(p) only).
  function automatic logic [2*W-1:0] norm(input logic [W-1:0] a, input logic [W-1:0] b,
                                          input logic f);
    logic flip;
    flip = f && (a[W-1:W-2] == b[W-1:W-2]) && (a[W-1] != a[W-2]);
    if (flip) begin
      a[W-1] = ~a[W-1];
      b[W-1] = ~b[W-1];
    end
    return {a, b};
  endfunction

  // ---------------- MUX2: k*W in phi1, k*D in phi2 ----------------
  logic [W-1:0] m_s, m_c;
  mux2_szn #(.W(W)) u_mux2 (
    .in0_s(w_s), .in0_c(w_c), .in1_s(d_s), .in1_c(d_c),
    .s(phase), .z(z), .n(n), .out_s(m_s), .out_c(m_c)
  );

  // ---------------- CSUA1 operand selection ----------------
  logic [W-1:0] a1_a, a1_b, a1_c, a1_d;
  logic         a1_cin, a1_cy0;
  logic [2:0]   col0;   // number of ones in the bit-0 column of A3

  always_comb begin
    col0 = 3'(c_s[0]) + 3'(c_c[0]) + 3'(m_s[0]) + 3'(m_c[0]);
    if (!phase) begin
      a1_a   = u_s;
      a1_b   = u_c;
      a1_c   = m_s;
      a1_d   = m_c;
      a1_cin = fsel & n;
      a1_cy0 = fsel & n;
    end else begin
      a1_a   = half(c_s, fsel);
      a1_b   = half(c_c, fsel);
      a1_c   = half(m_s, fsel);
      a1_d   = half(m_c, fsel);
      a1_cin = fsel & (col0 >= 3'd2);
      a1_cy0 = fsel & n;
    end
  end

  logic [W-1:0] r1_s, r1_c;
  csua1 #(.W(W)) u_csua1 (
    .a(a1_a), .b(a1_b), .c(a1_c), .d(a1_d), .cin(a1_cin), .cy0(a1_cy0),
    .fsel(fsel), .s(r1_s), .cy(r1_c)
  );

  // ---------------- storage between the adders ----------------
  logic [W-1:0] l_s, l_c;
  adder_latch #(.W(W)) u_latch (
    .clk(clk), .rst_n(rst_n), .en(!phase), .d_s(r1_s), .d_c(r1_c), .q_s(l_s), .q_c(l_c)
  );

  // ---------------- CSUA2: A1 + u0*p ----------------
  logic         u0;
  logic [W-1:0] u0p, r2_s, r2_c;
  assign u0  = l_s[0] ^ l_c[0];
  assign u0p = p & {W{u0}};

  csua2 #(.W(W)) u_csua2 (
    .a(l_s), .b(l_c), .c(u0p), .cin(1'b0), .fsel(fsel), .s(r2_s), .cy(r2_c)
  );

  // ---------------- results ----------------
  logic [W-1:0] n2_s, n2_c;
  always_comb begin
    {cout_s, cout_c} = norm(r1_s, r1_c, fsel);
    {n2_s, n2_c}     = norm(r2_s, r2_c, fsel);
    uout_s           = half(n2_s, fsel);
    uout_c           = half(n2_c, fsel);
  end
endmodule
