// df_c42: one-bit dual-field (4,2) compressor.
//
// Two dual-field (3,2) cells in series: the first adds a, b and c and sends
// its carry sideways to the next bit position (cout), the second adds the
// first sum, d and the sideways carry from the previous position (cin) and
// produces the sum bit and the carry-vector bit. cout does not depend on cin,
// so a row of these cells has no carry chain. In GF(2^n) (fsel = 0) both
// carries are 0 and s = a^b^c^d^cin. Purely combinational.
// The architecture specifies a row of dual-field (4,2) cells; building the
// cell from two (3,2) cells is this design's choice.
module df_c42 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic cin,    // sideways carry from the bit below
  input  logic fsel,   // 1 = GF(p), 0 = GF(2^n)
  output logic s,      // sum, weight 1
  output logic carry,  // carry-vector bit, weight 2
  output logic cout    // sideways carry to the bit above, weight 2
);
  logic s1;

  df_fa32 u_fa1 (.a(a),  .b(b), .c(c),   .fsel(fsel), .s(s1), .co(cout));
  df_fa32 u_fa2 (.a(s1), .b(d), .c(cin), .fsel(fsel), .s(s),  .co(carry));
endmodule
