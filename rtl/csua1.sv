// csua1: carry-save unified adder 1, a row of W dual-field (4,2) compressors.
//
// Adds four W-bit vectors (two carry-save operands) and returns the sum as a
// carry-save pair (s, cy), modulo 2^W. Two free weight-1 inputs are exposed:
// cin enters the sideways carry of bit 0 and cy0 becomes bit 0 of the carry
// vector; the datapath uses them for the "+1"s of two's-complement negation
// and for the carry out of a pre-shifted bit 0. In GF(2^n) (fsel = 0) the row
// is a 4-input XOR and cy is zero except for cy0. Combinational, delay of two
// full adders independent of W.
module csua1 #(
  parameter int unsigned W = 517
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic         cin,
  input  logic         cy0,
  input  logic         fsel,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W:0] side;   // sideways carries, side[i] enters bit i
  logic [W:0] cv;     // carry vector before truncation to W bits

  assign side[0] = cin;
  assign cv[0]   = cy0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    df_c42 u_c42 (
      .a(a[i]), .b(b[i]), .c(c[i]), .d(d[i]), .cin(side[i]), .fsel(fsel),
      .s(s[i]), .carry(cv[i+1]), .cout(side[i+1])
    );
  end

  // Carries out of the top bit are dropped: arithmetic is modulo 2^W.
  assign cy = cv[W-1:0];

  logic unused_top;
  assign unused_top = side[W] ^ cv[W];
endmodule
