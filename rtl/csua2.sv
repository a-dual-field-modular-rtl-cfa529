// csua2: carry-save unified adder 2, a row of W dual-field (3,2) adders.
//
// Adds three W-bit vectors (a carry-save operand and one binary operand) and
// returns a carry-save pair (s, cy), modulo 2^W. cin becomes bit 0 of the
// carry vector. In GF(2^n) (fsel = 0) the row is a 3-input XOR and cy holds
// only cin. Combinational, one full-adder delay.
// The row structure follows the architecture; in this design the carry
// input is not needed by the datapath (both negation carries go to CSUA1).
module csua2 #(
  parameter int unsigned W = 517
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  input  logic         fsel,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W:0] cv;

  assign cv[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_cell
    df_fa32 u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .fsel(fsel), .s(s[i]), .co(cv[i+1]));
  end

  assign cy = cv[W-1:0];

  logic unused_top;
  assign unused_top = cv[W];
endmodule
