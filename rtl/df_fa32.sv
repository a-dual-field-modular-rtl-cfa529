// df_fa32: one-bit dual-field (3,2) adder.
//
// A full adder whose carry output is gated by the field select: with
// fsel = 1 (GF(p)) it is an ordinary full adder, with fsel = 0 (GF(2^n)) the
// carry is forced to 0 and the sum bit is the modulo-2 sum a^b^c. This is
// the basic cell of both carry-save unified adders. Purely combinational.
// The behaviour of the cell follows the architecture; its gate structure (a
// majority carry ANDed with fsel) is the simplest one that provides it.
module df_fa32 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic fsel,   // 1 = GF(p), 0 = GF(2^n)
  output logic s,      // sum, weight 1
  output logic co      // carry, weight 2 (0 in GF(2^n))
);
  always_comb begin
    s  = a ^ b ^ c;
    co = fsel & ((a & b) | (a & c) | (b & c));
  end
endmodule
