// mod4_test: decides k in the GF(p) branch of the algorithm.
//
// Returns 1 when (C + D) mod 4 != 0, with C and D given in carry-save form.
// Only the two low bits of the four vectors matter, so the test is a 2-bit
// addition of four inputs: bit 0 of the sum is the XOR of the four low bits
// and bit 1 is the XOR of the four bit-1 values with the carry of bit 0.
// Combinational, a few gate levels. The test itself is the algorithm's; the
// gate network is this design's own.
module mod4_test (
  input  logic [1:0] cs,
  input  logic [1:0] cc,
  input  logic [1:0] ds,
  input  logic [1:0] dc,
  output logic       ne0
);
  logic [1:0] b0sum;   // number of ones among the four bit-0 values, mod 4
  logic       bit0, bit1;

  always_comb begin
    b0sum = 2'(cs[0]) + 2'(cc[0]) + 2'(ds[0]) + 2'(dc[0]);
    bit0  = b0sum[0];
    bit1  = cs[1] ^ cc[1] ^ ds[1] ^ dc[1] ^ b0sum[1];
    ne0   = bit0 | bit1;
  end
endmodule
