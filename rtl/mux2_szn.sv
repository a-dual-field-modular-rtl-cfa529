// mux2_szn: the operand multiplexer in front of CSUA1 that forms k*W or k*D.
//
// Works on a carry-save operand (two vectors). s selects in0 (W, used in
// phase phi1) or in1 (D, phase phi2); z forces both output vectors to zero
// (used when C is even, so nothing is added); n bit-complements both vectors
// (k = -1); these three controls follow the architecture, the priority of z
// over n is this design's choice. The "+2" that completes the two's-complement negation of a
// carry-save pair is added by the datapath through the adders' carry inputs.
// Combinational.
module mux2_szn #(
  parameter int unsigned W = 517
) (
  input  logic [W-1:0] in0_s,
  input  logic [W-1:0] in0_c,
  input  logic [W-1:0] in1_s,
  input  logic [W-1:0] in1_c,
  input  logic         s,
  input  logic         z,
  input  logic         n,
  output logic [W-1:0] out_s,
  output logic [W-1:0] out_c
);
  always_comb begin
    out_s = s ? in1_s : in0_s;
    out_c = s ? in1_c : in0_c;
    if (n) begin
      out_s = ~out_s;
      out_c = ~out_c;
    end
    if (z) begin
      out_s = '0;
      out_c = '0;
    end
  end
endmodule
