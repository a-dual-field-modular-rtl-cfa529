// adder_latch: storage between CSUA1 and CSUA2.
//
// Captures the carry-save result of A1 = U + kW at the end of phase phi1 and
// holds it through phi2, when CSUA1 is busy with A3 and CSUA2 adds u0*p to
// the held value. It is built as an edge-triggered register on the fast
// clock (two edges per iteration) with a capture enable, not as a
// level-sensitive latch. Asynchronous active-low reset to zero.
module adder_latch #(
  parameter int unsigned W = 517
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,     // high during phi1: capture at its end
  input  logic [W-1:0] d_s,
  input  logic [W-1:0] d_c,
  output logic [W-1:0] q_s,
  output logic [W-1:0] q_c
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_s <= '0;
      q_c <= '0;
    end else if (en) begin
      q_s <= d_s;
      q_c <= d_c;
    end
  end
endmodule
