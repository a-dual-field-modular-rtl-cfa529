// delta_counter: the signed counter delta of the UMD algorithm.
//
// delta tracks the difference between the sizes of C and D and replaces the
// magnitude comparisons of other inversion algorithms. At the end of an
// iteration (en = 1) it becomes  (neg ? -delta : delta) - dec : neg is set
// when C and D are swapped, dec when the algorithm decrements delta. clr
// loads 0 at the start of an operation. is_neg is the sign bit, which is all
// the controller needs. DW must cover about +-(N+2). The counter's role is
// the algorithm's; a plain binary counter is used where a fast up/down
// counter could be substituted, and the width is this design's choice.
module delta_counter #(
  parameter int unsigned DW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic          neg,
  input  logic          dec,
  output logic [DW-1:0] delta,   // two's complement
  output logic          is_neg
);
  logic [DW-1:0] nxt;

  always_comb begin
    nxt = neg ? (~delta + DW'(1)) : delta;
    nxt = nxt - DW'(dec);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    delta <= '0;
    else if (clr)  delta <= '0;
    else if (en)   delta <= nxt;
  end

  assign is_neg = delta[DW-1];
endmodule
