// umd_result: final step of the division, W in carry-save form -> Z.
//
// When the iterations end (C = 0), D holds the gcd, which is +1 or -1 in
// GF(p) and 1 in GF(2^n), and W holds the quotient up to sign and up to a
// small multiple of p. On start this block adds the two vectors of W and of
// D with carry-propagate adders (the only ones in the design) and forms
// v = W if D = 1, otherwise v = -W (Z = p - W in the algorithm). It then
// adds p while v < 0 and subtracts p while v >= p, one step per cycle, so
// that z lands in [0, p). In GF(2^n) the sum vector of W is the result and
// needs no correction. done is a one-cycle pulse; z stays valid until the
// next start. The reduction loop is this design's own choice: the
// architecture only states the sign rule.
module umd_result
  import umd_pkg::*;
#(
  parameter int unsigned N = 512,
  parameter int unsigned W = N + UMD_GUARD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         fsel,
  input  logic [W-1:0] ws, wc,
  input  logic [W-1:0] ds, dc,
  input  logic [W-1:0] p,
  output logic [N-1:0] z,
  output logic         done
);
  logic signed [W-1:0] v;
  logic                active;
  logic [W-1:0]        wsum, dsum;

  always_comb begin
    wsum = ws + wc;
    dsum = ds + dc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v      <= '0;
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (fsel == FIELD_GF2N) begin
          v      <= ws ^ wc;
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          v      <= (dsum == W'(1)) ? wsum : -wsum;
          active <= 1'b1;
        end
      end else if (active) begin
        if (v < 0)                      v <= v + $signed(p);
        else if ($unsigned(v) >= p)     v <= v - $signed(p);
        else begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  assign z = v[N-1:0];
endmodule
