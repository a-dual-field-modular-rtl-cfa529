// zero_test: multi-cycle test of C = 0 for a carry-save value.
//
// A carry-save pair (vs, vc) is zero modulo 2^W exactly when
// vs ^ vc == (vs | vc) << 1, a bitwise test with no carry propagation.
// The W per-bit results are ANDed in chunks of CHUNK bits; the chunk flags
// are registered, and their AND is registered again, so is_zero follows the
// input by two clock cycles. The latency is harmless because the algorithm
// leaves C, D and W unchanged once C has reached zero. clr empties both
// stages (used when new operands are loaded).
module zero_test #(
  parameter int unsigned W     = 517,
  parameter int unsigned CHUNK = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic [W-1:0] vs,
  input  logic [W-1:0] vc,
  output logic         is_zero
);
  localparam int unsigned NCH = (W + CHUNK - 1) / CHUNK;

  logic [W-1:0]   bit_ok;
  logic [NCH-1:0] chunk_ok_d, chunk_ok_q;

  always_comb begin
    bit_ok = ~((vs ^ vc) ^ ((vs | vc) << 1));
    for (int k = 0; k < NCH; k++) begin
      chunk_ok_d[k] = 1'b1;
      for (int i = k * CHUNK; i < (k + 1) * CHUNK; i++) begin
        if (i < W) chunk_ok_d[k] = chunk_ok_d[k] & bit_ok[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chunk_ok_q <= '0;
      is_zero    <= 1'b0;
    end else if (clr) begin
      chunk_ok_q <= '0;
      is_zero    <= 1'b0;
    end else begin
      chunk_ok_q <= chunk_ok_d;
      is_zero    <= &chunk_ok_q;
    end
  end
endmodule
