// umd_regs: the carry-save registers C, D, U and W of the divider.
//
// Each register holds a value as a pair of W-bit vectors (sum and carry).
// With load = 1 they take their initial values: C = Y, D = p, U = X, W = 0,
// all with a zero carry vector. Otherwise, at the end of an iteration, the
// new C from the datapath (cout) is written into the C or D register and
// the new U (uout) into the U or W register, as chosen by load_c/load_d and
// load_u/load_w. Writing the result into the "other" register is how a swap
// C<->D, U<->W is completed: the register that is not written already holds
// the old C (or U), which becomes the new D (or W). The initial values are
// selected with a multiplexer where a three-state bus could also be used.
// Asynchronous active-low reset to zero.
module umd_regs #(
  parameter int unsigned W = 517
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         load_c, load_d, load_u, load_w,
  input  logic [W-1:0] y, p, x,
  input  logic [W-1:0] cout_s, cout_c,
  input  logic [W-1:0] uout_s, uout_c,
  output logic [W-1:0] rc_s, rc_c,
  output logic [W-1:0] rd_s, rd_c,
  output logic [W-1:0] ru_s, ru_c,
  output logic [W-1:0] rw_s, rw_c
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_s <= '0; rc_c <= '0;
      rd_s <= '0; rd_c <= '0;
      ru_s <= '0; ru_c <= '0;
      rw_s <= '0; rw_c <= '0;
    end else if (load) begin
      rc_s <= y;  rc_c <= '0;
      rd_s <= p;  rd_c <= '0;
      ru_s <= x;  ru_c <= '0;
      rw_s <= '0; rw_c <= '0;
    end else begin
      if (load_c) begin rc_s <= cout_s; rc_c <= cout_c; end
      if (load_d) begin rd_s <= cout_s; rd_c <= cout_c; end
      if (load_u) begin ru_s <= uout_s; ru_c <= uout_c; end
      if (load_w) begin rw_s <= uout_s; rw_c <= uout_c; end
    end
  end
endmodule
