// swap_net: the swapping network between the registers and the datapath.
//
// A set of two-input multiplexers. With sel = 0 the C and D registers drive
// the datapath's C and D operands and the U and W registers drive U and W;
// with sel = 1 the pairs are exchanged (C<->D, U<->W). All four operands are
// carry-save pairs. Combinational. Structure as in the architecture; which
// register holds C after a swap is tracked by the controller (umd_control).
module swap_net #(
  parameter int unsigned W = 517
) (
  input  logic [W-1:0] rc_s, rc_c,
  input  logic [W-1:0] rd_s, rd_c,
  input  logic [W-1:0] ru_s, ru_c,
  input  logic [W-1:0] rw_s, rw_c,
  input  logic         sel,
  output logic [W-1:0] c_s, c_c,
  output logic [W-1:0] d_s, d_c,
  output logic [W-1:0] u_s, u_c,
  output logic [W-1:0] w_s, w_c
);
  always_comb begin
    c_s = sel ? rd_s : rc_s;
    c_c = sel ? rd_c : rc_c;
    d_s = sel ? rc_s : rd_s;
    d_c = sel ? rc_c : rd_c;
    u_s = sel ? rw_s : ru_s;
    u_c = sel ? rw_c : ru_c;
    w_s = sel ? ru_s : rw_s;
    w_c = sel ? ru_c : rw_c;
  end
endmodule
