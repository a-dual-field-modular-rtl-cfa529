// umd_divider: unified (dual-field) modular divider, top level.
//
// Computes Z = X / Y mod p in GF(p) (field = 1) or Z(x) = X(x) / Y(x) mod
// p(x) in GF(2^N) (field = 0) with the unified modular division algorithm:
// a binary-GCD style loop on C (initially Y) and D (initially p) that keeps
// U and W as the matching multiples of X, and uses a signed counter delta
// instead of magnitude comparisons to decide when C and D are swapped. With
// X = 1 it returns the modular inverse of Y.
//
// Structure: carry-save registers C, D, U, W -> swapping network ->
// datapath (two carry-save unified adders, MUX2, storage between the
// adders) -> back to the registers; a controller with the delta counter,
// the (C + D) mod 4 test and a multi-cycle zero test of C; and a result
// converter that turns W into a reduced binary value.
//
// Interface: pulse start for one cycle while idle, with field, x, y and p
// valid in that cycle and the next (they are loaded in the cycle after
// start). p is N+1 bits: a field polynomial of degree N in GF(2^N), an odd
// prime 2^(N-1) < p < 2^N (bit N = 0) in GF(p). Y must be non-zero and
// X, Y < p (degree < N). busy is high while working; done pulses for one
// cycle when z is valid, and z holds until the next start.
//
// Timing: one iteration takes two clk cycles, phi1 and phi2 (clk is the
// doubled clock of the two-phase scheme). A division takes about
// 2*(iterations+1) + 6 cycles; iterations is up to about 2N in GF(2^N)
// and about 2.3N in GF(p) (see iterations output).
module umd_divider
  import umd_pkg::*;
#(
  parameter int unsigned N     = 512,
  parameter int unsigned GUARD = UMD_GUARD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         field,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N:0]   p,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] z,
  output logic [31:0]  iterations
);
  localparam int unsigned W  = N + GUARD;
  localparam int unsigned DW = $clog2(N) + 4;

  // ---------------- control ----------------
  logic   fsel, load, phase, sel, load_c, load_d, load_u, load_w, mz, mn;
  logic   delta_clr, delta_en, delta_negate, delta_dec, zt_clr, res_start, res_done;
  logic   cd_ne0, c_zero, delta_neg;
  state_e state;
  logic   unused_state;
  assign  unused_state = (state == ST_IDLE);

  // ---------------- registers ----------------
  logic [W-1:0] rc_s, rc_c, rd_s, rd_c, ru_s, ru_c, rw_s, rw_c;
  logic [W-1:0] cout_s, cout_c, uout_s, uout_c;
  logic [W-1:0] p_q;

  // The modulus is needed in every iteration; it is kept in its own register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    p_q <= '0;
    else if (load) p_q <= W'(p);
  end

  umd_regs #(.W(W)) u_regs (
    .clk(clk), .rst_n(rst_n), .load(load),
    .load_c(load_c), .load_d(load_d), .load_u(load_u), .load_w(load_w),
    .y(W'(y)), .p(W'(p)), .x(W'(x)),
    .cout_s(cout_s), .cout_c(cout_c), .uout_s(uout_s), .uout_c(uout_c),
    .rc_s(rc_s), .rc_c(rc_c), .rd_s(rd_s), .rd_c(rd_c),
    .ru_s(ru_s), .ru_c(ru_c), .rw_s(rw_s), .rw_c(rw_c)
  );

  // ---------------- swapping network ----------------
  logic [W-1:0] c_s, c_c, d_s, d_c, u_s, u_c, w_s, w_c;
  swap_net #(.W(W)) u_swap (
    .rc_s(rc_s), .rc_c(rc_c), .rd_s(rd_s), .rd_c(rd_c),
    .ru_s(ru_s), .ru_c(ru_c), .rw_s(rw_s), .rw_c(rw_c), .sel(sel),
    .c_s(c_s), .c_c(c_c), .d_s(d_s), .d_c(d_c),
    .u_s(u_s), .u_c(u_c), .w_s(w_s), .w_c(w_c)
  );

  // ---------------- datapath ----------------
  umd_datapath #(.W(W)) u_dp (
    .clk(clk), .rst_n(rst_n), .phase(phase), .fsel(fsel), .z(mz), .n(mn),
    .c_s(c_s), .c_c(c_c), .d_s(d_s), .d_c(d_c),
    .u_s(u_s), .u_c(u_c), .w_s(w_s), .w_c(w_c), .p(p_q),
    .cout_s(cout_s), .cout_c(cout_c), .uout_s(uout_s), .uout_c(uout_c)
  );

  // ---------------- tests feeding the controller ----------------
  mod4_test u_mod4 (
    .cs(rc_s[1:0]), .cc(rc_c[1:0]), .ds(rd_s[1:0]), .dc(rd_c[1:0]), .ne0(cd_ne0)
  );

  // C is held by the swapped-to register after a swap; the network output
  // with the current selection always shows the logical C between iterations.
  zero_test #(.W(W)) u_zero (
    .clk(clk), .rst_n(rst_n), .clr(zt_clr), .vs(c_s), .vc(c_c), .is_zero(c_zero)
  );

  logic [DW-1:0] delta;
  delta_counter #(.DW(DW)) u_delta (
    .clk(clk), .rst_n(rst_n), .clr(delta_clr), .en(delta_en),
    .neg(delta_negate), .dec(delta_dec), .delta(delta), .is_neg(delta_neg)
  );

  umd_control u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .field(field),
    .rc_lsb(rc_s[0] ^ rc_c[0]), .rd_lsb(rd_s[0] ^ rd_c[0]),
    .cd_ne0(cd_ne0), .c_zero(c_zero), .delta_neg(delta_neg), .res_done(res_done),
    .fsel(fsel), .load(load), .phase(phase), .sel(sel),
    .load_c(load_c), .load_d(load_d), .load_u(load_u), .load_w(load_w),
    .z(mz), .n(mn),
    .delta_clr(delta_clr), .delta_en(delta_en), .delta_negate(delta_negate), .delta_dec(delta_dec),
    .zt_clr(zt_clr), .res_start(res_start), .busy(busy), .done(done),
    .iterations(iterations), .state(state)
  );

  // ---------------- result conversion ----------------
  umd_result #(.N(N), .W(W)) u_res (
    .clk(clk), .rst_n(rst_n), .start(res_start), .fsel(fsel),
    .ws(w_s), .wc(w_c), .ds(d_s), .dc(d_c), .p(p_q), .z(z), .done(res_done)
  );

  logic [DW-1:0] unused_delta;
  assign unused_delta = delta;
endmodule
