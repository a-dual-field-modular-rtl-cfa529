// umd_control: controller of the unified modular divider.
//
// Sequences one division: ST_LOAD loads the registers and clears delta and
// the zero test, then iterations run as ST_PHI1/ST_PHI2 pairs until the
// zero test reports C = 0, then ST_RESULT waits for the result converter
// and ST_DONE pulses done.
//
// Per-iteration decisions are made from register contents, which do not
// change between phi1 and phi2, so they are stable for the whole iteration:
//   c0   = bit 0 of C (taken from the register that currently holds C),
//   swap = c0 and delta < 0 (exchange C<->D and U<->W),
//   k    = -1 when c0, GF(p) and (C + D) mod 4 != 0, else +1,
//   z    = not c0 (C even: nothing is added, C and U are only halved),
//   delta := (swap ? -delta : delta) - 1, except when k = -1 (no decrement).
// sel_q remembers which physical register holds the logical C (and U); the
// swapping network is driven with sel = sel_q ^ swap, and at the end of
// phi2 the new C is written to the C register (sel = 0) or the D register
// (sel = 1), the new U likewise to U or W.
// iterations counts started iterations; because the zero test is
// registered, it is one more than the number of algorithm iterations.
module umd_control
  import umd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        field,        // operand field, sampled with start
  input  logic        rc_lsb,       // bit 0 of the value in the C register
  input  logic        rd_lsb,       // bit 0 of the value in the D register
  input  logic        cd_ne0,       // (C + D) mod 4 != 0
  input  logic        c_zero,       // C = 0 (registered zero test)
  input  logic        delta_neg,    // delta < 0
  input  logic        res_done,
  output logic        fsel,
  output logic        load,
  output logic        phase,
  output logic        sel,
  output logic        load_c, load_d, load_u, load_w,
  output logic        z,
  output logic        n,
  output logic        delta_clr, delta_en, delta_negate, delta_dec,
  output logic        zt_clr,
  output logic        res_start,
  output logic        busy,
  output logic        done,
  output logic [31:0] iterations,
  output state_e      state
);
  logic sel_q;
  logic c0, swap, kneg, in_iter;

  always_comb begin
    in_iter      = (state == ST_PHI1) || (state == ST_PHI2);
    c0           = sel_q ? rd_lsb : rc_lsb;
    swap         = in_iter && c0 && delta_neg;
    kneg         = in_iter && c0 && fsel && cd_ne0;
    z            = !c0;
    n            = kneg;
    sel          = sel_q ^ swap;
    phase        = (state == ST_PHI2);
    load         = (state == ST_LOAD);
    load_c       = phase && !sel;
    load_d       = phase &&  sel;
    load_u       = phase && !sel;
    load_w       = phase &&  sel;
    delta_clr    = load;
    zt_clr       = load;
    delta_en     = phase;
    delta_negate = swap;
    delta_dec    = !kneg;
    busy         = (state != ST_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      sel_q      <= 1'b0;
      fsel       <= FIELD_GFP;
      res_start  <= 1'b0;
      done       <= 1'b0;
      iterations <= '0;
    end else begin
      res_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_LOAD;
          fsel  <= field;
        end
        ST_LOAD: begin
          sel_q      <= 1'b0;
          iterations <= '0;
          state      <= ST_PHI1;
        end
        ST_PHI1: begin
          if (c_zero) begin
            state     <= ST_RESULT;
            res_start <= 1'b1;
          end else begin
            iterations <= iterations + 32'd1;
            state      <= ST_PHI2;
          end
        end
        ST_PHI2: begin
          sel_q <= sel;
          state <= ST_PHI1;
        end
        ST_RESULT: if (res_done) begin
          state <= ST_DONE;
          done  <= 1'b1;
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A swap is only ever needed when C is odd.
  property p_swap_needs_odd;
    @(posedge clk) disable iff (!rst_n) swap |-> c0;
  endproperty
  assert property (p_swap_needs_odd);
endmodule
