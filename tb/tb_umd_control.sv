// tb_umd_control: the controller against a cycle-level model.
//
// Random values drive the status inputs (bit 0 of the C and D registers,
// the mod-4 test, delta's sign, the zero test and the result converter)
// while several operations run. Every cycle the control lines (load,
// phase, swap select, register write enables, MUX2 zero/negate, delta
// controls, result start, done) are compared with an independent model of
// the sequencing and of the decisions of the algorithm.
module tb_umd_control;
  import umd_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, field = 1'b1;
  logic        rc_lsb = 1'b0, rd_lsb = 1'b0, cd_ne0 = 1'b0, c_zero = 1'b0, delta_neg = 1'b0, res_done = 1'b0;
  logic        fsel, load, phase, sel, load_c, load_d, load_u, load_w, z, n;
  logic        delta_clr, delta_en, delta_negate, delta_dec, zt_clr, res_start, busy, done;
  logic [31:0] iterations;
  state_e      state;
  int checks = 0, failures = 0, n_swap = 0, n_ops = 0;

  umd_control dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model state
  typedef enum int {M_IDLE, M_LOAD, M_PHI1, M_PHI2, M_RES, M_DONE} mstate_e;
  mstate_e ms = M_IDLE;
  bit      msel = 1'b0, mf = 1'b1;
  int      mit = 0;

  task automatic expect_bit(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d (model state %0d)", name, got, exp, ms);
    end
  endtask

  initial begin
    bit c0, sw, kn, it, e_sel, e_done_next;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    e_done_next = 1'b0;
    for (int t = 0; t < 6000; t++) begin
      // drive random inputs
      start     = (ms == M_IDLE) && ($urandom % 3 == 0);
      field     = 1'($urandom);
      rc_lsb    = 1'($urandom); rd_lsb = 1'($urandom);
      cd_ne0    = 1'($urandom); delta_neg = 1'($urandom);
      c_zero    = ($urandom % 12 == 0);
      res_done  = ($urandom % 3 == 0);
      #1;
      it    = (ms == M_PHI1) || (ms == M_PHI2);
      c0    = msel ? rd_lsb : rc_lsb;
      sw    = it && c0 && delta_neg;
      kn    = it && c0 && mf && cd_ne0;
      e_sel = msel ^ sw;
      expect_bit("load", load, ms == M_LOAD);
      expect_bit("phase", phase, ms == M_PHI2);
      expect_bit("fsel", fsel, mf);
      if (it) begin
        expect_bit("sel", sel, e_sel);
        expect_bit("z", z, !c0);
        expect_bit("n", n, kn);
        expect_bit("delta_negate", delta_negate, sw);
        expect_bit("delta_dec", delta_dec, !kn);
      end
      expect_bit("load_c", load_c, (ms == M_PHI2) && !e_sel);
      expect_bit("load_d", load_d, (ms == M_PHI2) &&  e_sel);
      expect_bit("load_u", load_u, (ms == M_PHI2) && !e_sel);
      expect_bit("load_w", load_w, (ms == M_PHI2) &&  e_sel);
      expect_bit("delta_en", delta_en, ms == M_PHI2);
      expect_bit("delta_clr", delta_clr, ms == M_LOAD);
      expect_bit("zt_clr", zt_clr, ms == M_LOAD);
      expect_bit("busy", busy, ms != M_IDLE);
      expect_bit("done", done, ms == M_DONE);
      expect_bit("res_start", res_start, e_done_next);
      if (sw) n_swap++;
      // advance the model
      e_done_next = 1'b0;
      case (ms)
        M_IDLE: if (start) begin ms = M_LOAD; mf = field; end
        M_LOAD: begin ms = M_PHI1; msel = 1'b0; mit = 0; end
        M_PHI1: if (c_zero) begin ms = M_RES; e_done_next = 1'b1; end
                else begin ms = M_PHI2; mit++; end
        M_PHI2: begin msel = e_sel; ms = M_PHI1; end
        M_RES:  if (res_done) begin ms = M_DONE; n_ops++; end
        M_DONE: ms = M_IDLE;
        default: ms = M_IDLE;
      endcase
      @(negedge clk);
      checks++;
      if (iterations != 32'(mit)) begin
        failures++;
        $display("FAIL iterations %0d expected %0d", iterations, mit);
      end
    end
    checks += 2;
    if (n_swap == 0) failures++;
    if (n_ops < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
