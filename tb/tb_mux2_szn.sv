// tb_mux2_szn: random test of MUX2 (select, zero, negate) on carry-save
// pairs; also checks that negation plus 2 gives the two's-complement
// negative of the selected value.
module tb_mux2_szn;
  localparam int W = 16;
  logic [W-1:0] in0_s, in0_c, in1_s, in1_c, out_s, out_c;
  logic         s, z, n;
  int checks = 0, failures = 0;

  mux2_szn #(.W(W)) dut (.in0_s(in0_s), .in0_c(in0_c), .in1_s(in1_s), .in1_c(in1_c),
                         .s(s), .z(z), .n(n), .out_s(out_s), .out_c(out_c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] val, got;
    for (int t = 0; t < 1000; t++) begin
      in0_s = W'($urandom); in0_c = W'($urandom); in1_s = W'($urandom); in1_c = W'($urandom);
      s = 1'($urandom); z = 1'($urandom); n = 1'($urandom);
      #1;
      val = s ? W'(in1_s + in1_c) : W'(in0_s + in0_c);
      got = W'(out_s + out_c + (n ? W'(2) : W'(0)));
      checks++;
      if (z ? (out_s != '0 || out_c != '0) : (got != (n ? W'(-val) : val))) begin
        failures++;
        $display("FAIL s=%0d z=%0d n=%0d", s, z, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
