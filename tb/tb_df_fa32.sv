// tb_df_fa32: exhaustive test of the dual-field (3,2) adder cell.
// GF(p): s + 2*co equals a + b + c. GF(2^n): s = a^b^c and co = 0.
module tb_df_fa32;
  logic a, b, c, fsel, s, co;
  int checks = 0, failures = 0;

  df_fa32 dut (.a(a), .b(b), .c(c), .fsel(fsel), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {fsel, a, b, c} = 4'(v);
      #1;
      checks++;
      if (fsel ? (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(c))
               : (s != (a ^ b ^ c) || co != 1'b0)) begin
        failures++;
        $display("FAIL fsel=%0d a=%0d b=%0d c=%0d -> s=%0d co=%0d", fsel, a, b, c, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
