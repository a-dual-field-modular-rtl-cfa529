// tb_df_c42: exhaustive test of the dual-field (4,2) compressor cell.
// GF(p): s + 2*(carry + cout) equals a + b + c + d + cin and cout does not
// depend on cin. GF(2^n): s is the XOR of the five inputs, carries are 0.
module tb_df_c42;
  logic a, b, c, d, cin, fsel, s, carry, cout, cout0;
  int checks = 0, failures = 0;

  df_c42 dut (.a(a), .b(b), .c(c), .d(d), .cin(cin), .fsel(fsel), .s(s), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {fsel, a, b, c, d, cin} = 6'(v);
      #1;
      checks++;
      if (fsel ? (int'(s) + 2 * (int'(carry) + int'(cout)) !=
                  int'(a) + int'(b) + int'(c) + int'(d) + int'(cin))
               : (s != (a ^ b ^ c ^ d ^ cin) || carry || cout)) begin
        failures++;
        $display("FAIL inputs %b -> s=%0d carry=%0d cout=%0d", v[5:0], s, carry, cout);
      end
      cout0 = cout;
      cin = ~cin;
      #1;
      checks++;
      if (cout != cout0) begin
        failures++;
        $display("FAIL cout depends on cin");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
