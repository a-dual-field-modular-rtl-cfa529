// tb_csua2: random test of carry-save unified adder 2 (W = 20).
// GF(p): s + cy == a + b + c + cin (mod 2^W). GF(2^n): s == a ^ b ^ c,
// cy == cin.
module tb_csua2;
  localparam int W = 20;
  logic [W-1:0] a, b, c, s, cy;
  logic         cin, fsel;
  int checks = 0, failures = 0;

  csua2 #(.W(W)) dut (.a(a), .b(b), .c(c), .cin(cin), .fsel(fsel), .s(s), .cy(cy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      cin = 1'($urandom); fsel = 1'($urandom);
      #1;
      checks++;
      if (fsel ? (W'(s + cy) != W'(a + b + c + W'(cin))) : (s != (a ^ b ^ c) || cy != W'(cin))) begin
        failures++;
        $display("FAIL fsel=%0d a=%h b=%h c=%h cin=%0d s=%h cy=%h", fsel, a, b, c, cin, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
