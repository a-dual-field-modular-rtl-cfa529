// tb_csua1: random test of carry-save unified adder 1 (W = 20).
// GF(p): s + cy == a + b + c + d + cin + cy0 (mod 2^W).
// GF(2^n): s == a ^ b ^ c ^ d with cin XORed into bit 0, cy == cy0.
module tb_csua1;
  localparam int W = 20;
  logic [W-1:0] a, b, c, d, s, cy;
  logic         cin, cy0, fsel;
  int checks = 0, failures = 0;

  csua1 #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .cin(cin), .cy0(cy0), .fsel(fsel), .s(s), .cy(cy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_sum, exp_x;
    for (int t = 0; t < 2000; t++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      cin = 1'($urandom); cy0 = 1'($urandom); fsel = 1'($urandom);
      #1;
      exp_sum = a + b + c + d + W'(cin) + W'(cy0);
      exp_x   = a ^ b ^ c ^ d ^ W'(cin);
      checks++;
      if (fsel ? (W'(s + cy) != exp_sum) : (s != exp_x || cy != W'(cy0))) begin
        failures++;
        $display("FAIL fsel=%0d a=%h b=%h c=%h d=%h cin=%0d cy0=%0d s=%h cy=%h", fsel, a, b, c, d, cin, cy0, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
