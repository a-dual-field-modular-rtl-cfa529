// tb_swap_net: both configurations of the swapping network with random data.
module tb_swap_net;
  localparam int W = 16;
  logic [W-1:0] rc_s, rc_c, rd_s, rd_c, ru_s, ru_c, rw_s, rw_c;
  logic [W-1:0] c_s, c_c, d_s, d_c, u_s, u_c, w_s, w_c;
  logic         sel;
  int checks = 0, failures = 0;

  swap_net #(.W(W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      {rc_s, rc_c, rd_s, rd_c} = {$urandom, $urandom};
      {ru_s, ru_c, rw_s, rw_c} = {$urandom, $urandom};
      sel = 1'(t);
      #1;
      checks++;
      if (!sel && {c_s, c_c, d_s, d_c, u_s, u_c, w_s, w_c} != {rc_s, rc_c, rd_s, rd_c, ru_s, ru_c, rw_s, rw_c}) failures++;
      if ( sel && {c_s, c_c, d_s, d_c, u_s, u_c, w_s, w_c} != {rd_s, rd_c, rc_s, rc_c, rw_s, rw_c, ru_s, ru_c}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
