// Testbench of the (15,10) FEC: every codeword must be divisible by g(D),
// carry the data in clear, correct any single error and flag any double error.
module tb_bt_fec23;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)
  logic [9:0] info, rinfo; logic [14:0] cw, rx; logic cor, unc;
  bt_fec23 dut (.info, .cw, .rx, .rx_info(rinfo), .corrected(cor), .uncorrectable(unc));

  // serial division by D^5+D^4+D^2+1, first bit (cw[14]) first
  function automatic bit divisible(input logic [14:0] v);
    logic [4:0] r = 0;
    for (int i = 14; i >= 0; i--) begin
      logic fb;
      fb = r[4] ^ v[i];
      r = {r[3:0], 1'b0};
      if (fb) r ^= 5'b10101;
    end
    return r == 0;
  endfunction

  initial begin
    for (int m = 0; m < 1024; m++) begin
      logic [14:0] c;
      int p, q;
      info = 10'(m); #1 c = cw;
      check(divisible(c) && c[14:5] == info, $sformatf("codeword %h", c));
      rx = c; #1 check(rinfo == info && !cor && !unc, "clean word");
      p = $urandom_range(14, 0);
      rx = c ^ (15'(1) << p); #1 check(rinfo == info && cor && !unc, $sformatf("single error at %0d", p));
      q = (p + 1 + $urandom_range(13, 0)) % 15;
      rx = c ^ (15'(1) << p) ^ (15'(1) << q); #1 check(unc && !cor, $sformatf("double error %0d %0d", p, q));
    end
    finish_tb();
  end
endmodule
