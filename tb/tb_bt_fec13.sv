// Testbench of the rate 1/3 FEC: exhaustive over all inputs.
module tb_bt_fec13;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(1000)
  logic ei, dout, fix; logic [2:0] eo, di;
  bt_fec13 dut (.enc_in(ei), .enc_out(eo), .dec_in(di), .dec_out(dout), .dec_fix(fix));
  initial begin
    for (int b = 0; b < 2; b++) begin
      ei = 1'(b); #1 check(eo == {3{1'(b)}}, "encode");
    end
    for (int v = 0; v < 8; v++) begin
      int ones;
      di = 3'(v); ones = v[0] + v[1] + v[2];
      #1 check(dout == (ones >= 2), $sformatf("majority %b", di));
      check(fix == (ones == 1 || ones == 2), "fix flag");
    end
    finish_tb();
  end
endmodule
