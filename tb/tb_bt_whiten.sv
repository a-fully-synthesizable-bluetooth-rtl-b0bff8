// Testbench of the whitening scrambler: the keystream obeys the recurrence of
// D^7+D^4+1, has period 127, starts from the clock seed, and whitening twice
// with the same seed restores the data.
module tb_bt_whiten;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  logic init = 0, en = 0, din = 0, dout; logic [5:0] clk6 = 0;
  bt_whiten dut (.clk, .rst_n, .init, .clk6, .en, .din, .dout);

  logic s [300];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      clk6 = 6'($urandom);
      @(negedge clk); init = 1; @(negedge clk); init = 0; din = 0;
      for (int k = 0; k < 300; k++) begin
        #1 s[k] = dout; en = 1; @(negedge clk); en = 0;
      end
            check(s[0] == clk6[5], "first whitening bit is CLK6");
      for (int k = 0; k + 7 < 300; k++) check(s[k + 7] == (s[k + 4] ^ s[k]), $sformatf("recurrence %0d", k));
      for (int k = 0; k + 127 < 300; k++) check(s[k + 127] == s[k], "period 127");
      begin
        int nchg = 0;
        for (int k = 0; k < 127; k++) if (s[k + 1] != s[k]) nchg++;
        check(nchg != 0, "not constant");
      end
    end
    finish_tb();
  end
endmodule
