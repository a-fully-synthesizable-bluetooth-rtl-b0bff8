// Testbench for clk_gen: tick_1m comes every 12 clocks; tick_3k2 comes on a
// tick_1m clock, alternately 312 and 313 microseconds apart, so two periods
// are exactly 625 us (3.2 kHz on average).
module tb_clk_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(200000)
  logic t1, t3;
  clk_gen dut (.clk, .rst_n, .tick_1m(t1), .tick_3k2(t3));
  int cyc = 0, last1 = -1, last3 = -1, n3 = 0, n1 = 0, p [$];
  always @(posedge clk) begin
    cyc++;
    if (t1) begin
      if (last1 >= 0) check(cyc - last1 == 12, $sformatf("1 MHz period %0d", cyc - last1));
      last1 = cyc; n1++;
    end
    if (t3) begin
      check(t1, "3.2 kHz tick on a 1 MHz tick");
      if (last3 >= 0) p.push_back(cyc - last3);
      last3 = cyc; n3++;
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (60000) @(negedge clk);
    check(n3 >= 15, $sformatf("%0d slots ticks", n3));
    for (int i = 0; i + 1 < p.size(); i++) begin
      check(p[i] == 3744 || p[i] == 3756, $sformatf("3.2 kHz period %0d clocks", p[i]));
      check(p[i] != p[i+1], "periods alternate");
      check(p[i] + p[i+1] == 7500, "two periods are 625 us");
    end
    finish_tb();
  end
endmodule
