// Testbench of the Bluetooth clock: CLKN counts the 3.2 kHz ticks, CLKE and
// CLK carry their offsets, slot_start comes every 4 ticks, and a load sets CLKN.
module tb_bt_clock;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(200000)
  logic rf = 0, ld = 0, tick, slot, half; logic [27:0] wd = 0, oe, om, clkn, clke, clkb;
  bt_clock dut (.clk, .rst_n, .rf_clk3k2(rf), .clkn_load(ld), .clkn_wdata(wd), .off_e(oe), .off_m(om),
                .clkn, .clke, .clk_bt(clkb), .tick, .slot_start(slot), .half_slot(half));
  // 3.2 kHz from the radio, here one period per 16 system clocks
  always begin #37; rf = 1; #80; rf = 0; #43; end
  int nt = 0, ns = 0, nh = 0;
  always @(posedge clk) begin
    if (tick) nt++;
    if (slot) begin ns++; check(clkb[1:0] == 2'b11, "slot start at CLK[1:0]=3 -> 0"); end
    if (half) nh++;
  end
  initial begin
    oe = 28'h123_4567; om = 28'hFFF_FFFE;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (1600) @(negedge clk);
    check(nt >= 99 && nt <= 101, $sformatf("ticks %0d in 100 periods", nt));
    check(clkn == 28'(nt), "CLKN counts ticks");
    check(clke == 28'(clkn + oe), "CLKE = CLKN + offset");
    check(clkb == 28'(clkn + om), "CLK = CLKN + offset (wraps)");
    check(ns >= nt / 4 - 1 && ns <= nt / 4 + 1, $sformatf("slots %0d", ns));
    check(nh >= nt / 2 - 1 && nh <= nt / 2 + 1, $sformatf("half slots %0d", nh));
    @(negedge clk); ld = 1; wd = 28'hFFF_FFF0; @(negedge clk); ld = 0;
    check(clkn == 28'hFFF_FFF0, "load");
    repeat (16 * 20) @(negedge clk);
    check(clkn >= 28'h3 && clkn <= 28'h5, $sformatf("CLKN wraps mod 2^28: %h", clkn));
    finish_tb();
  end
endmodule
