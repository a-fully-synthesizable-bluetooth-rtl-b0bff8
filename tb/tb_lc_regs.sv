// Testbench for lc_regs: writable registers read back; tx_go is a one-clock
// pulse; STATUS bits are set by events, cleared by writing 1, and raise irq
// only when enabled; results latch with the rx event; CLKN and RFCTL writes
// make their strobes; RXINFO and CLKN read the inputs.
module tb_lc_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)
  logic we = 0, irq, go, rxen, enc, cl, rfw; logic [3:0] a = 0; logic [31:0] wd = 0, rd, cfg;
  logic [11:0] tb_, rb; logic [23:0] lap; logic [7:0] uap; logic [31:0] key [4];
  logic etx = 0, erx = 0, eun = 0, crc = 0, hec = 0, am = 0, busy = 0; logic [31:0] info = 0; logic [27:0] clkn = 0; logic [6:0] hop = 7'd55;
  lc_regs dut (.clk, .rst_n, .reg_we(we), .reg_addr(a), .reg_wdata(wd), .reg_rdata(rd), .irq, .tx_go(go), .rx_en(rxen),
    .enc_en(enc), .pkt_cfg(cfg), .tx_base(tb_), .rx_base(rb), .lap, .uap, .key, .clkn_load(cl), .rf_wr(rfw),
    .ev_tx_done(etx), .ev_rx_done(erx), .ev_underrun(eun), .rx_crc_ok(crc), .rx_hec_ok(hec), .rx_addr_match(am),
    .rx_info(info), .clkn, .rf_busy(busy), .hop_chan(hop));
  int ngo = 0, ncl = 0, nrf = 0;
  always @(posedge clk) if (rst_n) begin if (go) ngo++; if (cl) ncl++; if (rfw) nrf++; end
  task automatic w(input int ad, input logic [31:0] d);
    @(negedge clk); a = 4'(ad); wd = d; we = 1; @(negedge clk); we = 0;
  endtask
  task automatic r(input int ad, output logic [31:0] d); @(negedge clk); a = 4'(ad); #1 d = rd; endtask
  task automatic pulse(ref logic s); @(negedge clk); s = 1; @(negedge clk); s = 0; endtask
  initial begin
    logic [31:0] v, x;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 30; k++) begin
      v = $urandom;
      w(1, v); r(1, x); check(x == v && cfg == v, "PKT");
      w(3, v); r(3, x); check(x == v && lap == v[23:0] && uap == v[31:24], "ADDR");
      w(2, v); r(2, x); check(x == {4'd0, v[27:0]} && tb_ == v[11:0] && rb == v[27:16], "BASE");
      w(7 + k % 4, v); r(7 + k % 4, x); check(x == v && key[k % 4] == v, "KEY");
    end
    w(0, 32'h3); @(negedge clk); check(ngo == 1, "tx_go one pulse"); r(0, x); check(x == 32'h2 && rxen && !go, "CTRL rx_en stays");
    w(0, 32'h0); pulse(etx); #1 check(!irq, "no irq while disabled");
    w(0, 32'h18); #1 check(irq, "tx irq when enabled");
    r(4, x); check(x[0] && !x[1], "tx_done set");
    w(4, 32'h1); #1 check(!irq, "W1C clears tx_done"); r(4, x); check(x[0] == 0, "tx_done clear");
    crc = 1; hec = 1; am = 0; pulse(erx); crc = 0; hec = 0;
    r(4, x); check(x[1] && x[2] && x[3] && !x[5] && irq, "rx results latched");
    pulse(eun); r(4, x); check(x[4], "underrun flag");
    pulse(etx); w(4, 32'h2); r(4, x); check(x[0] && !x[1] && x[4], "W1C clears only the bits written");
    w(4, 32'h13); r(4, x); check(x[1:0] == 0 && x[4] == 0 && x[2], "W1C leaves results");
    info = $urandom; clkn = 28'h1234567; r(5, x); check(x == info, "RXINFO"); r(6, x); check(x == 32'h1234567, "CLKN read");
    w(6, 5); w(11, 5); check(ncl == 1 && nrf == 1, "CLKN load and RFCTL strobes");
    busy = 1; r(11, x); check(x == 1, "RFCTL busy");
    r(12, x); check(x == 55, "HOP channel");
    finish_tb();
  end
endmodule
