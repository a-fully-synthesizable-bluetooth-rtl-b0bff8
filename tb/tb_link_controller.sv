// Testbench for link_controller: two link controllers joined by their radio
// pins, each with a byte memory behind its DMA port (ack two clocks after
// the request, like the memory management unit). Packets of several types,
// in both directions and with encryption on and off, are built from the
// sender's memory and must appear in the receiver's memory, with STATUS
// and RXINFO right. Also checks that encryption with different keys at the
// two ends corrupts the payload (CRC fails) and that the native clock
// counts at 3.2 kHz.
module tb_link_controller;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(3000000)
  logic t1, t3;
  clk_gen u_cg (.clk, .rst_n, .tick_1m(t1), .tick_3k2(t3));
  logic we [2], irq [2], txd [2], txen [2], rxen [2], sc [2], sd [2], sl [2], etx [2], erx [2];
  logic [3:0] ad [2]; logic [31:0] wd [2], rd [2];
  dma_req_t rq [2]; dma_rsp_t rs [2];
  logic [7:0] mem [2][4096];
  for (genvar c = 0; c < 2; c++) begin : lc
    link_controller dut (.clk, .rst_n, .reg_we(we[c]), .reg_addr(ad[c]), .reg_wdata(wd[c]), .reg_rdata(rd[c]),
      .irq(irq[c]), .dma_req(rq[c]), .dma_rsp(rs[c]), .tick_1m(t1), .tick_3k2(t3),
      .rf_tx_data(txd[c]), .rf_tx_en(txen[c]), .rf_rx_en(rxen[c]), .rf_rx_data(txd[1-c]),
      .rf_ser_clk(sc[c]), .rf_ser_data(sd[c]), .rf_ser_le(sl[c]), .ev_tx_pkt(etx[c]), .ev_rx_pkt(erx[c]));
    logic pend;
    always @(posedge clk) begin
      rs[c].ack <= 1'b0;
      if (!rst_n) pend <= 0;
      else if (rq[c].req && !pend && !rs[c].ack) pend <= 1;
      else if (pend) begin
        pend <= 0; rs[c].ack <= 1'b1; rs[c].rdata <= mem[c][rq[c].addr];
        if (rq[c].we) mem[c][rq[c].addr] <= rq[c].wdata;
      end
    end
  end
  task automatic w(input int c, input int a, input logic [31:0] d);
    @(negedge clk); ad[c] = 4'(a); wd[c] = d; we[c] = 1; @(negedge clk); we[c] = 0;
  endtask
  task automatic r(input int c, input int a, output logic [31:0] d); @(negedge clk); ad[c] = 4'(a); #1 d = rd[c]; endtask

  task automatic pkt(input int s, input logic [3:0] t, input int len, input bit enc, input bit same_key);
    int rr = 1 - s;
    logic [31:0] cfg, st, info;
    pkt_info_t pi = pkt_info(t);
    for (int i = 0; i < len; i++) mem[s][12'h100 + i] = 8'($urandom);
    for (int i = 0; i < 400; i++) mem[rr][12'h800 + i] = 8'h00;
    cfg = {7'd0, 9'(len), 3'd0, 1'b1, 2'd2, 1'b1, 1'b1, 1'b0, 3'd6, t};
    w(s, 1, cfg); w(rr, 1, cfg);
    w(rr, 10, same_key ? 32'h2468_ACE0 : 32'h1111_2222);
    w(s, 4, 32'h3F); w(rr, 4, 32'h3F);
    w(rr, 0, {27'd0, 1'b1, 1'b0, enc, 1'b1, 1'b0});
    w(s, 0, {27'd0, 1'b0, 1'b1, enc, 1'b0, 1'b1});
    do r(s, 4, st); while (!st[0]);
    repeat (100) @(negedge clk);
    r(rr, 4, st); r(rr, 5, info);
    check(st[1] && irq[rr], $sformatf("type %h: received with interrupt", t));
    check(info[3:0] == t && info[6:4] == 3'd6 && !info[7] && info[8] && info[9] && st[3] && st[5],
          $sformatf("type %h: header %h status %h", t, info, st));
    if (pi.has_crc) check(st[2] == same_key, $sformatf("type %h: CRC %b", t, st[2]));
    if (same_key) for (int i = 0; i < len; i++)
      check(mem[rr][12'h800 + i] == mem[s][12'h100 + i], $sformatf("type %h byte %0d", t, i));
    w(rr, 10, 32'h2468_ACE0);
    w(0, 0, 0); w(1, 0, 0);
  endtask

  initial begin
    logic [31:0] c0, c1;
    for (int c = 0; c < 2; c++) begin we[c] = 0; ad[c] = 0; wd[c] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      w(c, 3, {8'h6C, 24'h123456}); w(c, 2, {4'd0, 12'h800, 4'd0, 12'h100});
      w(c, 7, 32'hDEAD_BEEF); w(c, 8, 32'h0BAD_F00D); w(c, 9, 32'h5555_AAAA); w(c, 10, 32'h2468_ACE0);
    end
    r(0, 6, c0);
    pkt(0, PT_DH1, 27, 0, 1);
    pkt(0, PT_DM1, 9, 1, 1);
    pkt(1, PT_DH3, 183, 1, 1);
    pkt(0, PT_DM5, 224, 0, 1);
    pkt(1, PT_HV2, 20, 0, 1);
    pkt(0, PT_DH1, 20, 1, 0);
    pkt(1, PT_POLL, 0, 0, 1);
    r(0, 6, c1);
    // the HOP register follows the kernel for the current clock and address
    for (int k = 0; k < 20; k++) begin
      logic [31:0] h, c2;
      r(0, 6, c0); r(0, 12, h); r(0, 6, c2);
      if (c0 == c2) check(h[6:0] < 79 && h[6:0] == lc[0].dut.hop_chan, $sformatf("hop channel %0d", h));
      repeat (700) @(negedge clk);
    end
    check(c1 - c0 > 0, $sformatf("native clock runs (%0d ticks)", c1 - c0));
    finish_tb();
  end
endmodule
