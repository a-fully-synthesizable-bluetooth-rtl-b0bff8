// Testbench of the HCI UART unit with a host model on RXD/TXD and an SRAM
// model on the DMA port. Checks: HCI packets sent by the host land in the
// receive ring and are decoded (type, length, interrupt); bytes sent from the
// transmit buffer come out on TXD with the right bit time at 1.5 Mbit/s and
// at the 57.6 kbit/s default; RTS stops the host when the ring fills; CTS
// holds the transmitter; a bad stop bit raises the error interrupt.
module tb_uart;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #41.667 clk = ~clk;   // 12 MHz
  `include "tb_check.svh"
  `TB_WATCHDOG(800000)

  logic we = 0, irq, rxd = 1, txd, rts_n, cts_n = 0; logic [3:0] ad = 0; logic [31:0] wd = 0, rd;
  dma_req_t rq; dma_rsp_t rs;
  uart dut (.clk, .rst_n, .reg_we(we), .reg_addr(ad), .reg_wdata(wd), .reg_rdata(rd), .irq,
            .dma_req(rq), .dma_rsp(rs), .rxd, .txd, .rts_n, .cts_n);

  logic [7:0] mem [4096];
  int wcnt = 0;
  always @(posedge clk) begin
    rs.ack <= 1'b0;
    if (rq.req && !rs.ack) begin
      wcnt++;
      if (wcnt == 2) begin
        wcnt = 0; rs.ack <= 1'b1;
        if (rq.we) mem[rq.addr] = rq.wdata; else rs.rdata <= mem[rq.addr];
      end
    end
  end

  int bitclk = 8;   // clocks per bit
  task automatic wreg(input int a, input int d);
    @(negedge clk); we = 1; ad = 4'(a); wd = d; @(negedge clk); we = 0;
  endtask
  task automatic rreg(input int a, output logic [31:0] d);
    @(negedge clk); ad = 4'(a); #1 d = rd;
  endtask
  task automatic host_send(input logic [7:0] b, input bit bad_stop = 0);
    logic [9:0] f = {~bad_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = f[i]; repeat (bitclk) @(negedge clk); end
    rxd = 1; repeat (bitclk) @(negedge clk);
  endtask

  // host receiver on TXD: samples each bit in its middle, using the expected
  // bit time, so a wrong bit time corrupts the bytes or the stop bit
  logic [7:0] got [$];
  int bad_stop = 0;
  initial forever begin
    logic [7:0] b; real tb;
    @(negedge txd);
    tb = bitclk * 83.333;
    #(1.5 * tb);
    for (int i = 0; i < 8; i++) begin b[i] = txd; #(tb); end
    if (txd !== 1'b1) bad_stop++;
    got.push_back(b);
  end

  initial begin
    logic [31:0] r; logic [7:0] pkt [$];
    repeat (3) @(negedge clk); rst_n = 1;
    rreg(0, r); check(r == 40265, "default baud = 57.6 kbit/s");
    wreg(0, 1 << 20);                       // 1.5 Mbit/s
    wreg(4, 12'h200); wreg(5, 64); wreg(2, 7); wreg(1, 1);
    // HCI command packet: 01, opcode 03 0C, length 2, 2 parameter bytes
    pkt = '{8'h01, 8'h03, 8'h0C, 8'h02, 8'hAA, 8'h55};
    foreach (pkt[i]) host_send(pkt[i]);
    repeat (20) @(negedge clk);
    for (int i = 0; i < 6; i++) check(mem[12'h200 + i] == pkt[i], $sformatf("rx byte %0d in SRAM", i));
    rreg(10, r); check(r == {13'd0, 3'd1, 16'd2}, $sformatf("PKT_INFO command len 2: %h", r));
    check(irq, "rx packet interrupt");
    wreg(3, 7); #1 check(!irq, "interrupt cleared");
    // ACL packet with 16-bit length 300
    pkt = '{8'h02, 8'h01, 8'h20, 8'h2C, 8'h01};
    foreach (pkt[i]) host_send(pkt[i]);
    for (int i = 0; i < 300; i++) begin
      host_send(8'(i));
      if (i % 16 == 0) begin rreg(6, r); wreg(7, r); end   // the MCU keeps up with the ring
    end
    repeat (20) @(negedge clk);
    rreg(10, r); check(r == {13'd0, 3'd2, 16'd300}, $sformatf("PKT_INFO ACL len 300: %h", r));
    // RTS: ring of 16 bytes, nobody reads -> stop after 12
    wreg(1, 0); wreg(5, 16); wreg(7, 0); wreg(1, 5);
    for (int i = 0; i < 16 && !rts_n; i++) host_send(8'h04);
    rreg(6, r); check(rts_n && r == 12, $sformatf("RTS raised with 12 bytes in a 16-byte ring (%0d)", r));
    // framing error
    wreg(1, 1); wreg(3, 7);
    host_send(8'h33, 1);
    rxd = 1; repeat (40) @(negedge clk);
    rreg(3, r); check(r[2], "framing error flagged");
    // transmit 5 bytes, CTS first held off
    for (int i = 0; i < 5; i++) mem[12'h300 + i] = 8'(8'hC0 + i * 7);
    wreg(1, 4); wreg(3, 7); cts_n = 1;
    wreg(8, 12'h300); wreg(9, 5); wreg(1, 6);
    repeat (200) @(negedge clk);
    check(got.size() == 0 && txd == 1, "CTS holds the transmitter");
    cts_n = 0;
    repeat (5 * 10 * 8 + 100) @(negedge clk);
    check(got.size() == 5, $sformatf("5 bytes sent (%0d)", got.size()));
    foreach (got[i]) check(got[i] == 8'(8'hC0 + i * 7), $sformatf("tx byte %0d = %h", i, got[i]));
    check(bad_stop == 0, "stop bits in place at 1.5 Mbit/s");
    rreg(3, r); check(r[1], "tx done");
    // the default rate: 57.6 kbit/s, one byte
    wreg(0, 40265); bitclk = 208; got.delete(); wreg(9, 1); wreg(1, 2);
    repeat (10 * 210 + 300) @(negedge clk);
    check(got.size() == 1 && got[0] == 8'hC0, "byte at 57.6 kbit/s");
    check(bad_stop == 0, "stop bit in place at 57.6 kbit/s");
    finish_tb();
  end
endmodule
