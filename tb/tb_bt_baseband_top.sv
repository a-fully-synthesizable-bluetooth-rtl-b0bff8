// End-to-end testbench: two complete baseband chips (A and B), both at
// their default parameters, with their radio pins cross-connected. Each
// chip's microcontroller is modelled by a bus task that does register
// set-up, packet buffer writes and reads, and background "firmware" work
// (scratch and stack accesses, checked against a model) while the DMA
// engines run. Chip A also talks to a host over its UART (HCI packets in
// and out) and runs its voice codec in A-law with the PCM chip looped
// back, so that every encoded byte must equal the byte it decoded.
// Checked: packets A->B and B->A of types DH1, DM1, DM3, DH5, HV3 (one
// encrypted), payload bytes in the receiver's SRAM, header fields, CRC,
// FEC 2/3 correction of an injected air bit error, CRC failure on an
// error in an uncoded packet, HCI packet decode and UART transmit, voice
// loop-back, radio serial port, hop channel changes, USB packets sent by
// chip A's serial interface engine and received by chip B's, SRAM
// integrity under DMA. Each mechanism
// is counted and the test fails if one never happens.
module tb_bt_baseband_top;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #42 clk = ~clk;   // about 12 MHz
  `include "tb_check.svh"
  `TB_WATCHDOG(600000)

  // ---- the two chips ----
  logic        creq [2], cwe [2], cstk [2], crdy [2], crv [2];
  logic [3:0]  cbe [2];
  logic [15:0] cad [2];
  logic [31:0] cwd [2], crd [2];
  logic [2:0]  irq [2];
  logic        u_rxd [2], u_txd [2], u_rts [2];
  logic        p_clk [2], p_sync [2], p_dout [2], p_din [2];
  logic        rf_d [2], rf_txen [2], rf_rxen [2], rf_in [2], s_clk [2], s_dat [2], s_le [2];
  logic        e_stall [2], e_pre [2], e_tx [2], e_rx [2];
  logic        flip_ab = 0;
  logic        clk_usb = 0;
  always #11 clk_usb = ~clk_usb;   // about 48 MHz, not locked to clk
  logic        usb_dp [2], usb_dm [2], usb_oe [2], usb_rv [2], usb_eop [2], usb_tv [2], usb_trdy [2];
  logic [7:0]  usb_rd [2], usb_td [2];
  logic [3:0]  usb_st [2];
  assign usb_tv[1] = 1'b0;
  assign usb_td[1] = 8'h00;

  assign rf_in[1] = rf_d[0] ^ flip_ab;
  assign rf_in[0] = rf_d[1];

  for (genvar c = 0; c < 2; c++) begin : chip
    bt_baseband_top dut (
      .clk, .rst_n,
      .cpu_req(creq[c]), .cpu_we(cwe[c]), .cpu_stack(cstk[c]), .cpu_be(cbe[c]), .cpu_addr(cad[c]),
      .cpu_wdata(cwd[c]), .cpu_ready(crdy[c]), .cpu_rvalid(crv[c]), .cpu_rdata(crd[c]), .irq(irq[c]),
      .uart_rxd(u_rxd[c]), .uart_txd(u_txd[c]), .uart_rts_n(u_rts[c]), .uart_cts_n(1'b0),
      .pcm_clk(p_clk[c]), .pcm_sync(p_sync[c]), .pcm_dout(p_dout[c]), .pcm_din(p_din[c]),
      .rf_tx_data(rf_d[c]), .rf_tx_en(rf_txen[c]), .rf_rx_en(rf_rxen[c]), .rf_rx_data(rf_in[c]),
      .rf_ser_clk(s_clk[c]), .rf_ser_data(s_dat[c]), .rf_ser_le(s_le[c]),
      .clk_usb,
      .usb_dp_i(c == 1 ? (usb_oe[0] ? usb_dp[0] : 1'b1) : 1'b1),
      .usb_dm_i(c == 1 ? (usb_oe[0] ? usb_dm[0] : 1'b0) : 1'b0),
      .usb_dp_o(usb_dp[c]), .usb_dm_o(usb_dm[c]), .usb_oe(usb_oe[c]),
      .usb_rx_valid(usb_rv[c]), .usb_rx_data(usb_rd[c]), .usb_rx_eop(usb_eop[c]), .usb_rx_status(usb_st[c]),
      .usb_tx_valid(usb_tv[c]), .usb_tx_data(usb_td[c]), .usb_tx_ready(usb_trdy[c]),
      .ev_cpu_stall(e_stall[c]), .ev_stack_preempt(e_pre[c]), .ev_tx_pkt(e_tx[c]), .ev_rx_pkt(e_rx[c])
    );
  end

  // ---- USB: chip A's SIE sends DATA1 packets to chip B's SIE ----
  // The packet CRC16 (x^16+x^15+x^2+1, all ones preset, sent inverted,
  // highest coefficient first) is computed here.
  int n_usb_pkt;
  byte unsigned usb_got[$];
  logic usb_tx_v = 0;
  logic [7:0] usb_tx_b = 0;
  assign usb_tv[0] = usb_tx_v;
  assign usb_td[0] = usb_tx_b;
  always @(posedge clk_usb) if (usb_rv[1]) usb_got.push_back(usb_rd[1]);
  initial begin
    byte unsigned pk[$];
    logic [15:0] c;
    wait (rst_n);
    repeat (100) @(posedge clk_usb);
    for (int n = 0; n < 3; n++) begin
      pk.delete();
      pk.push_back(8'h4B);                       // DATA1
      c = 16'hFFFF;
      for (int i = 0; i < 8 + 8 * n; i++) begin
        byte unsigned v = (i % 5 == 0) ? 8'hFF : 8'($urandom);
        pk.push_back(v);
        for (int k = 0; k < 8; k++) c = {c[14:0], 1'b0} ^ ((v[k] ^ c[15]) ? 16'h8005 : 16'h0);
      end
      c = ~c;
      pk.push_back({<<{c[15:8]}});
      pk.push_back({<<{c[7:0]}});
      usb_got.delete();
      @(negedge clk_usb);
      usb_tx_b = pk[0]; usb_tx_v = 1;
      for (int i = 1; i <= pk.size(); i++) begin
        do @(negedge clk_usb); while (!usb_trdy[0]);
        if (i < pk.size()) usb_tx_b = pk[i]; else usb_tx_v = 0;
      end
      while (!usb_eop[1]) @(posedge clk_usb);
      @(negedge clk_usb);
      check(usb_st[1][3] && usb_st[1][1:0] == 2'b00, $sformatf("USB status %b", usb_st[1]));   // CRC5 flag is meaningless here
      check(usb_got.size() == pk.size(), "USB byte count");
      foreach (pk[i]) if (i < usb_got.size()) check(usb_got[i] == pk[i], "USB byte");
      n_usb_pkt++;
      repeat (200) @(posedge clk_usb);
    end
  end

  // ---- mechanism counters ----
  int n_dma_lc, n_dma_ua, n_dma_au, n_stall, n_pre, n_tx, n_rx, n_crc_ok, n_crc_bad, n_fec;
  int n_ua_pkt, n_ua_tx, n_frames, n_irq_lc, n_rf_words, n_enc, n_hop;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (c == 0 && chip[0].dut.dma_rsp[DMA_LC].ack) n_dma_lc++;
      if (c == 1 && chip[1].dut.dma_rsp[DMA_LC].ack) n_dma_lc++;
      if (e_stall[c]) n_stall++;
      if (e_pre[c]) n_pre++;
      if (e_tx[c]) n_tx++;
      if (e_rx[c]) n_rx++;
    end
    if (chip[0].dut.dma_rsp[DMA_UART].ack) n_dma_ua++;
    if (chip[0].dut.dma_rsp[DMA_AUDIO].ack) n_dma_au++;
  end
  logic irq_lc_q [2];
  always @(posedge clk) for (int c = 0; c < 2; c++) begin
    if (irq[c][0] && !irq_lc_q[c]) n_irq_lc++;
    irq_lc_q[c] <= irq[c][0];
  end

  // ---- radio serial port monitor (chip A) ----
  logic [23:0] ser_sh; logic [23:0] ser_last;
  always @(posedge s_clk[0]) ser_sh <= {ser_sh[22:0], s_dat[0]};
  always @(posedge clk) if (rst_n && s_le[0]) begin ser_last <= ser_sh; n_rf_words++; end

  // ---- air bit error injection on A -> B ----
  int nbit = 0, err_at = 0;
  always @(posedge clk) if (chip[0].dut.tick_1m) begin
    nbit    <= rf_txen[0] ? nbit + 1 : 0;
    flip_ab <= (err_at > 0) && rf_txen[0] && (nbit == err_at);
  end

  // ---- PCM chip on A: the D/A sample of one frame is the A/D sample of the next ----
  int pidx = 99;
  logic [15:0] dsh, loopv;
  always @(negedge p_clk[0]) begin
    if (p_sync[0]) begin pidx = 0; n_frames++; end
    if (pidx < 16) begin
      dsh = {dsh[14:0], p_dout[0]};
      p_din[0] = loopv[15 - pidx];
      if (pidx == 15) loopv = dsh;
    end
    pidx++;
  end

  // ---- host on A's UART at 1.5 Mbit/s (8 clocks per bit) ----
  localparam int BITCLK = 8;
  task automatic host_send(input logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin u_rxd[0] = f[i]; repeat (BITCLK) @(negedge clk); end
  endtask
  logic [7:0] host_got [$];
  initial forever begin
    logic [7:0] b;
    @(negedge u_txd[0]);
    repeat (BITCLK / 2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin repeat (BITCLK) @(negedge clk); b[i] = u_txd[0]; end
    repeat (BITCLK) @(negedge clk);
    check(u_txd[0] == 1'b1, "UART stop bit");
    host_got.push_back(b);
    n_ua_tx++;
  end

  // ---- microcontroller bus model ----
  task automatic acc(input int c, input bit we, input bit stk, input logic [15:0] a,
                     input logic [31:0] wd, output logic [31:0] rd);
    cad[c] = a; cwe[c] = we; cstk[c] = stk; cwd[c] = wd; cbe[c] = 4'hF; creq[c] = 1;
    #1;
    while (!crdy[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    creq[c] = 0;
    rd = crd[c];
    if (!we) check(crv[c], "read data valid one cycle after the access");
  endtask
  task automatic wr(input int c, input logic [15:0] a, input logic [31:0] d);
    logic [31:0] x; acc(c, 1, 0, a, d, x);
  endtask
  task automatic rd(input int c, input logic [15:0] a, output logic [31:0] d);
    acc(c, 0, 0, a, 0, d);
  endtask
  task automatic lc_w(input int c, input int r, input logic [31:0] d); wr(c, 16'h8000 + 16'(4 * r), d); endtask
  task automatic lc_r(input int c, input int r, output logic [31:0] d); rd(c, 16'h8000 + 16'(4 * r), d); endtask
  task automatic ua_w(input int r, input logic [31:0] d); wr(0, 16'h8100 + 16'(4 * r), d); endtask
  task automatic ua_r(input int r, output logic [31:0] d); rd(0, 16'h8100 + 16'(4 * r), d); endtask
  task automatic au_w(input int r, input logic [31:0] d); wr(0, 16'h8200 + 16'(4 * r), d); endtask

  // background firmware work: scratch RAM and stack, checked against a model
  logic [31:0] scr [2][64];
  task automatic work(input int c, input int n);
    logic [31:0] v, x;
    int k;
    for (int i = 0; i < n; i++) begin
      k = $urandom_range(0, 63);
      v = $urandom;
      acc(c, 1, (i % 2) == 1, 16'h0C00 + 16'(4 * k), v, x);
      scr[c][k] = v;
      k = $urandom_range(0, 63);
      acc(c, 0, (i % 3) == 0, 16'h0C00 + 16'(4 * k), 0, x);
      check(x == scr[c][k], $sformatf("chip %0d scratch word %0d intact", c, k));
    end
  endtask

  // ---- one link controller packet ----
  logic [7:0] pay [512];
  task automatic send_pkt(input int s, input logic [3:0] t, input int len, input bit enc,
                          input int err, input bit exp_crc);
    int r = 1 - s;
    logic [31:0] v, st, info;
    pkt_info_t pi = pkt_info(t);
    int nw;
    for (int i = 0; i < 512; i++) pay[i] = 8'($urandom);
    for (int i = 0; i < (len + 3) / 4; i++)
      wr(s, 16'h0100 + 16'(4 * i), {pay[4*i+3], pay[4*i+2], pay[4*i+1], pay[4*i]});
    for (int i = 0; i < 86; i++) wr(r, 16'h0400 + 16'(4 * i), 32'hA5A5A5A5);
    v = {7'd0, 9'(len), 3'd0, 1'b1, 2'd2, 1'b1, 1'b0, 1'b1, 3'd3, t};
    lc_w(s, 1, v); lc_w(r, 1, v);
    lc_w(r, 4, 32'h3F); lc_w(s, 4, 32'h3F);
    lc_w(s, 0, {27'd0, 1'b1, 1'b1, enc, 1'b1, 1'b0});
    lc_w(r, 0, {27'd0, 1'b1, 1'b1, enc, 1'b1, 1'b0});
    err_at = (s == 0) ? err : 0;
    lc_w(s, 0, {27'd0, 1'b1, 1'b1, enc, 1'b1, 1'b1});      // tx_go
    do begin work(s, 8); lc_r(s, 4, st); end while (!st[0]);
    do begin work(r, 4); lc_r(r, 4, st); end while (!st[1]);
    check(irq[r][0], "receiver link controller interrupt");
    lc_r(r, 5, info);
    check(info[3:0] == t && info[6:4] == 3'd3 && info[7] && !info[8] && info[9],
          $sformatf("type %h: header fields %h", t, info));
    check(st[3] && st[5], $sformatf("type %h: HEC and address", t));
    if (pi.has_crc) begin
      check(st[2] == exp_crc, $sformatf("type %h: CRC ok=%b, expected %b", t, st[2], exp_crc));
      if (st[2]) n_crc_ok++; else n_crc_bad++;
    end
    if (pi.pl_hdr_bytes != 0) check(info[24:16] == 9'(len), $sformatf("type %h: length %0d", t, info[24:16]));
    if (info[31:25] != 0) n_fec++;
    if (err != 0 && pi.fec == FEC_23) check(info[31:25] != 0, "FEC 2/3 corrected the air error");
    if (enc) n_enc++;
    if (exp_crc) begin
      nw = (len + 3) / 4;
      for (int i = 0; i < nw; i++) begin
        rd(r, 16'h0400 + 16'(4 * i), v);
        for (int b = 0; b < 4; b++)
          if (4 * i + b < len) check(v[8*b +: 8] == pay[4*i+b], $sformatf("type %h byte %0d in receiver SRAM", t, 4*i+b));
      end
    end
    err_at = 0;
    lc_w(s, 0, 32'h1A); lc_w(r, 0, 32'h1A);
  endtask

  logic [7:0] dec_pat [64];
  initial begin
    logic [31:0] v;
    int lat, ok;
    for (int c = 0; c < 2; c++) begin creq[c] = 0; cwe[c] = 0; cstk[c] = 0; cbe[c] = 0; cad[c] = 0; cwd[c] = 0; end
    u_rxd[0] = 1; u_rxd[1] = 1; p_din[1] = 0; loopv = 0;
    repeat (5) @(negedge clk); rst_n = 1; @(negedge clk);

    // both chips: same piconet addresses and key, buffers at 0x100 / 0x400
    for (int c = 0; c < 2; c++) begin
      lc_w(c, 3, {8'h47, 24'h9E8B33});
      lc_w(c, 2, {4'd0, 12'h400, 4'd0, 12'h100});
      lc_w(c, 7, 32'h0123_4567); lc_w(c, 8, 32'h89AB_CDEF); lc_w(c, 9, 32'h1357_9BDF); lc_w(c, 10, 32'h2468_ACE0);
      lc_w(c, 0, 32'h1A);
      for (int k = 0; k < 64; k++) begin v = $urandom; wr(c, 16'h0C00 + 16'(4 * k), v); scr[c][k] = v; end
    end
    lc_r(0, 3, v); check(v == {8'h47, 24'h9E8B33}, "link controller register read-back");
    lc_w(0, 11, 32'h00A5_3C96);

    // chip A voice: A-law, loop-back through the PCM chip
    for (int i = 0; i < 64; i++) dec_pat[i] = 8'($urandom);
    for (int i = 0; i < 16; i++) wr(0, 16'h0880 + 16'(4 * i), {dec_pat[4*i+3], dec_pat[4*i+2], dec_pat[4*i+1], dec_pat[4*i]});
    au_w(1, 0); au_w(2, 12'h800); au_w(3, 12'h880); au_w(4, 64); au_w(0, 3);

    // chip A UART: 1.5 Mbit/s, ring at 0x600, flow control on
    ua_w(0, 1 << 20); ua_w(4, 12'h600); ua_w(5, 64); ua_w(2, 7); ua_w(1, 5);

    fork
      begin   // host sends an HCI command and an HCI ACL data packet
        repeat (2000) @(negedge clk);
        host_send(8'h01); host_send(8'h03); host_send(8'h0C); host_send(8'h00);
        host_send(8'h02); host_send(8'h2A); host_send(8'h00); host_send(8'h06); host_send(8'h00);
        for (int i = 0; i < 6; i++) host_send(8'h30 + 8'(i));
      end
      begin
        send_pkt(0, PT_DH1, 27, 0, 0, 1);
        send_pkt(0, PT_DM1, 17, 0, 72 + 54 + 20, 1);
        send_pkt(0, PT_DH1, 20, 0, 72 + 54 + 20, 0);
        send_pkt(0, PT_DH5, 339, 1, 0, 1);
        send_pkt(0, PT_HV3, 30, 0, 0, 1);
        send_pkt(1, PT_DM3, 100, 0, 0, 1);
      end
    join
    check(ser_last == 24'hA53C96 && n_rf_words == 1, $sformatf("radio control word %h", ser_last));

    // UART: both HCI packets are in the ring, the last one described
    ua_r(3, v); check(v[0], "UART rx packet interrupt");
    ua_r(10, v); check(v == {13'd0, 3'd2, 16'd6}, $sformatf("PKT_INFO ACL len 6: %h", v));
    ua_r(6, v); check(v == 15, $sformatf("15 bytes in the UART ring (%0d)", v));
    n_ua_pkt = (v == 15) ? 2 : 0;
    rd(0, 16'h0600, v); check(v == 32'h000C0301, $sformatf("HCI command bytes %h", v));
    // UART: send an HCI event to the host
    wr(0, 16'h0700, 32'h01040E04); wr(0, 16'h0704, 32'h00000C03);
    ua_w(3, 7); ua_w(8, 12'h700); ua_w(9, 7); ua_w(1, 7);
    do begin work(0, 4); ua_r(3, v); end while (!v[1]);
    repeat (40) @(negedge clk);
    check(host_got.size() == 7, $sformatf("host got %0d bytes", host_got.size()));
    foreach (host_got[i]) check(host_got[i] == (i < 4 ? 8'(32'h01040E04 >> (8*i)) : 8'(32'h00000C03 >> (8*(i-4)))),
                                $sformatf("HCI event byte %0d", i));

    // voice: stop, then every encoded byte must be a decoded byte, at one latency
    while (n_frames < 140) work(0, 4);
    au_w(0, 0);
    repeat (2000) @(negedge clk);
    lat = -1;
    for (int l = 0; l < 64; l++) begin
      ok = 1;
      for (int i = 0; i < 16; i++) begin
        rd(0, 16'h0800 + 16'(4 * i), v);
        for (int b = 0; b < 4; b++) if (v[8*b +: 8] != dec_pat[(4*i + b + 64 - l) % 64]) ok = 0;
      end
      if (ok) begin lat = l; break; end
    end
    check(lat >= 0, $sformatf("voice loop-back: encoded ring equals decoded ring (latency %0d)", lat));

    // hop channel: changes from slot to slot
    begin
      logic [31:0] h0, h1;
      lc_r(0, 12, h0);
      for (int k = 0; k < 16; k++) begin
        repeat (7500) @(negedge clk);
        lc_r(0, 12, h1);
        check(h1 < 79, "hop channel in range");
        if (h1 != h0) n_hop++;
        h0 = h1;
      end
    end
    check(n_hop > 0, "hop channel changed");
    $display("hop changes=%0d", n_hop);
    $display("mechanisms: lc_dma=%0d uart_dma=%0d audio_dma=%0d cpu_stall=%0d stack_preempt=%0d tx=%0d rx=%0d crc_ok=%0d crc_bad=%0d fec_fix=%0d enc=%0d uart_pkts=%0d uart_tx=%0d frames=%0d lc_irq=%0d rf_words=%0d",
             n_dma_lc, n_dma_ua, n_dma_au, n_stall, n_pre, n_tx, n_rx, n_crc_ok, n_crc_bad, n_fec, n_enc, n_ua_pkt, n_ua_tx, n_frames, n_irq_lc, n_rf_words);
    check(n_dma_lc > 0, "LC DMA happened");        check(n_dma_ua > 0, "UART DMA happened");
    check(n_dma_au > 0, "audio DMA happened");     check(n_stall > 0, "CPU stall happened");
    check(n_pre > 0, "stack preemption happened"); check(n_tx == 6, "6 packets sent");
    check(n_rx >= 6, "packets received");          check(n_crc_ok > 0, "CRC pass happened");
    check(n_crc_bad > 0, "CRC failure happened");  check(n_fec > 0, "FEC correction happened");
    check(n_enc > 0, "encrypted packet happened"); check(n_ua_pkt > 0, "HCI packets received");
    check(n_ua_tx > 0, "UART transmit happened");  check(n_frames > 0, "PCM frames happened");
    check(n_irq_lc > 0, "LC interrupt happened");  check(n_rf_words > 0, "radio control write happened");
    check(n_usb_pkt == 3, "USB packets crossed");
    $display("usb packets=%0d", n_usb_pkt);
    finish_tb();
  end
endmodule
