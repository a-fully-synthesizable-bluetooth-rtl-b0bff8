// link_controller: the Bluetooth link controller (baseband) core.
// What it does: sends and receives one baseband packet at a time under
// control of the CPU. It joins
//   lc_regs      register file and interrupt
//   bt_clock     native clock CLKN (3.2 kHz), used for whitening
//   bt_syncword  sync word from the LAP in the ADDR register
//   hop_select   79-channel hop kernel, read by the CPU in register HOP
//   bt_tx_path   access code, header, payload build, FEC, whitening, CRC
//   bt_rx_path   correlator, header check, payload decode, CRC check
//   bt_e0        E0 keystream generator, shared by Tx and Rx
//   radio_if     radio data pins with receive DPLL, serial control port
// Payload bytes are not held here: the Tx path pulls them from SRAM and the
// Rx path pushes them to SRAM through one DMA channel of the memory
// management unit, at TXBASE + n and RXBASE + n. At 1 Mbit/s a byte is
// moved at most every 8 us, so one DMA request is never more than one
// deep.
// Interface: register port (reg_we, reg_addr[3:0], reg_wdata, reg_rdata),
// irq, dma_req/dma_rsp (one channel), tick_1m and tick_3k2 strobes from
// clk_gen, radio pins. Counters ev_tx_pkt, ev_rx_pkt pulse once per packet
// sent and received (used by the top-level testbench).
// Timing: CTRL.tx_go starts a packet at the next 3.2 kHz CLKN tick;
// STATUS.tx_done is set when the last bit is on air. With CTRL.rx_en set
// the receiver searches for the sync word continuously while not
// transmitting.
// From the document: the split of the link controller into these functions
// (Sec. on the link controller) and the use of the shared SRAM and DMA for
// packet data. Own choices: register map, the hop channel offered to the
// CPU (which programs the radio through RFCTL) rather than sent to the radio
// automatically, E0 loading straight from key registers (the key
// generation, E1/E3, is not built), whitening from CLKN rather than from the
// master's clock, one packet per tx_go (no automatic slot scheduling or
// retransmission).
module link_controller
  import bb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [3:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        irq,
  output dma_req_t    dma_req,
  input  dma_rsp_t    dma_rsp,
  input  logic        tick_1m,
  input  logic        tick_3k2,
  output logic        rf_tx_data,
  output logic        rf_tx_en,
  output logic        rf_rx_en,
  input  logic        rf_rx_data,
  output logic        rf_ser_clk,
  output logic        rf_ser_data,
  output logic        rf_ser_le,
  output logic        ev_tx_pkt,
  output logic        ev_rx_pkt
);
  logic        tx_go, rx_en, enc_en, clkn_load, rf_wr, rf_busy;
  logic [31:0] pkt_cfg, rx_info;
  logic [11:0] tx_base, rx_base;
  logic [23:0] lap;
  logic [7:0]  uap;
  logic [31:0] key [4];
  logic [27:0] clkn;
  logic [63:0] sw;
  logic        clkn_tick;
  logic [6:0]  hop_chan;
  logic [27:0] clkn_next;

  // Tx/Rx status
  logic rx_done_q;   // crc_ok settles one clock after pkt_done
  logic tx_done, underrun, tx_on, tx_bit, tx_busy;
  logic byte_req, byte_ack;
  logic [7:0] byte_rd;
  logic ks_tx, ks_rx, ks_bit;
  logic rx_bit, rx_stb, sync_det, hdr_done, rx_hec_ok, rx_am_ok, rx_bval, rx_done, rx_pl_ok, rx_crc_ok, rx_busy;
  logic [2:0] rx_am; logic [3:0] rx_pt; logic rx_fl, rx_aq, rx_sq, rx_plf;
  logic [1:0] rx_lch; logic [8:0] rx_len; logic [7:0] rx_byte, rx_fix;

  lc_regs u_regs (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .irq,
    .tx_go, .rx_en, .enc_en, .pkt_cfg, .tx_base, .rx_base, .lap, .uap, .key, .clkn_load, .rf_wr,
    .ev_tx_done(tx_done), .ev_rx_done(rx_done_q), .ev_underrun(underrun),
    .rx_crc_ok(rx_crc_ok), .rx_hec_ok(rx_hec_ok), .rx_addr_match(rx_am_ok), .rx_info,
    .clkn, .rf_busy, .hop_chan
  );

  assign rx_info = {rx_fix[6:0], rx_len, 3'd0, rx_plf, rx_lch, rx_sq, rx_aq, rx_fl, rx_am, rx_pt};

  bt_clock u_clk (
    .clk, .rst_n, .rf_clk3k2(tick_3k2), .clkn_load, .clkn_wdata(reg_wdata[27:0]),
    .off_e(28'd0), .off_m(28'd0), .clkn, .clke(), .clk_bt(), .tick(clkn_tick), .slot_start(), .half_slot()
  );

  bt_syncword u_sw (.lap, .sw);

  // hop channel of the piconet whose address is in ADDR, on the local clock
  hop_select u_hop (.clk_bt(clkn), .addr({uap[3:0], lap}), .chan(hop_chan));

  // A tx_go waits for the next native clock tick (3.2 kHz, half a slot), so
  // packets start on slot boundaries as in Bluetooth and the receiver, which
  // reads CLKN at its sync word 68 us later, sees the same whitening seed.
  // The first bit goes out on the following 1 MHz strobe.
  logic go_pend, tx_start;
  logic [5:0] clk6_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go_pend <= 1'b0;
      rx_done_q <= 1'b0;
      tx_busy <= 1'b0;
      clk6_q  <= '0;
    end else begin
      rx_done_q <= rx_done;
      if (tx_go) go_pend <= 1'b1;
      if (tx_start) begin
        go_pend <= 1'b0;
        tx_busy <= 1'b1;
        clk6_q  <= clkn_next[6:1];
      end
      if (tx_done) tx_busy <= 1'b0;
      if (sync_det && !tx_busy) clk6_q <= clkn[6:1];
    end
  end
  assign clkn_next = clkn + 28'd1;   // CLKN steps on the same edge as tx_start
  assign tx_start  = go_pend && clkn_tick && !rx_busy;

  bt_tx_path u_tx (
    .clk, .rst_n, .start(tx_start), .sync_word(sw), .uap, .clk6(clk6_q),
    .am_addr(pkt_cfg[6:4]), .ptype(pkt_cfg[3:0]), .flow(pkt_cfg[7]), .arqn(pkt_cfg[8]), .seqn(pkt_cfg[9]),
    .l_ch(pkt_cfg[11:10]), .pl_flow(pkt_cfg[12]), .length(pkt_cfg[24:16]), .enc_en,
    .ks_step(ks_tx), .ks_bit, .byte_req, .byte_ack, .byte_data(byte_rd),
    .air_en(tick_1m), .air_bit(tx_bit), .air_on(tx_on), .done(tx_done), .underrun
  );

  bt_rx_path u_rx (
    .clk, .rst_n, .search(rx_en && !tx_busy), .sync_word(sw), .uap, .clk6(clk6_q),
    .own_am_addr(pkt_cfg[6:4]), .enc_en, .ks_step(ks_rx), .ks_bit,
    .air_en(rx_stb), .air_bit(rx_bit), .sync_det, .hdr_done,
    .am_addr(rx_am), .ptype(rx_pt), .flow(rx_fl), .arqn(rx_aq), .seqn(rx_sq),
    .hec_ok(rx_hec_ok), .addr_match(rx_am_ok), .l_ch(rx_lch), .pl_flow(rx_plf), .pl_len(rx_len),
    .byte_valid(rx_bval), .byte_data(rx_byte), .pkt_done(rx_done), .pl_ok(rx_pl_ok),
    .crc_ok(rx_crc_ok), .fec_fix(rx_fix), .busy(rx_busy)
  );

  // E0 is (re)loaded at the start of every packet in either direction, so
  // both ends of a link with the same key registers produce the same stream.
  bt_e0 u_e0 (
    .clk, .rst_n, .load(tx_start || (sync_det && !tx_busy)),
    .init1(key[0][24:0]), .init2(key[1][30:0]), .init3({key[1][31], key[2]}),
    .init4({key[3], key[0][31:25]}), .init_c(4'd0),
    .en(ks_tx | ks_rx), .din(1'b0), .z(ks_bit), .dout()
  );

  radio_if u_rf (
    .clk, .rst_n, .air_en(tick_1m), .tx_bit, .tx_on, .rx_want(rx_en), .rx_bit, .rx_stb,
    .rf_tx_data, .rf_tx_en, .rf_rx_en, .rf_rx_data,
    .ctl_wr(rf_wr), .ctl_word(reg_wdata[23:0]),
    .ser_clk(rf_ser_clk), .ser_data(rf_ser_data), .ser_le(rf_ser_le), .busy(rf_busy)
  );

  // ---- DMA: Tx reads, Rx writes, one request in flight ----
  logic        act, act_we, wr_pend, gap;
  logic [11:0] tx_idx, rx_idx;
  logic [7:0]  wr_byte;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act     <= 1'b0;
      act_we  <= 1'b0;
      wr_pend <= 1'b0;
      wr_byte <= '0;
      gap     <= 1'b0;
      tx_idx  <= '0;
      rx_idx  <= '0;
    end else begin
      gap <= 1'b0;
      if (tx_start) tx_idx <= '0;
      if (sync_det && !tx_busy) rx_idx <= '0;
      if (rx_bval) begin
        wr_pend <= 1'b1;
        wr_byte <= rx_byte;
      end
      if (act) begin
        if (dma_rsp.ack) begin
          act <= 1'b0;
          gap <= 1'b1;   // Tx lowers byte_req one clock after its ack
          if (act_we) rx_idx <= rx_idx + 12'd1;
          else        tx_idx <= tx_idx + 12'd1;
        end
      end else if (wr_pend && !rx_bval) begin
        act     <= 1'b1;
        act_we  <= 1'b1;
        wr_pend <= 1'b0;
      end else if (byte_req && !gap && !byte_ack) begin
        act    <= 1'b1;
        act_we <= 1'b0;
      end
    end
  end
  assign dma_req.req   = act;
  assign dma_req.we    = act_we;
  assign dma_req.addr  = act_we ? rx_base + rx_idx : tx_base + tx_idx;
  assign dma_req.wdata = wr_byte;
  assign byte_ack      = act && !act_we && dma_rsp.ack;
  assign byte_rd       = dma_rsp.rdata;

  assign ev_tx_pkt = tx_done;
  assign ev_rx_pkt = rx_done_q;
endmodule
