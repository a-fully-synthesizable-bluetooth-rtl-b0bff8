// HCI UART unit: the UART physical transport between the host and the
// Bluetooth module. There is no receive or transmit FIFO: bytes move between
// one-byte buffer registers and ring buffers in the shared SRAM by DMA.
//
// Parts: baud generator (NCO, 8x oversampling), Tx unit (transmitter buffer,
// shift register, control), Rx unit (data check of the start bit, shift
// register, receiver buffer), HCI packet decoder on the received bytes,
// interrupt register and control, and RTS/CTS flow control.
//
// Receive: each good byte is written by DMA to RX_BASE + RX_WR, RX_WR wrapping
// at RX_SIZE. When the HCI packet decoder sees the last byte of a packet, its
// type and length go to PKT_INFO and the rx-packet interrupt is raised. With
// flow control on, rts_n goes high (stop) when fewer than 4 bytes of the ring
// are free, counting from the microcontroller's read index RX_RD.
// Transmit: writing CTRL.tx_start sends TX_LEN bytes from TX_BASE: each byte
// is fetched by DMA into the transmitter buffer while the previous one shifts
// out; tx-done is raised after the last stop bit. With flow control on, a new
// byte only starts while cts_n is low.
//
// Registers (reg_addr, 32-bit): 0 BAUD (NCO increment, reset 40265 =
// 57.6 kbit/s at 12 MHz); 1 CTRL {flow_en, tx_start (write only), rx_en};
// 2 IER and 3 ISR {err, tx_done, rx_pkt} (ISR write 1 to clear; err = framing
// error, receiver overrun or unknown HCI indicator); 4 RX_BASE; 5 RX_SIZE;
// 6 RX_WR (read only); 7 RX_RD; 8 TX_BASE; 9 TX_LEN; 10 PKT_INFO
// {type[18:16], length[15:0]}; 11 STATUS {rts_n, cts_n, tx_active}.
// The unit structure, the 16C450 basis, the NCO and the HCI packet decoder
// follow the document; the register map, 8N1 framing, ring buffers and the
// flow control threshold are this design's own.
module uart
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
  input  logic        rxd,
  output logic        txd,
  output logic        rts_n,
  input  logic        cts_n
);
  logic [20:0] baud_inc;
  logic        rx_en, flow_en;
  logic [2:0]  ier, isr, isr_set;
  logic [11:0] rx_base, rx_size, rx_wr, rx_rd, tx_base, tx_len, tx_idx;
  logic [2:0]  pk_type;
  logic [15:0] pk_len;

  logic tick, rx_v, rx_ferr, tx_rdy, tx_busy, tx_wr;
  logic [7:0] rx_byte;
  logic hd_done, hd_err, hd_in;
  logic [2:0] hd_type;
  logic [15:0] hd_len;

  uart_baud u_baud (.clk, .rst_n, .inc(baud_inc), .tick);
  uart_rx   u_rx   (.clk, .rst_n, .tick, .rxd, .valid(rx_v), .rdata(rx_byte), .ferr(rx_ferr));
  hci_pkt_decoder u_hci (.clk, .rst_n, .valid(rx_v & rx_en), .data(rx_byte), .done(hd_done), .err(hd_err),
                         .ptype(hd_type), .plen(hd_len), .in_pkt(hd_in));

  // ---------------- receive buffer -> DMA ----------------
  logic [7:0] rbuf;
  logic       rbuf_full, overrun;
  logic [11:0] used;
  assign used  = (rx_wr >= rx_rd) ? rx_wr - rx_rd : rx_wr + rx_size - rx_rd;
  assign rts_n = ~(rx_en & (~flow_en | (used + 12'd4 < rx_size)));
  assign overrun = rx_v & rx_en & rbuf_full;

  // ---------------- transmit: DMA -> transmitter buffer ----------------
  logic       tx_act, tx_fetched, tx_last_sent;
  logic [7:0] tbyte;
  logic       tx_start;
  assign tx_start = reg_we && reg_addr == 4'd1 && reg_wdata[1];

  uart_tx u_tx (.clk, .rst_n, .tick, .cts(~flow_en | ~cts_n), .wr(tx_wr), .wdata(tbyte), .rdy(tx_rdy),
                .txd, .busy(tx_busy));
  assign tx_wr = tx_fetched & tx_rdy;

  // ---------------- DMA: receive first, then transmit ----------------
  logic act, act_we;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      act <= 1'b0; act_we <= 1'b0;
    end else if (act) begin
      if (dma_rsp.ack) act <= 1'b0;
    end else if (rbuf_full) begin
      act <= 1'b1; act_we <= 1'b1;
    end else if (tx_act && !tx_fetched && tx_idx != tx_len) begin
      act <= 1'b1; act_we <= 1'b0;
    end

  always_comb begin
    dma_req.req   = act;
    dma_req.we    = act_we;
    dma_req.addr  = act_we ? rx_base + rx_wr : tx_base + tx_idx;
    dma_req.wdata = rbuf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbuf <= '0; rbuf_full <= 1'b0; rx_wr <= '0;
      tx_act <= 1'b0; tx_fetched <= 1'b0; tbyte <= '0; tx_idx <= '0; tx_last_sent <= 1'b0;
    end else begin
      // receive
      if (act && act_we && dma_rsp.ack) begin
        rbuf_full <= 1'b0;
        rx_wr     <= (rx_wr + 12'd1 >= rx_size) ? 12'd0 : rx_wr + 12'd1;
      end
      if (rx_v && rx_en && !rbuf_full) begin
        rbuf      <= rx_byte;
        rbuf_full <= 1'b1;
      end
      if (!rx_en) rx_wr <= '0;
      // transmit
      if (act && !act_we && dma_rsp.ack) begin
        tbyte      <= dma_rsp.rdata;
        tx_fetched <= 1'b1;
        tx_idx     <= tx_idx + 12'd1;
      end
      if (tx_wr) tx_fetched <= 1'b0;
      tx_last_sent <= 1'b0;
      if (tx_start) begin
        tx_act <= (reg_wdata[1] && tx_len != 0);
        tx_idx <= '0;
      end else if (tx_act && tx_idx == tx_len && !tx_fetched && tx_rdy && !tx_busy && !act) begin
        tx_act       <= 1'b0;
        tx_last_sent <= 1'b1;
      end
    end
  end

  // ---------------- registers and interrupts ----------------
  always_comb begin
    isr_set    = '0;
    isr_set[0] = hd_done;
    isr_set[1] = tx_last_sent;
    isr_set[2] = rx_ferr | overrun | hd_err;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud_inc <= 21'd40265; rx_en <= 1'b0; flow_en <= 1'b0; ier <= '0; isr <= '0;
      rx_base <= '0; rx_size <= 12'd256; rx_rd <= '0; tx_base <= '0; tx_len <= '0;
      pk_type <= '0; pk_len <= '0;
    end else begin
      isr <= isr | isr_set;
      if (hd_done) begin pk_type <= hd_type; pk_len <= hd_len; end
      if (reg_we)
        unique case (reg_addr)
          4'd0: baud_inc <= reg_wdata[20:0];
          4'd1: begin rx_en <= reg_wdata[0]; flow_en <= reg_wdata[2]; end
          4'd2: ier <= reg_wdata[2:0];
          4'd3: isr <= (isr & ~reg_wdata[2:0]) | isr_set;
          4'd4: rx_base <= reg_wdata[11:0];
          4'd5: rx_size <= reg_wdata[11:0];
          4'd7: rx_rd <= reg_wdata[11:0];
          4'd8: tx_base <= reg_wdata[11:0];
          4'd9: tx_len <= reg_wdata[11:0];
          default: ;
        endcase
    end
  end

  always_comb
    unique case (reg_addr)
      4'd0:  reg_rdata = {11'd0, baud_inc};
      4'd1:  reg_rdata = {29'd0, flow_en, 1'b0, rx_en};
      4'd2:  reg_rdata = {29'd0, ier};
      4'd3:  reg_rdata = {29'd0, isr};
      4'd4:  reg_rdata = {20'd0, rx_base};
      4'd5:  reg_rdata = {20'd0, rx_size};
      4'd6:  reg_rdata = {20'd0, rx_wr};
      4'd7:  reg_rdata = {20'd0, rx_rd};
      4'd8:  reg_rdata = {20'd0, tx_base};
      4'd9:  reg_rdata = {20'd0, tx_len};
      4'd10: reg_rdata = {13'd0, pk_type, pk_len};
      4'd11: reg_rdata = {28'd0, hd_in, rts_n, cts_n, tx_act};
      default: reg_rdata = '0;
    endcase

  assign irq = |(isr & ier);
endmodule
