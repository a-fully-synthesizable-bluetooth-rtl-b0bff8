// bt_baseband_top: the synthesizable Bluetooth baseband module.
// What it does: joins the blocks the document puts on the chip around a
// single shared SRAM:
//   mmu + sram_sp     shared 4 kB data memory, CPU bus with priority, DMA
//   link_controller   Bluetooth packet Tx/Rx, E0, native clock, radio port
//   uart              HCI transport over UART with DMA and flow control
//   audio_codec       voice codec (A-law, u-law, CVSD) with PCM chip port
//   clk_gen           1 MHz and 3.2 kHz timing strobes
//   usb_sie           USB line coding on its own 48 MHz clock, clk_usb
// The microcontroller, the flash memory, the RF module and the PCM chip
// are outside: their buses and pins are ports of this module. The USB
// protocol layer and endpoint manager, which would connect the SIE to the
// USB DMA channel, are not built: the SIE's byte interface is brought out
// as ports and the USB DMA channel is tied off.
// CPU address map (cpu_addr[15] = 0: SRAM bytes 0..4095; cpu_addr[15] = 1:
// I/O, decoded on cpu_addr[9:8]):
//   0x8000 link controller registers (word n at 0x8000 + 4n)
//   0x8100 UART registers
//   0x8200 audio codec registers
//   0x8300 interrupt status: [0] LC, [1] UART, [2] audio
// Timing: clk (12 MHz by default) for everything but usb_sie, which runs
// on clk_usb (48 MHz); the two domains do not meet inside this module. The CPU port timing is
// that of mmu: ready in the request cycle, read data one cycle later.
// From the document: the block set, the shared single-port SRAM with DMA
// and CPU priority, and the 12 MHz system clock tied to USB. Own choices:
// the address map, the interrupt summary register, and 12 MHz supplied as
// its own input rather than divided from 48 MHz here.
module bt_baseband_top
  import bb_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  // microcontroller bus
  input  logic        cpu_req,
  input  logic        cpu_we,
  input  logic        cpu_stack,
  input  logic [3:0]  cpu_be,
  input  logic [15:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic        cpu_ready,
  output logic        cpu_rvalid,
  output logic [31:0] cpu_rdata,
  output logic [2:0]  irq,
  // UART (host)
  input  logic        uart_rxd,
  output logic        uart_txd,
  output logic        uart_rts_n,
  input  logic        uart_cts_n,
  // PCM codec chip
  output logic        pcm_clk,
  output logic        pcm_sync,
  output logic        pcm_dout,
  input  logic        pcm_din,
  // radio
  output logic        rf_tx_data,
  output logic        rf_tx_en,
  output logic        rf_rx_en,
  input  logic        rf_rx_data,
  output logic        rf_ser_clk,
  output logic        rf_ser_data,
  output logic        rf_ser_le,
  // USB transceiver, and the SIE byte interface (48 MHz domain)
  input  logic        clk_usb,
  input  logic        usb_dp_i,
  input  logic        usb_dm_i,
  output logic        usb_dp_o,
  output logic        usb_dm_o,
  output logic        usb_oe,
  output logic        usb_rx_valid,
  output logic [7:0]  usb_rx_data,
  output logic        usb_rx_eop,
  output logic [3:0]  usb_rx_status,   // {crc16_ok, crc5_ok, stuff_err, pid_err}
  input  logic        usb_tx_valid,
  input  logic [7:0]  usb_tx_data,
  output logic        usb_tx_ready,
  // event strobes for monitoring
  output logic        ev_cpu_stall,
  output logic        ev_stack_preempt,
  output logic        ev_tx_pkt,
  output logic        ev_rx_pkt
);
  dma_req_t dma_req [DMA_NCH];
  dma_rsp_t dma_rsp [DMA_NCH];

  logic        io_req, io_we;
  logic [14:0] io_addr;
  logic [31:0] io_wdata, io_rdata;
  logic        ram_en, ram_we;
  logic [3:0]  ram_be;
  logic [MEM_AW-3:0] ram_addr;
  logic [31:0] ram_d, ram_q;
  logic        tick_1m, tick_3k2;
  logic [31:0] lc_rd, ua_rd, au_rd;

  mmu u_mmu (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_stack, .cpu_be, .cpu_addr, .cpu_wdata,
    .cpu_ready, .cpu_rvalid, .cpu_rdata,
    .io_req, .io_we, .io_addr, .io_wdata, .io_rdata,
    .dma_req, .dma_rsp,
    .ram_en, .ram_we, .ram_be, .ram_addr, .ram_d, .ram_q,
    .ev_cpu_stall, .ev_stack_preempt
  );

  sram_sp #(.ADDR_W(MEM_AW - 2), .DATA_W(32)) u_ram (
    .clk, .en(ram_en), .we(ram_we), .be(ram_be), .addr(ram_addr), .d(ram_d), .q(ram_q)
  );

  clk_gen #(.DIV_1M(CLK_PER_US)) u_cg (.clk, .rst_n, .tick_1m, .tick_3k2);

  logic sel_lc, sel_ua, sel_au;
  assign sel_lc = io_req && io_we && io_addr[9:8] == 2'd0;
  assign sel_ua = io_req && io_we && io_addr[9:8] == 2'd1;
  assign sel_au = io_req && io_we && io_addr[9:8] == 2'd2;

  link_controller u_lc (
    .clk, .rst_n, .reg_we(sel_lc), .reg_addr(io_addr[5:2]), .reg_wdata(io_wdata), .reg_rdata(lc_rd),
    .irq(irq[0]), .dma_req(dma_req[DMA_LC]), .dma_rsp(dma_rsp[DMA_LC]),
    .tick_1m, .tick_3k2,
    .rf_tx_data, .rf_tx_en, .rf_rx_en, .rf_rx_data, .rf_ser_clk, .rf_ser_data, .rf_ser_le,
    .ev_tx_pkt, .ev_rx_pkt
  );

  uart u_uart (
    .clk, .rst_n, .reg_we(sel_ua), .reg_addr(io_addr[5:2]), .reg_wdata(io_wdata), .reg_rdata(ua_rd),
    .irq(irq[1]), .dma_req(dma_req[DMA_UART]), .dma_rsp(dma_rsp[DMA_UART]),
    .rxd(uart_rxd), .txd(uart_txd), .rts_n(uart_rts_n), .cts_n(uart_cts_n)
  );

  audio_codec u_audio (
    .clk, .rst_n, .reg_we(sel_au), .reg_addr(io_addr[4:2]), .reg_wdata(io_wdata), .reg_rdata(au_rd),
    .irq(irq[2]), .dma_req(dma_req[DMA_AUDIO]), .dma_rsp(dma_rsp[DMA_AUDIO]),
    .pcm_clk, .pcm_sync, .pcm_dout, .pcm_din
  );

  // USB is not built: its DMA channel never requests.
  assign dma_req[DMA_USB] = '0;

  logic usb_rx_active;
  usb_sie u_usb (
    .clk(clk_usb), .rst_n, .usb_dp_i, .usb_dm_i, .usb_dp_o, .usb_dm_o, .usb_oe,
    .rx_active(usb_rx_active), .rx_valid(usb_rx_valid), .rx_data(usb_rx_data),
    .rx_eop(usb_rx_eop), .rx_pid_err(usb_rx_status[0]), .rx_stuff_err(usb_rx_status[1]),
    .rx_crc5_ok(usb_rx_status[2]), .rx_crc16_ok(usb_rx_status[3]),
    .tx_valid(usb_tx_valid), .tx_data(usb_tx_data), .tx_ready(usb_tx_ready)
  );

  always_comb begin
    case (io_addr[9:8])
      2'd0:    io_rdata = lc_rd;
      2'd1:    io_rdata = ua_rd;
      2'd2:    io_rdata = au_rd;
      default: io_rdata = {29'd0, irq};
    endcase
  end
endmodule
