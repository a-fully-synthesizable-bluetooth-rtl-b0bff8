// lc_regs: the CPU-visible register file of the link controller.
// The firmware sets up each packet here (type, addresses, length, buffer
// base addresses in SRAM), starts it, and reads back the results of
// received packets. Done events are latched in STATUS and raise irq when
// enabled.
// Word map (reg_addr):
//   0 CTRL    [0] tx_go (write 1, self clearing)  [1] rx_en  [2] enc_en
//             [3] irq_en_tx  [4] irq_en_rx
//   1 PKT     [3:0] type [6:4] AM_ADDR [7] FLOW [8] ARQN [9] SEQN
//             [11:10] L_CH [12] payload FLOW [24:16] payload length
//   2 BASE    [11:0] Tx buffer base  [27:16] Rx buffer base
//   3 ADDR    [23:0] LAP  [31:24] UAP
//   4 STATUS  [0] tx_done [1] rx_done [2] crc_ok [3] hec_ok [4] underrun
//             [5] addr_match (bits 0,1,4 write-1-to-clear; 2,3,5 follow
//             the last received packet)
//   5 RXINFO  read only: [3:0] type [6:4] AM_ADDR [7] FLOW [8] ARQN [9] SEQN
//             [11:10] L_CH [24:16] length [31:25] FEC 2/3 blocks corrected
//   6 CLKN    read: native clock [27:0]; write: load it
//   7..10 KEY E0 initial register contents (see link_controller)
//   11 RFCTL  write: send [23:0] to the radio's serial control port;
//             read [0]: busy
//   12 HOP    read only: [6:0] hop channel for the current clock and address
// Timing: writes take effect on the clock edge of reg_we; reads are
// combinational from reg_addr.
// From the document: the link controller is driven by the microcontroller
// through registers. Own choices: the whole register map.
module lc_regs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [3:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        irq,
  // configuration out
  output logic        tx_go,
  output logic        rx_en,
  output logic        enc_en,
  output logic [31:0] pkt_cfg,
  output logic [11:0] tx_base,
  output logic [11:0] rx_base,
  output logic [23:0] lap,
  output logic [7:0]  uap,
  output logic [31:0] key [4],
  output logic        clkn_load,
  output logic        rf_wr,
  // events and results in
  input  logic        ev_tx_done,
  input  logic        ev_rx_done,
  input  logic        ev_underrun,
  input  logic        rx_crc_ok,
  input  logic        rx_hec_ok,
  input  logic        rx_addr_match,
  input  logic [31:0] rx_info,
  input  logic [27:0] clkn,
  input  logic        rf_busy,
  input  logic [6:0]  hop_chan
);
  logic [4:0] ctrl_q;
  logic [2:0] st_q;        // tx_done, rx_done, underrun
  logic [2:0] res_q;       // crc_ok, hec_ok, addr_match
  logic [27:0] bases_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q  <= '0;
      pkt_cfg <= '0;
      bases_q <= '0;
      lap     <= '0;
      uap     <= '0;
      st_q    <= '0;
      res_q   <= '0;
      for (int i = 0; i < 4; i++) key[i] <= '0;
    end else begin
      ctrl_q[0] <= 1'b0;
      if (ev_tx_done)  st_q[0] <= 1'b1;
      if (ev_rx_done)  st_q[1] <= 1'b1;
      if (ev_underrun) st_q[2] <= 1'b1;
      if (ev_rx_done)  res_q <= {rx_addr_match, rx_hec_ok, rx_crc_ok};
      if (reg_we) begin
        case (reg_addr)
          4'd0: ctrl_q  <= reg_wdata[4:0];
          4'd1: pkt_cfg <= reg_wdata;
          4'd2: bases_q <= reg_wdata[27:0];
          4'd3: {uap, lap} <= reg_wdata;
          4'd4: st_q <= st_q & ~{reg_wdata[4], reg_wdata[1:0]};
          4'd7, 4'd8, 4'd9, 4'd10: key[2'(reg_addr - 4'd7)] <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  assign tx_go     = ctrl_q[0];
  assign rx_en     = ctrl_q[1];
  assign enc_en    = ctrl_q[2];
  assign tx_base   = bases_q[11:0];
  assign rx_base   = bases_q[27:16];
  assign clkn_load = reg_we && reg_addr == 4'd6;
  assign rf_wr     = reg_we && reg_addr == 4'd11;
  assign irq       = (ctrl_q[3] & st_q[0]) | (ctrl_q[4] & st_q[1]);

  always_comb begin
    case (reg_addr)
      4'd0:    reg_rdata = {27'd0, ctrl_q};
      4'd1:    reg_rdata = pkt_cfg;
      4'd2:    reg_rdata = {4'd0, bases_q};
      4'd3:    reg_rdata = {uap, lap};
      4'd4:    reg_rdata = {26'd0, res_q[2], st_q[2], res_q[1], res_q[0], st_q[1], st_q[0]};
      4'd5:    reg_rdata = rx_info;
      4'd6:    reg_rdata = {4'd0, clkn};
      4'd7:    reg_rdata = key[0];
      4'd8:    reg_rdata = key[1];
      4'd9:    reg_rdata = key[2];
      4'd10:   reg_rdata = key[3];
      4'd11:   reg_rdata = {31'd0, rf_busy};
      4'd12:   reg_rdata = {25'd0, hop_chan};
      default: reg_rdata = '0;
    endcase
  end
endmodule
