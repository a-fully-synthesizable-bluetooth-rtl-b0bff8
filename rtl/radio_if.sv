// radio_if: the digital interface to the external 2.4 GHz radio.
// What it does:
//   * Data interface, transmit. The bit from the Tx data path is registered
//     onto rf_tx_data on each 1 MHz strobe (air_en); rf_tx_en is high while
//     a packet is on air.
//   * Data interface, receive, with a digital PLL. rf_rx_data passes a
//     two-flop synchronizer. A bit-phase counter (DIV clocks per bit) runs
//     freely; a bit boundary is expected where it wraps to 0 and the line is
//     sampled half a bit later. Every transition of the line is compared
//     with the counter: a transition in the first half of the bit means the
//     counter runs early, one in the second half that it runs late, and the
//     counter is pulled towards the transition by up to 2 clocks per edge.
//     rx_stb pulses with each recovered bit on rx_bit. From any start phase
//     it locks within about 4 transitions (the 4-bit preamble and the first
//     sync word bits) and then follows slow drift.
//   * In/out interface. rf_rx_en is high when the receiver is wanted and
//     the transmitter is idle.
//   * Serial interface. A write of a 24-bit control word (channel, power and
//     similar) starts a shift-out, MSB first, on ser_clk/ser_data at one bit
//     per 3 system clocks (4 MHz at 12 MHz). ser_data changes one clock
//     before each rising ser_clk; ser_le pulses high for one clock after the
//     last bit to latch the word. busy is high during the shift and writes
//     then are ignored.
// Interface: clk, rst_n, air_en (1 MHz strobe), tx_bit, tx_on, rx_want,
// rf_rx_data in; rx_bit, rx_stb, rf_tx_data, rf_tx_en, rf_rx_en out;
// ctl_wr, ctl_word[23:0] in; ser_clk, ser_data, ser_le, busy out.
// From the document: the split into serial, data and in/out interfaces, a
// digital PLL for receive synchronization, and the 4 MHz serial clock. Own
// choices: the PLL's update rule, the 24-bit control word format and the pin
// names; the document names no radio protocol.
module radio_if #(
  parameter int unsigned DIV = 12      // system clocks per air bit
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        air_en,
  input  logic        tx_bit,
  input  logic        tx_on,
  input  logic        rx_want,
  output logic        rx_bit,
  output logic        rx_stb,
  output logic        rf_tx_data,
  output logic        rf_tx_en,
  output logic        rf_rx_en,
  input  logic        rf_rx_data,
  input  logic        ctl_wr,
  input  logic [23:0] ctl_word,
  output logic        ser_clk,
  output logic        ser_data,
  output logic        ser_le,
  output logic        busy
);
  localparam int unsigned CW = $clog2(DIV);

  // ---- receive DPLL ----
  logic [2:0]    sync_q;            // [2] is the previous synchronized sample
  logic [CW-1:0] ph, ph_nx;
  logic          edge_seen;

  assign edge_seen = sync_q[1] ^ sync_q[2];

  always_comb begin
    ph_nx = (ph == CW'(DIV - 1)) ? '0 : ph + 1'b1;
    if (edge_seen && ph != '0) begin
      if (ph < CW'(DIV / 2))   // transition late in our frame: hold back
        ph_nx = (ph >= CW'(2)) ? ph - 1'b1 : ph;
      else                     // transition early: jump ahead
        ph_nx = (ph >= CW'(DIV - 3)) ? ph + CW'(3) - CW'(DIV) : ph + CW'(3);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q <= '0;
      ph     <= '0;
      rx_stb <= 1'b0;
      rx_bit <= 1'b0;
    end else begin
      sync_q <= {sync_q[1:0], rf_rx_data};
      ph     <= ph_nx;
      rx_stb <= (ph == CW'(DIV / 2));
      if (ph == CW'(DIV / 2)) rx_bit <= sync_q[1];
    end
  end

  // ---- transmit data and in/out ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_tx_data <= 1'b0;
      rf_tx_en   <= 1'b0;
      rf_rx_en   <= 1'b0;
    end else begin
      rf_tx_en <= tx_on;
      rf_rx_en <= rx_want & ~tx_on;
      if (air_en) rf_tx_data <= tx_bit & tx_on;
    end
  end

  // ---- serial control port ----
  logic [23:0] sh_q;
  logic [1:0]  sp;       // phase within a bit: 0 data set, 1 clock high, 2 low
  logic [4:0]  nbit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q    <= '0;
      sp      <= '0;
      nbit    <= '0;
      ser_clk <= 1'b0;
      ser_le  <= 1'b0;
      busy    <= 1'b0;
    end else begin
      ser_le  <= 1'b0;
      ser_clk <= busy && sp == 2'd0;
      if (!busy) begin
        if (ctl_wr) begin
          sh_q <= ctl_word;
          sp   <= '0;
          nbit <= '0;
          busy <= 1'b1;
        end
      end else begin
        sp <= (sp == 2'd2) ? 2'd0 : sp + 2'd1;
        if (sp == 2'd2) begin
          sh_q <= {sh_q[22:0], 1'b0};
          nbit <= nbit + 5'd1;
          if (nbit == 5'd23) begin
            busy   <= 1'b0;
            ser_le <= 1'b1;
          end
        end
      end
    end
  end

  assign ser_data = sh_q[23];
endmodule
