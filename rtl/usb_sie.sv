// usb_sie: full-speed (12 Mbit/s) USB serial interface engine with its
// transceiver interface, running on the 48 MHz clock.
// What it does: turns the differential D+/D- line into packet bytes and back.
// Receive: D+/D- pass a two-flop synchronizer. The bit clock is recovered
// by a 4-phase counter that is reset by every line transition and samples
// the line two clocks after it (in the middle of the bit). Samples are
// NRZI decoded (no transition = 1), the sync pattern (seven 0s then a 1) is
// found, a 0 that follows six 1s is dropped (a 1 there is a stuff error),
// and bits are packed LSB first into bytes (rx_valid pulses with rx_data).
// The first byte is the PID and is checked against its complement nibble.
// CRC5 and CRC16 are run over every bit after the PID; at the end of packet
// (SE0) rx_eop pulses with rx_crc5_ok and rx_crc16_ok showing whether the
// remainder equals the fixed residual (01100 and 0x800D).
// Transmit: tx_valid high starts a packet: the sync byte, then the bytes
// of tx_data, LSB first, with a 0 stuffed after six 1s and NRZI coded.
// tx_ready pulses when tx_data has been taken; the next byte must be there
// within 8 bits. When tx_valid is low at a byte boundary the SIE sends SE0
// for two bits and J for one bit, then releases usb_oe. The CRC field
// is supplied in tx_data by the protocol layer.
// Interface: clk (48 MHz), rst_n, usb_dp_i/usb_dm_i, usb_dp_o/usb_dm_o,
// usb_oe (transceiver output enable); rx_active, rx_valid, rx_data[7:0],
// rx_eop, rx_pid_err, rx_stuff_err, rx_crc5_ok, rx_crc16_ok; tx_valid,
// tx_data[7:0], tx_ready. The receiver is blocked while usb_oe is high.
// Timing: one line bit per 4 clocks; a received byte appears about 3 bits
// after its last bit is on the line; tx_data is taken 8 bits before it
// goes on the line.
// From the document: the 48 MHz clock for the USB unit to follow the 12 MHz
// receive bitstream, a transceiver interface with output enable and receive
// clock recovery, and an engine that encodes, decodes and samples at the
// recovered clock. NRZI, bit stuffing, sync, EOP and the CRC rules are those
// of USB 1.1, which the document refers to. Own choices: the byte-wide
// handshake to the protocol layer, the edge-reset clock recovery and the
// CRC check placed here rather than in the protocol layer.
module usb_sie (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       usb_dp_i,
  input  logic       usb_dm_i,
  output logic       usb_dp_o,
  output logic       usb_dm_o,
  output logic       usb_oe,
  output logic       rx_active,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_eop,
  output logic       rx_pid_err,
  output logic       rx_stuff_err,
  output logic       rx_crc5_ok,
  output logic       rx_crc16_ok,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready
);
  // ---------------- receive ----------------
  logic [1:0] dp_s, dm_s;
  logic       line_q;       // last sampled line level (D+)
  logic       prev_dp;      // D+ one clock earlier, for edge detection
  logic [1:0] rph;
  logic       samp;
  logic       se0;

  assign se0  = !dp_s[1] && !dm_s[1];
  assign samp = (rph == 2'd1);

  typedef enum logic [1:0] {R_IDLE, R_SYNC, R_DATA, R_WAITJ} rst_e;
  rst_e       rs;
  logic [2:0] zcnt;         // zeros seen in the sync pattern
  logic [2:0] ones;         // consecutive 1s for unstuffing
  logic [2:0] bcnt;
  logic [6:0] sh;           // the last 7 data bits
  logic       first;        // next byte is the PID
  logic [4:0] c5;
  logic [15:0] c16;
  logic       bit_d;

  assign bit_d = (dp_s[1] == line_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_s <= 2'b10; dm_s <= 2'b00;
      prev_dp <= 1'b1; line_q <= 1'b1; rph <= '0;
      rs <= R_IDLE; zcnt <= '0; ones <= '0; bcnt <= '0; sh <= '0; first <= 1'b0;
      c5 <= '1; c16 <= '1;
      rx_valid <= 1'b0; rx_data <= '0; rx_eop <= 1'b0; rx_pid_err <= 1'b0;
      rx_stuff_err <= 1'b0; rx_crc5_ok <= 1'b0; rx_crc16_ok <= 1'b0;
    end else begin
      dp_s    <= {dp_s[0], usb_dp_i};
      dm_s    <= {dm_s[0], usb_dm_i};
      prev_dp <= dp_s[1];
      rph     <= (dp_s[1] != prev_dp) ? 2'd0 : rph + 2'd1;
      rx_valid <= 1'b0;
      rx_eop   <= 1'b0;
      if (usb_oe) begin
        rs <= R_IDLE;
      end else if (samp) begin
        if (se0) begin
          if (rs == R_DATA) begin
            rx_eop      <= 1'b1;
            rx_crc5_ok  <= (c5 == 5'b01100);
            rx_crc16_ok <= (c16 == 16'h800D);
          end
          rs <= R_WAITJ;
        end else begin
          line_q <= dp_s[1];
          unique case (rs)
            R_IDLE:  if (!dp_s[1]) begin rs <= R_SYNC; zcnt <= 3'd1; end
            R_SYNC:  if (!bit_d) begin
                       if (zcnt != 3'd7) zcnt <= zcnt + 3'd1;
                     end else if (zcnt >= 3'd3) begin
                       rs <= R_DATA; ones <= 3'd1; bcnt <= '0; first <= 1'b1;
                       c5 <= '1; c16 <= '1; rx_stuff_err <= 1'b0;
                     end else rs <= R_WAITJ;
            R_DATA:  begin
                       if (ones == 3'd6) begin           // stuffed bit
                         ones <= '0;
                         if (bit_d) begin rx_stuff_err <= 1'b1; rs <= R_WAITJ; end
                       end else begin
                         ones <= bit_d ? ones + 3'd1 : 3'd0;
                         sh   <= {bit_d, sh[6:1]};
                         bcnt <= bcnt + 3'd1;
                         if (!first) begin
                           c5  <= {c5[3:0], 1'b0}  ^ ((bit_d ^ c5[4])  ? 5'h05    : 5'h00);
                           c16 <= {c16[14:0], 1'b0} ^ ((bit_d ^ c16[15]) ? 16'h8005 : 16'h0000);
                         end
                         if (bcnt == 3'd7) begin
                           rx_valid <= 1'b1;
                           rx_data  <= {bit_d, sh};
                           if (first) rx_pid_err <= ({bit_d, sh[6:4]} != ~sh[3:0]);
                           first <= 1'b0;
                         end
                       end
                     end
            R_WAITJ: if (dp_s[1]) rs <= R_IDLE;
            default: rs <= R_IDLE;
          endcase
        end
      end
    end
  end

  assign rx_active = (rs == R_DATA);

  // ---------------- transmit ----------------
  typedef enum logic [1:0] {T_IDLE, T_DATA, T_EOP} tst_e;
  tst_e       ts;
  logic [1:0] tph;          // clocks within a bit
  logic [2:0] tbit;         // bit within byte
  logic [7:0] tsh;
  logic [2:0] tones;
  logic       tdone;        // last byte sent, EOP follows any stuffed bit
  logic [1:0] eop_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; tph <= '0; tbit <= '0; tsh <= '0; tones <= '0;
      tdone <= 1'b0; eop_n <= '0;
      usb_oe <= 1'b0; usb_dp_o <= 1'b1; usb_dm_o <= 1'b0; tx_ready <= 1'b0;
    end else begin
      tx_ready <= 1'b0;
      tph <= tph + 2'd1;
      unique case (ts)
        T_IDLE: begin
          usb_dp_o <= 1'b1; usb_dm_o <= 1'b0;
          if (tx_valid && tph == 2'd3) begin
            ts <= T_DATA; tsh <= 8'h80; tbit <= '0; tones <= '0; tdone <= 1'b0;
            usb_oe <= 1'b1;
          end
        end
        T_DATA: if (tph == 2'd3) begin
          if (tones == 3'd6) begin                   // stuff a 0
            tones <= '0;
            usb_dp_o <= ~usb_dp_o; usb_dm_o <= usb_dp_o;
          end else if (tdone) begin
            ts <= T_EOP; eop_n <= '0;
            usb_dp_o <= 1'b0; usb_dm_o <= 1'b0;     // SE0
          end else begin
            tones <= tsh[0] ? tones + 3'd1 : 3'd0;
            if (!tsh[0]) begin usb_dp_o <= ~usb_dp_o; usb_dm_o <= usb_dp_o; end
            tsh  <= {1'b0, tsh[7:1]};
            tbit <= tbit + 3'd1;
            if (tbit == 3'd7) begin
              if (tx_valid) begin
                tsh <= tx_data; tx_ready <= 1'b1;
              end else begin
                tdone <= 1'b1;
              end
            end
          end
        end
        T_EOP: if (tph == 2'd3) begin
          eop_n <= eop_n + 2'd1;
          if (eop_n == 2'd1) begin
            usb_dp_o <= 1'b1; usb_dm_o <= 1'b0;     // J after two SE0 bits
          end else if (eop_n == 2'd2) begin
            usb_oe <= 1'b0; ts <= T_IDLE;
          end
        end
        default: ts <= T_IDLE;
      endcase
    end
  end
endmodule
