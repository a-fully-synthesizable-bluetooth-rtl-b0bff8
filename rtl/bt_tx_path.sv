// Tx bitstream data path of the link controller: turns one packet into the
// 1 Mbit/s air bitstream with no packet buffer. A sequencer walks the packet
// fields and each bit flows straight through the channel coding blocks:
//
//   access code (preamble 4, sync word 64, trailer 4)  - no coding
//   packet header (10 bits) + HEC (8)                  - whiten, FEC 1/3
//   payload header + data bytes + CRC-16               - encrypt, whiten, FEC
//
// The packet type selects the payload coding through bb_pkg::pkt_info (FEC
// 2/3 in 10-bit blocks padded with zeros, FEC 1/3 for HV1, none for DH and
// HV3; CRC for data packets; one or two payload header bytes), so the
// microcontroller only programs the header fields, the length and where the
// data are. Data bytes arrive one at a time over a byte request/ack port that
// the link controller's DMA control serves from the SRAM; bits of a byte go
// out LSB first.
//
// Timing: start (one clock) latches the configuration; the packet then goes
// out one bit per air_en strobe (the 1 MHz Tx clock of the radio) while
// air_on is high; done pulses after the last bit. Between air strobes the
// sequencer fills the next coded block one source bit per clock, so it needs
// at most 10 clocks per 15 air bits plus the DMA wait; if a block is not
// ready when the radio needs it, underrun pulses and a 0 is sent. The field
// order, codings and generators follow Bluetooth 1.1; the block-filling
// scheme and the port handshakes are this design's own.
module bt_tx_path
  import bb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] sync_word,
  input  logic [7:0]  uap,
  input  logic [5:0]  clk6,
  input  logic [2:0]  am_addr,
  input  logic [3:0]  ptype,
  input  logic        flow,
  input  logic        arqn,
  input  logic        seqn,
  input  logic [1:0]  l_ch,
  input  logic        pl_flow,
  input  logic [8:0]  length,
  input  logic        enc_en,
  // E0 keystream
  output logic        ks_step,
  input  logic        ks_bit,
  // payload bytes
  output logic        byte_req,
  input  logic        byte_ack,
  input  logic [7:0]  byte_data,
  // radio
  input  logic        air_en,
  output logic        air_bit,
  output logic        air_on,
  output logic        done,
  output logic        underrun
);
  typedef enum logic [2:0] {SEC_AC, SEC_HDR, SEC_HEC, SEC_PLH, SEC_PLD, SEC_CRC, SEC_END} sec_e;

  // latched configuration
  logic [63:0] sw_q;
  logic [9:0]  hdr_q;
  logic [15:0] plh_q;
  logic [8:0]  len_q;
  logic        enc_q;
  pkt_info_t   info;
  logic [3:0]  ptype_q;

  assign info = pkt_info(ptype_q);

  sec_e       sec;
  logic [8:0] cnt;         // bit index within the section (byte index in SEC_PLD: bytes_done)
  logic [2:0] bitn;        // bit index within the current data byte
  logic [7:0] cur_byte;
  logic       cur_ok;
  logic [8:0] fetched;

  // ---------------- source bit and its coding ----------------
  logic src, coded, is_pl, is_wh, can_pull, sec_last;
  logic [7:0]  hec;
  logic [15:0] crc;
  logic        hec_ok_unused, crc_ok_unused;
  logic        wh_out;
  logic        busy;

  always_comb begin
    src      = 1'b0;
    sec_last = 1'b0;
    can_pull = 1'b1;
    unique case (sec)
      SEC_AC: begin
        if (cnt < 9'd4)       src = sw_q[0] ^ cnt[0];
        else if (cnt < 9'd68) src = sw_q[6'(cnt - 9'd4)];
        else                  src = ~sw_q[63] ^ cnt[0];
        sec_last = (cnt == 9'd71);
      end
      SEC_HDR: begin src = hdr_q[cnt[3:0]]; sec_last = (cnt == 9'd9); end
      SEC_HEC: begin src = hec[3'd7 - cnt[2:0]]; sec_last = (cnt == 9'd7); end
      SEC_PLH: begin src = plh_q[cnt[3:0]]; sec_last = (cnt == 9'(8 * info.pl_hdr_bytes - 1)); end
      SEC_PLD: begin src = cur_byte[bitn]; can_pull = cur_ok; sec_last = (cnt == len_q - 9'd1) && (bitn == 3'd7); end
      SEC_CRC: begin src = crc[4'd15 - cnt[3:0]]; sec_last = (cnt == 9'd15); end
      default: can_pull = 1'b0;
    endcase
  end

  assign is_pl   = (sec == SEC_PLH) || (sec == SEC_PLD) || (sec == SEC_CRC);
  assign is_wh   = (sec != SEC_AC) && (sec != SEC_END);

  logic pull;   // one source bit is consumed this clock
  bt_hec   u_hec (.clk, .rst_n, .init(start), .uap, .en(pull && sec == SEC_HDR), .din(src), .hec, .hec_ok(hec_ok_unused));
  bt_crc16 u_crc (.clk, .rst_n, .init(start), .uap, .en(pull && (sec == SEC_PLH || sec == SEC_PLD)), .din(src),
                  .crc, .crc_ok(crc_ok_unused));
  bt_whiten u_wh (.clk, .rst_n, .init(start), .clk6, .en(pull && is_wh), .din(src ^ (is_pl & enc_q & ks_bit)),
                  .dout(wh_out));
  assign ks_step = pull & is_pl & enc_q;
  assign coded   = is_wh ? wh_out : src;

  // the next section after the current one ends
  function automatic sec_e next_sec(input sec_e s, input pkt_info_t i, input logic [8:0] l);
    unique case (s)
      SEC_AC:  return SEC_HDR;
      SEC_HDR: return SEC_HEC;
      SEC_HEC: return !i.has_payload ? SEC_END : (i.pl_hdr_bytes != 0) ? SEC_PLH : (l != 0) ? SEC_PLD : SEC_END;
      SEC_PLH: return (l != 0) ? SEC_PLD : i.has_crc ? SEC_CRC : SEC_END;
      SEC_PLD: return i.has_crc ? SEC_CRC : SEC_END;
      default: return SEC_END;
    endcase
  endfunction

  // FEC group of a section: 0 none, 1 rate 1/3, 2 rate 2/3
  fec_e grp_fec;
  assign grp_fec = (sec == SEC_AC) ? FEC_NONE : (sec == SEC_HDR || sec == SEC_HEC) ? FEC_13 : info.fec;

  // ---------------- block filling and FEC ----------------
  function automatic logic [9:0] reverse10(input logic [9:0] v);
    for (int i = 0; i < 10; i++) reverse10[i] = v[9 - i];
  endfunction
  logic [9:0]  blk;
  logic [3:0]  blen;          // source bits in blk
  fec_e        bfec;
  logic [14:0] nxt_sh, out_sh;
  logic [3:0]  nxt_len, out_len;
  logic        nxt_full, filling, group_end;
  logic [14:0] cw23;
  logic [9:0]  unused_info;
  logic        unused_c, unused_u;

  logic [9:0]  blk_pad;
  always_comb begin
    blk_pad = blk;
    for (int i = 0; i < 10; i++) if (4'(i) >= blen) blk_pad[i] = 1'b0;
  end
  // blk[0] is sent first, i.e. it is the highest-order information bit
  bt_fec23 u_fec (.info(reverse10(blk_pad)), .cw(cw23), .rx(15'd0), .rx_info(unused_info), .corrected(unused_c),
                  .uncorrectable(unused_u));

  // a block ends when it is full or when its FEC group ends
  assign group_end = sec_last && (next_sec(sec, info, len_q) == SEC_END || sec == SEC_AC ||
                                  sec == SEC_HEC);
  assign pull = busy && filling && can_pull && sec != SEC_END;

  // bits of the block in sending order (bit 0 first)
  function automatic logic [14:0] reverse15(input logic [14:0] v);
    for (int i = 0; i < 15; i++) reverse15[i] = v[14 - i];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_q <= '0; hdr_q <= '0; plh_q <= '0; len_q <= '0; enc_q <= 1'b0; ptype_q <= '0;
      sec <= SEC_END; cnt <= '0; bitn <= '0; cur_byte <= '0; cur_ok <= 1'b0; fetched <= '0;
      blk <= '0; blen <= '0; bfec <= FEC_NONE; filling <= 1'b0;
      nxt_sh <= '0; nxt_len <= '0; nxt_full <= 1'b0; out_sh <= '0; out_len <= '0;
      busy <= 1'b0; air_on <= 1'b0; done <= 1'b0; underrun <= 1'b0;
    end else begin
      done     <= 1'b0;
      underrun <= 1'b0;
      if (start) begin
        sw_q    <= sync_word;
        hdr_q   <= {seqn, arqn, flow, ptype, am_addr};
        plh_q   <= (pkt_info(ptype).pl_hdr_bytes == 2'd2) ? {4'b0, length, pl_flow, l_ch}
                                                          : {8'b0, length[4:0], pl_flow, l_ch};
        len_q   <= length;
        enc_q   <= enc_en;
        ptype_q <= ptype;
        sec <= SEC_AC; cnt <= '0; bitn <= '0; cur_ok <= 1'b0; fetched <= '0;
        blen <= '0; filling <= 1'b1; nxt_full <= 1'b0; out_len <= '0;
        busy <= 1'b1; air_on <= 1'b0;
      end else begin
        // payload byte arrives
        if (byte_ack) begin
          cur_byte <= byte_data;
          cur_ok   <= 1'b1;
          fetched  <= fetched + 9'd1;
        end
        // pull one source bit into the block
        if (pull) begin
          blk[blen] <= coded;
          blen      <= blen + 4'd1;
          bfec      <= grp_fec;
          if (sec == SEC_PLD) begin
            bitn <= bitn + 3'd1;
            if (bitn == 3'd7) begin cur_ok <= 1'b0; cnt <= cnt + 9'd1; end
          end else cnt <= cnt + 9'd1;
          if (sec_last) begin
            sec <= next_sec(sec, info, len_q);
            cnt <= '0;
            bitn <= '0;
          end
          if (group_end || grp_fec != FEC_23 || blen == 4'd9) filling <= 1'b0;
        end
        // a finished block becomes the next coded chunk
        if (!filling && !nxt_full && busy && blen != 0) begin
          unique case (bfec)
            FEC_13:  begin nxt_sh <= {12'b0, {3{blk_pad[0]}}}; nxt_len <= 4'd3; end
            FEC_23:  begin nxt_sh <= reverse15(cw23); nxt_len <= 4'd15; end
            default: begin nxt_sh <= {14'b0, blk_pad[0]}; nxt_len <= 4'd1; end
          endcase
          nxt_full <= 1'b1;
          blen     <= '0;
          filling  <= (sec != SEC_END);
        end
        // radio takes one bit
        if (air_en && busy) begin
          if (out_len > 4'd1) begin
            out_sh  <= {1'b0, out_sh[14:1]};
            out_len <= out_len - 4'd1;
          end else if (nxt_full) begin
            out_sh   <= nxt_sh;
            out_len  <= nxt_len;
            nxt_full <= 1'b0;
            air_on   <= 1'b1;
          end else if (sec == SEC_END && !filling && blen == 0) begin
            out_len <= '0;
            busy    <= 1'b0;
            air_on  <= 1'b0;
            done    <= 1'b1;
          end else begin
            out_sh   <= '0;
            out_len  <= '0;
            underrun <= air_on;
          end
        end
      end
    end
  end

  assign air_bit  = air_on & out_sh[0];
  assign byte_req = busy && !cur_ok && (fetched < len_q) && !byte_ack;
endmodule
