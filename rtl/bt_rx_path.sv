// Rx bitstream data path of the link controller: finds a packet in the
// received 1 Mbit/s bitstream and undoes the channel coding on the fly, with
// no packet buffer:
//
//   Rx correlator finds the sync word -> 4 trailer bits are skipped
//   packet header: FEC 1/3 majority, de-whiten, packet header analysis
//   (HEC, address, type) -> payload: FEC decode (2/3 with single error
//   correction, 1/3 or none, as the type says), de-whiten, decrypt, CRC
//   check, payload header analysis (length), data bytes out.
//
// Since the type and length are not known in advance, the header analysis
// programs the payload sequencer: the coding from bb_pkg::pkt_info, the byte
// count from the payload header (or the fixed size of SCO and FHS packets).
//
// Timing: while search is high the correlator watches each air bit (air_en
// strobe with air_bit). sync_det pulses on a match; hdr_done pulses when the
// header is in, with the fields, hec_ok and addr_match. A packet with a bad
// HEC, another address or no payload ends there (pkt_done with pl_ok = 0).
// Otherwise data bytes come out on byte_valid/byte_data as they complete,
// LSB received first, and pkt_done pulses after the CRC with crc_ok. A coded
// block is decoded when its last air bit arrives and its information bits
// are then processed one per clock, well inside the 12 system clocks per air
// bit. fec_fix counts corrected FEC 2/3 blocks of the packet.
module bt_rx_path
  import bb_pkg::*;
#(
  parameter int unsigned THRESH = 58
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        search,
  input  logic [63:0] sync_word,
  input  logic [7:0]  uap,
  input  logic [5:0]  clk6,
  input  logic [2:0]  own_am_addr,
  input  logic        enc_en,
  output logic        ks_step,
  input  logic        ks_bit,
  input  logic        air_en,
  input  logic        air_bit,
  output logic        sync_det,
  output logic        hdr_done,
  output logic [2:0]  am_addr,
  output logic [3:0]  ptype,
  output logic        flow,
  output logic        arqn,
  output logic        seqn,
  output logic        hec_ok,
  output logic        addr_match,
  output logic [1:0]  l_ch,
  output logic        pl_flow,
  output logic [8:0]  pl_len,
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        pkt_done,
  output logic        pl_ok,
  output logic        crc_ok,
  output logic [7:0]  fec_fix,
  output logic        busy
);
  typedef enum logic [2:0] {P_IDLE, P_TRAIL, P_HDR, P_PLH, P_PLD, P_CRC} phase_e;
  phase_e phase;

  // ---------------- correlator ----------------
  logic [6:0] score_unused;
  bt_correlator #(.THRESH(THRESH)) u_cor (.clk, .rst_n, .search(search && phase == P_IDLE), .bit_en(air_en),
    .din(air_bit), .sync_word, .score(score_unused), .det(sync_det));

  // ---------------- coded block collection and FEC decode ----------------
  fec_e        fec;
  logic [14:0] cb;            // received coded bits, first received in bit 0
  logic [3:0]  cb_len, bs;
  logic [9:0]  ib;            // information bits, first in bit 0
  logic [3:0]  ib_len, ib_idx;
  logic        ib_pend;
  logic [2:0]  tcnt;

  logic [14:0] rx_cw;
  logic [9:0]  rx_info;
  logic        f_cor, f_unc, maj, fix13_unused;

  function automatic logic [14:0] rev15(input logic [14:0] v);
    for (int i = 0; i < 15; i++) rev15[i] = v[14 - i];
  endfunction
  function automatic logic [9:0] rev10(input logic [9:0] v);
    for (int i = 0; i < 10; i++) rev10[i] = v[9 - i];
  endfunction

  assign rx_cw = rev15({air_bit, cb[13:0]});
  bt_fec23 u_fec23 (.info(10'd0), .cw(), .rx(rx_cw), .rx_info(rx_info), .corrected(f_cor), .uncorrectable(f_unc));
  bt_fec13 u_fec13 (.enc_in(1'b0), .enc_out(), .dec_in({air_bit, cb[1:0]}), .dec_out(maj), .dec_fix(fix13_unused));

  assign bs = (fec == FEC_23) ? 4'd15 : (fec == FEC_13) ? 4'd3 : 4'd1;

  // ---------------- bit processing: de-whiten, decrypt, fields ----------------
  logic        cur, wh, is_pl, d, step;
  logic [17:0] hdr;
  logic [15:0] plh;
  logic [4:0]  pcnt;          // bit count in header / payload header / CRC
  logic [2:0]  bitn;
  logic [7:0]  sh;
  logic [8:0]  nbytes, len_q;
  logic [15:0] crc;
  logic        crc_zero;
  pkt_info_t   info, info_q;
  logic [2:0]  a_am; pkt_type_e a_pt; logic a_fl, a_aq, a_sq, a_hok, a_am_ok, a_plf;
  logic [1:0]  a_lch; logic [8:0] a_len;

  assign cur   = ib[ib_idx];
  assign step  = ib_pend && phase inside {P_HDR, P_PLH, P_PLD, P_CRC};
  assign is_pl = phase inside {P_PLH, P_PLD, P_CRC};
  assign d     = wh ^ (is_pl & enc_en & ks_bit);
  assign ks_step = step & is_pl & enc_en;

  bt_whiten u_wh (.clk, .rst_n, .init(sync_det), .clk6, .en(step), .din(cur), .dout(wh));
  bt_crc16  u_crc (.clk, .rst_n, .init(sync_det), .uap, .en(step && is_pl), .din(d), .crc, .crc_ok(crc_zero));
  bt_hdr_analysis u_ha (.hdr({d, hdr[17:1]}), .uap, .own_am_addr, .pl_hdr(plh), .am_addr(a_am), .ptype(a_pt),
    .flow(a_fl), .arqn(a_aq), .seqn(a_sq), .hec_ok(a_hok), .addr_match(a_am_ok), .info, .l_ch(a_lch),
    .pl_flow(a_plf), .pl_length(a_len));

  logic [15:0] plh_nx;
  always_comb begin
    plh_nx = plh;
    plh_nx[pcnt[3:0]] = d;
  end

  assign busy = (phase != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE; fec <= FEC_NONE; cb <= '0; cb_len <= '0; ib <= '0; ib_len <= '0; ib_idx <= '0;
      ib_pend <= 1'b0; tcnt <= '0; hdr <= '0; plh <= '0; pcnt <= '0; bitn <= '0; sh <= '0;
      nbytes <= '0; len_q <= '0; info_q <= '0;
      hdr_done <= 1'b0; am_addr <= '0; ptype <= '0; flow <= 1'b0; arqn <= 1'b0; seqn <= 1'b0;
      hec_ok <= 1'b0; addr_match <= 1'b0; l_ch <= '0; pl_flow <= 1'b0; pl_len <= '0;
      byte_valid <= 1'b0; byte_data <= '0; pkt_done <= 1'b0; pl_ok <= 1'b0; crc_ok <= 1'b0; fec_fix <= '0;
    end else begin
      hdr_done   <= 1'b0;
      byte_valid <= 1'b0;
      pkt_done   <= 1'b0;
      if (sync_det) begin
        phase <= P_TRAIL; tcnt <= '0; cb_len <= '0; ib_pend <= 1'b0; fec <= FEC_13;
        pcnt <= '0; fec_fix <= '0; crc_ok <= 1'b0; pl_ok <= 1'b0;
      end else begin
        // ---- collect air bits into coded blocks ----
        if (air_en && phase != P_IDLE) begin
          if (phase == P_TRAIL) begin
            tcnt <= tcnt + 3'd1;
            if (tcnt == 3'd3) phase <= P_HDR;
          end else if (cb_len == bs - 4'd1) begin
            cb_len  <= '0;
            ib_idx  <= '0;
            ib_pend <= 1'b1;
            unique case (fec)
              FEC_23: begin
                ib <= rev10(rx_info); ib_len <= 4'd10;
                if (f_cor) fec_fix <= fec_fix + 8'd1;
              end
              FEC_13:  begin ib <= {9'd0, maj};     ib_len <= 4'd1; end
              default: begin ib <= {9'd0, air_bit}; ib_len <= 4'd1; end
            endcase
          end else begin
            cb[cb_len] <= air_bit;
            cb_len     <= cb_len + 4'd1;
          end
        end
        // ---- process one information bit per clock ----
        if (step) begin
          ib_idx <= ib_idx + 4'd1;
          if (ib_idx == ib_len - 4'd1) ib_pend <= 1'b0;
          unique case (phase)
            P_HDR: begin
              hdr  <= {d, hdr[17:1]};
              pcnt <= pcnt + 5'd1;
              if (pcnt == 5'd17) begin
                hdr_done <= 1'b1;
                {am_addr, ptype, flow, arqn, seqn, hec_ok, addr_match} <=
                  {a_am, a_pt, a_fl, a_aq, a_sq, a_hok, a_am_ok};
                info_q  <= info;
                pcnt    <= '0;
                bitn    <= '0;
                nbytes  <= '0;
                ib_pend <= 1'b0;
                cb_len  <= '0;
                fec     <= info.fec;
                plh     <= '0;
                len_q   <= info.max_bytes;
                if (!a_hok || !a_am_ok || !info.has_payload) begin
                  phase    <= P_IDLE;
                  pkt_done <= 1'b1;
                end else if (info.pl_hdr_bytes != 0) phase <= P_PLH;
                else                                  phase <= P_PLD;
              end
            end
            P_PLH: begin
              plh  <= plh_nx;
              pcnt <= pcnt + 5'd1;
              if (pcnt == 5'(8 * info_q.pl_hdr_bytes - 1)) begin
                pcnt <= '0;
                l_ch <= plh_nx[1:0];
                pl_flow <= plh_nx[2];
                len_q  <= (info_q.pl_hdr_bytes == 2'd2) ? plh_nx[11:3] : {4'd0, plh_nx[7:3]};
                pl_len <= (info_q.pl_hdr_bytes == 2'd2) ? plh_nx[11:3] : {4'd0, plh_nx[7:3]};
                phase  <= (((info_q.pl_hdr_bytes == 2'd2) ? plh_nx[11:3] : {4'd0, plh_nx[7:3]}) != 0) ? P_PLD
                          : info_q.has_crc ? P_CRC : P_IDLE;
                if (((info_q.pl_hdr_bytes == 2'd2) ? plh_nx[11:3] : {4'd0, plh_nx[7:3]}) == 0 && !info_q.has_crc) begin
                  pkt_done <= 1'b1; pl_ok <= 1'b1; ib_pend <= 1'b0;
                end
              end
            end
            P_PLD: begin
              sh   <= {d, sh[7:1]};
              bitn <= bitn + 3'd1;
              if (bitn == 3'd7) begin
                byte_valid <= 1'b1;
                byte_data  <= {d, sh[7:1]};
                nbytes     <= nbytes + 9'd1;
                if (nbytes == len_q - 9'd1) begin
                  if (info_q.has_crc) phase <= P_CRC;
                  else begin phase <= P_IDLE; pkt_done <= 1'b1; pl_ok <= 1'b1; ib_pend <= 1'b0; end
                  if (info_q.pl_hdr_bytes == 0) pl_len <= len_q;
                end
              end
            end
            P_CRC: begin
              pcnt <= pcnt + 5'd1;
              if (pcnt == 5'd15) begin
                phase    <= P_IDLE;
                pkt_done <= 1'b1;
                pl_ok    <= 1'b1;
                ib_pend  <= 1'b0;
              end
            end
            default: ;
          endcase
        end
        if (pkt_done) crc_ok <= crc_zero;
      end
    end
  end
endmodule
