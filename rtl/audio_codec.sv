// Audio codec unit: converts between the 8 kHz linear PCM of an external PCM
// chip and the coded voice bytes of Bluetooth SCO links, which it exchanges
// with the shared SRAM by DMA (no voice FIFO of its own).
//
// Encoder (PCM chip -> air): every 8 kHz frame the A/D sample from the PCM
// interface is coded and one byte is written by DMA to a ring buffer at
// ENC_BASE. A-law and mu-law give one code per sample; CVSD first
// up-samples to 64 kHz by linear interpolation, codes one bit per 64 kHz
// strobe and collects 8 bits (first bit in bit 0) in a serial-to-parallel
// register. Decoder (air -> PCM chip): one byte per frame is read by DMA from
// the ring at DEC_BASE; A-law and mu-law decode it directly, CVSD shifts its
// bits (bit 0 first) into the CVSD decoder at 64 kHz and low-pass filters and
// decimates the result back to 8 kHz. Either way one byte each way per 125 us
// frame, i.e. 128 kbit/s of DMA traffic for a full-duplex link.
//
// Registers (reg_addr, 32-bit): 0 VC_CTRL {irq_en, dec_en, enc_en};
// 1 VCDI_MODE {mode[1:0]}: 0 A-law, 1 mu-law, 2 CVSD (3 behaves as CVSD);
// 2 ENC_BASE, 3 DEC_BASE, 4 BUF_LEN (bytes, ring size), 5 STATUS
// {late, dec_wrap, enc_wrap}, write 1 to clear; 6 ENC_IDX, 7 DEC_IDX
// (read-only ring positions). irq is high while an enabled status bit is set.
// The register names VC_CTRL and VCDI_MODE, the block structure and the
// rates follow the document; the register layout, ring buffers and status
// bits are this design's own.
module audio_codec
  import bb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // controller register interface
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  output logic        irq,
  // DMA
  output dma_req_t    dma_req,
  input  dma_rsp_t    dma_rsp,
  // PCM chip
  output logic        pcm_clk,
  output logic        pcm_sync,
  output logic        pcm_dout,
  input  logic        pcm_din
);
  typedef enum logic [1:0] {M_ALAW = 2'd0, M_ULAW = 2'd1, M_CVSD = 2'd2, M_CVSD2 = 2'd3} mode_e;

  // ---------------- register bank ----------------
  logic        enc_en, dec_en, irq_en;
  mode_e       mode;
  logic [11:0] enc_base, dec_base, buf_len, enc_idx, dec_idx;
  logic [2:0]  status;
  logic [2:0]  set_status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {irq_en, dec_en, enc_en} <= '0;
      mode     <= M_CVSD;
      enc_base <= '0;
      dec_base <= '0;
      buf_len  <= 12'd60;
      status   <= '0;
    end else begin
      status <= status | set_status;
      if (reg_we)
        unique case (reg_addr)
          3'd0: {irq_en, dec_en, enc_en} <= reg_wdata[2:0];
          3'd1: mode     <= mode_e'(reg_wdata[1:0]);
          3'd2: enc_base <= reg_wdata[11:0];
          3'd3: dec_base <= reg_wdata[11:0];
          3'd4: buf_len  <= reg_wdata[11:0];
          3'd5: status   <= (status & ~reg_wdata[2:0]) | set_status;
          default: ;
        endcase
    end
  end

  always_comb
    unique case (reg_addr)
      3'd0: reg_rdata = {29'd0, irq_en, dec_en, enc_en};
      3'd1: reg_rdata = {30'd0, mode};
      3'd2: reg_rdata = {20'd0, enc_base};
      3'd3: reg_rdata = {20'd0, dec_base};
      3'd4: reg_rdata = {20'd0, buf_len};
      3'd5: reg_rdata = {29'd0, status};
      3'd6: reg_rdata = {20'd0, enc_idx};
      default: reg_rdata = {20'd0, dec_idx};
    endcase

  assign irq = irq_en & (|status);

  // ---------------- clocks and PCM interface ----------------
  logic tick256, tick64, tick8;
  logic signed [15:0] adc_s, dac_s;
  logic adc_v;

  audio_clkgen u_clk (.clk, .rst_n, .run(enc_en | dec_en), .pcm_clk, .tick256, .tick64, .tick8);
  pcm_if u_pcm (.clk, .rst_n, .tick256, .tick8, .tx_sample(dac_s), .rx_sample(adc_s), .rx_valid(adc_v),
                .pcm_sync, .pcm_dout, .pcm_din);

  // ---------------- codec engine ----------------
  logic [7:0] a_code, u_code;
  logic signed [15:0] a_lin, u_lin, up_s, dn_s;
  logic [7:0] dec_byte;          // byte being decoded this frame
  logic       dn_v, cvsd_ebit;
  logic       cvsd_mode;
  logic signed [15:0] cvsd_dx;
  logic [2:0] bitc;              // 64 kHz phase within the frame
  logic [7:0] sp, ps;            // S/P and P/S converters

  assign cvsd_mode = mode[1];

  alaw_codec u_alaw (.lin_in(adc_s), .code_out(a_code), .code_in(dec_byte), .lin_out(a_lin));
  ulaw_codec u_ulaw (.lin_in(adc_s), .code_out(u_code), .code_in(dec_byte), .lin_out(u_lin));

  audio_rate_conv u_rc (.clk, .rst_n,
    .up_in_en(adc_v & cvsd_mode), .up_in(adc_s), .up_out_en(tick64 & cvsd_mode), .up_out(up_s),
    .dn_in_en(tick64 & cvsd_mode), .dn_in(cvsd_dx), .dn_out_valid(dn_v), .dn_out(dn_s));

  // the CVSD encoder steps one 64 kHz strobe after the up-sampler output
  logic tick64_d;
  cvsd_codec u_cvsd (.clk, .rst_n, .enc_en(tick64_d & cvsd_mode), .enc_x(up_s), .enc_bit(cvsd_ebit),
                     .dec_en(tick64 & cvsd_mode), .dec_bit(ps[0]), .dec_x(cvsd_dx));

  // encoded byte waiting for DMA, next decoded byte fetched by DMA
  logic [7:0] enc_byte, next_dec;
  logic       enc_pend, next_ok, fetch_pend, tick64_dd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick64_d <= 1'b0; tick64_dd <= 1'b0; bitc <= '0; sp <= '0; ps <= '0;
      dec_byte <= 8'hD5; dac_s <= '0; enc_byte <= '0; enc_pend <= 1'b0;
    end else begin
      tick64_d  <= tick64;
      tick64_dd <= tick64_d;
      if (dma_rsp.ack && dma_req.we) enc_pend <= 1'b0;
      if (tick8) bitc <= '0;
      else if (tick64) bitc <= bitc + 3'd1;
      // encoder
      if (cvsd_mode) begin
        if (tick64_dd) begin
          sp <= {cvsd_ebit, sp[7:1]};
          if (bitc == 3'd0 && enc_en) begin   // eighth bit of the frame is in
            enc_byte <= {cvsd_ebit, sp[7:1]};
            enc_pend <= 1'b1;
          end
        end
      end else if (adc_v && enc_en) begin
        enc_byte <= (mode == M_ALAW) ? a_code : u_code;
        enc_pend <= 1'b1;
      end
      // decoder: a new byte every frame, shifted out bit 0 first for CVSD
      if (tick8) begin
        dec_byte <= next_ok ? next_dec : dec_byte;
        ps       <= next_ok ? next_dec : ps;
      end else if (tick64) ps <= {1'b0, ps[7:1]};
      if (dec_en) begin
        if (cvsd_mode) begin
          if (dn_v) dac_s <= dn_s;
        end else if (tick8) begin
          dac_s <= (mode == M_ALAW) ? a_lin : u_lin;
        end
      end else dac_s <= '0;
    end
  end

  // ---------------- DMA control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_idx <= '0; dec_idx <= '0; next_dec <= '0; next_ok <= 1'b0; fetch_pend <= 1'b0;
    end else begin
      if (tick8) begin
        next_ok    <= 1'b0;
        fetch_pend <= dec_en;
      end
      if (dma_rsp.ack) begin
        if (dma_req.we) enc_idx <= (enc_idx + 12'd1 >= buf_len) ? 12'd0 : enc_idx + 12'd1;
        else begin
          next_dec   <= dma_rsp.rdata;
          next_ok    <= 1'b1;
          fetch_pend <= 1'b0;
          dec_idx    <= (dec_idx + 12'd1 >= buf_len) ? 12'd0 : dec_idx + 12'd1;
        end
      end
      if (!enc_en) enc_idx <= '0;
      if (!dec_en) dec_idx <= '0;
    end
  end

  // one DMA at a time, the encoded byte before the fetch; the request and
  // its direction are held until the acknowledge
  logic act, act_we;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      act <= 1'b0; act_we <= 1'b0;
    end else if (act) begin
      if (dma_rsp.ack) act <= 1'b0;
    end else if (enc_pend || fetch_pend) begin
      act    <= 1'b1;
      act_we <= enc_pend;
    end

  always_comb begin
    dma_req.req   = act;
    dma_req.we    = act_we;
    dma_req.addr  = act_we ? enc_base + enc_idx : dec_base + dec_idx;
    dma_req.wdata = enc_byte;
  end

  always_comb begin
    set_status = '0;
    set_status[0] = dma_rsp.ack && dma_req.we  && (enc_idx + 12'd1 >= buf_len);
    set_status[1] = dma_rsp.ack && !dma_req.we && (dec_idx + 12'd1 >= buf_len);
    set_status[2] = (tick8 && dec_en && fetch_pend) || (adc_v && enc_en && !cvsd_mode && enc_pend);
  end
endmodule
