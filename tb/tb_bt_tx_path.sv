// Loop-back testbench of the Tx and Rx bitstream data paths: the Tx path's
// air bits go straight into the Rx path (with E0 engines on both sides
// loaded alike). For a set of packet types (POLL, DM1, DH1, DM3, DH5, HV1,
// HV3, with and without encryption) it checks the header fields, HEC, every
// payload byte, the CRC, the number of air bits each packet takes (access
// code 72 + header 54 + coded payload), and that one air bit error per FEC
// 2/3 block is corrected while an error in an uncoded DH1 payload fails the
// CRC. The Rx path's checks here also serve as its testbench.
module tb_bt_tx_path;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(2000000)

  logic start = 0, enc = 0, air_en = 0, t_bit, t_on, t_done, t_under, byte_req, byte_ack = 0;
  logic [7:0] byte_data = 0;
  logic [63:0] sw; logic [7:0] uap = 8'h47; logic [5:0] clk6 = 6'h2B;
  logic [2:0] am = 3'd5; logic [3:0] pt; logic [8:0] len; logic [1:0] lch = 2'd2;
  logic ks_t, ks_r, z_t, z_r, flip = 0;
  bt_syncword u_sw (.lap(24'h9E8B33), .sw);

  bt_tx_path tx (.clk, .rst_n, .start, .sync_word(sw), .uap, .clk6, .am_addr(am), .ptype(pt), .flow(1'b1),
    .arqn(1'b0), .seqn(1'b1), .l_ch(lch), .pl_flow(1'b1), .length(len), .enc_en(enc), .ks_step(ks_t), .ks_bit(z_t),
    .byte_req, .byte_ack, .byte_data, .air_en, .air_bit(t_bit), .air_on(t_on), .done(t_done), .underrun(t_under));

  logic sdet, hdone, r_fl, r_aq, r_sq, r_hok, r_am_ok, bval, pdone, plok, crcok, rbusy, r_plf;
  logic [2:0] r_am; logic [3:0] r_pt; logic [1:0] r_lch; logic [8:0] r_len; logic [7:0] bdata, nfix;
  bt_rx_path rx (.clk, .rst_n, .search(1'b1), .sync_word(sw), .uap, .clk6, .own_am_addr(am), .enc_en(enc),
    .ks_step(ks_r), .ks_bit(z_r), .air_en, .air_bit((t_bit ^ flip) & t_on), .sync_det(sdet), .hdr_done(hdone),
    .am_addr(r_am), .ptype(r_pt), .flow(r_fl), .arqn(r_aq), .seqn(r_sq), .hec_ok(r_hok), .addr_match(r_am_ok),
    .l_ch(r_lch), .pl_flow(r_plf), .pl_len(r_len), .byte_valid(bval), .byte_data(bdata), .pkt_done(pdone),
    .pl_ok(plok), .crc_ok(crcok), .fec_fix(nfix), .busy(rbusy));

  logic e0load = 0;
  bt_e0 e0t (.clk, .rst_n, .load(e0load), .init1(25'h1234567), .init2(31'h2345678), .init3(33'h1_2345_6789),
             .init4(39'h12_3456_789A), .init_c(4'h9), .en(ks_t), .din(1'b0), .z(z_t), .dout());
  bt_e0 e0r (.clk, .rst_n, .load(e0load), .init1(25'h1234567), .init2(31'h2345678), .init3(33'h1_2345_6789),
             .init4(39'h12_3456_789A), .init_c(4'h9), .en(ks_r), .din(1'b0), .z(z_r), .dout());

  // 1 MHz air clock: one strobe every 12 clocks
  int ph = 0;
  always @(posedge clk) begin ph = (ph + 1) % 12; air_en <= (ph == 0); end

  // payload source (DMA model, 2-clock latency)
  logic [7:0] pay [512]; int nsent;
  always @(posedge clk) begin
    byte_ack <= 1'b0;
    if (byte_req && !byte_ack) begin byte_ack <= 1'b1; byte_data <= pay[nsent]; nsent++; end
  end

  logic [7:0] got [$];
  always @(posedge clk) if (bval) got.push_back(bdata);

  // count air bits while the transmitter is on
  int nair;
  always @(posedge clk) if (air_en && t_on) nair++;

  // flip air bits: mode 1 = one error per 15-bit FEC 2/3 block of the payload
  int err_mode = 0, pl_start = 0;
  always @(posedge clk) if (air_en) begin
    flip <= 0;
    if (err_mode != 0 && t_on && nair >= pl_start) begin
      if (err_mode == 1 && ((nair - pl_start) % 15 == 7)) flip <= 1;
      if (err_mode == 2 && (nair - pl_start) == 20) flip <= 1;
    end
  end

  function automatic int coded_bits(input logic [3:0] t, input int l);
    pkt_info_t i = pkt_info(t);
    int n;
    if (!i.has_payload) return 0;
    n = (i.pl_hdr_bytes + l + (i.has_crc ? 2 : 0)) * 8;
    if (i.fec == FEC_23) return ((n + 9) / 10) * 15;
    if (i.fec == FEC_13) return n * 3;
    return n;
  endfunction

  task automatic run(input logic [3:0] t, input int l, input bit e, input int em, input bit expect_crc);
    int exp_bits;
    pkt_info_t i = pkt_info(t);
    pt = t; len = 9'(l); enc = e; err_mode = em; pl_start = 72 + 54;
    for (int k = 0; k < 512; k++) pay[k] = 8'($urandom);
    nsent = 0; got.delete(); nair = 0;
    @(negedge clk); e0load = 1; @(negedge clk); e0load = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      begin wait (t_done); end
      begin repeat (200000) @(negedge clk); end
    join_any
    repeat (40) @(negedge clk);
    exp_bits = 72 + 54 + coded_bits(t, l);
    check(nair == exp_bits, $sformatf("type %h len %0d: %0d air bits, expected %0d", t, l, nair, exp_bits));
    check(r_am == am && r_pt == t && r_fl && !r_aq && r_sq && r_hok && r_am_ok, $sformatf("type %h header fields", t));
    if (i.has_payload) begin
      check(got.size() == l, $sformatf("type %h: %0d bytes received, %0d sent", t, got.size(), l));
      if (em != 2) foreach (got[k]) if (k < l) check(got[k] == pay[k], $sformatf("type %h byte %0d", t, k));
      if (i.pl_hdr_bytes != 0) check(r_len == l && r_lch == lch && r_plf, "payload header");
      if (i.has_crc) check(crcok == expect_crc, $sformatf("type %h CRC ok=%b expected %b", t, crcok, expect_crc));
      if (em == 1) check(nfix > 0, $sformatf("FEC corrected %0d blocks", nfix));
    end
    check(!t_under, "no underrun");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(PT_POLL, 0, 0, 0, 1);
    run(PT_DM1, 17, 0, 0, 1);
    run(PT_DH1, 27, 0, 0, 1);
    run(PT_DH1, 5, 1, 0, 1);
    run(PT_DM3, 121, 1, 0, 1);
    run(PT_DH5, 339, 0, 0, 1);
    run(PT_HV1, 10, 0, 0, 1);
    run(PT_HV3, 30, 1, 0, 1);
    run(PT_DM5, 224, 0, 1, 1);
    run(PT_DH1, 20, 0, 2, 0);
    finish_tb();
  end
endmodule
