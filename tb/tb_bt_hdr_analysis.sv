// Testbench of header analysis: headers with a reference HEC are decoded into
// their fields, corrupt ones fail the HEC, the address filter and the payload
// length field follow the packet type.
module tb_bt_hdr_analysis;
  import bb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)
  logic [17:0] hdr; logic [7:0] uap; logic [2:0] own, am; logic [15:0] plh;
  pkt_type_e pt; logic fl, aq, sq, hok, am_ok, plf; pkt_info_t info; logic [1:0] lch; logic [8:0] len;
  bt_hdr_analysis dut (.hdr, .uap, .own_am_addr(own), .pl_hdr(plh), .am_addr(am), .ptype(pt), .flow(fl),
                       .arqn(aq), .seqn(sq), .hec_ok(hok), .addr_match(am_ok), .info, .l_ch(lch),
                       .pl_flow(plf), .pl_length(len));

  function automatic logic [7:0] ref_hec(input logic [7:0] u, input logic [9:0] h);
    logic [17:0] v;
    v = {u, 10'b0};
    for (int k = 0; k < 10; k++) v[17 - k] ^= h[k];
    for (int i = 17; i >= 8; i--) if (v[i]) v[i -: 9] ^= 9'h1A7;
    return v[7:0];
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [9:0] h; logic [7:0] e; logic [17:0] good;
      h = 10'($urandom); uap = 8'($urandom); own = 3'($urandom); plh = 16'($urandom);
      e = ref_hec(uap, h);
      for (int k = 0; k < 8; k++) good[10 + k] = e[7 - k];
      good[9:0] = h;
      hdr = good; #1;
      check(hok, "good HEC accepted");
      check(am == h[2:0] && pt == pkt_type_e'(h[6:3]) && fl == h[7] && aq == h[8] && sq == h[9], "fields");
      check(am_ok == (h[2:0] == own || h[2:0] == 0), "address filter");
      check(lch == plh[1:0] && plf == plh[2], "payload header L_CH/FLOW");
      if (h[6:3] inside {4'hA, 4'hB, 4'hE, 4'hF})
        check(len == plh[11:3] && info.slots != 1, "multi-slot length");
      else if (h[6:3] inside {4'h3, 4'h4, 4'h9})
        check(len == {4'b0, plh[7:3]} && info.slots == 1, "single-slot length");
      if (h[6:3] == 4'hF) check(info.max_bytes == 339 && info.fec == FEC_NONE, "DH5 info");
      if (h[6:3] == 4'hE) check(info.max_bytes == 224 && info.fec == FEC_23, "DM5 info");
      hdr = good ^ (18'(1) << $urandom_range(17, 0)); #1;
      check(!hok, "corrupt header rejected");
    end
    finish_tb();
  end
endmodule
