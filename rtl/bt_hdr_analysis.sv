// Packet header analysis and payload header analysis of received packets.
//
// The Rx side does not know the type or length of a packet in advance, so
// these decoders look at the 18-bit packet header (after FEC 1/3 and
// de-whitening) and at the payload header, and tell the Rx sequencer what
// follows. hdr[0] is the first bit received: AM_ADDR in 2:0, TYPE in 6:3,
// FLOW 7, ARQN 8, SEQN 9 and the HEC in 17:10 (first-sent HEC bit in 10).
// The HEC is re-computed from the UAP (generator D^8+D^7+D^5+D^2+D+1);
// hec_ok and addr_match (AM_ADDR equals own address, or 0 for broadcast)
// decide whether the packet is for this device. The payload header is one
// byte for single-slot packets (L_CH 1:0, FLOW 2, LENGTH 7:3) and two bytes
// for multi-slot ones (LENGTH 11:3, 9 bits). Purely combinational.
module bt_hdr_analysis
  import bb_pkg::*;
(
  input  logic [17:0] hdr,
  input  logic [7:0]  uap,
  input  logic [2:0]  own_am_addr,
  input  logic [15:0] pl_hdr,
  output logic [2:0]  am_addr,
  output pkt_type_e   ptype,
  output logic        flow,
  output logic        arqn,
  output logic        seqn,
  output logic        hec_ok,
  output logic        addr_match,
  output pkt_info_t   info,
  output logic [1:0]  l_ch,
  output logic        pl_flow,
  output logic [8:0]  pl_length
);
  logic [7:0] rem;

  always_comb begin
    logic fb;
    rem = uap;
    for (int i = 0; i < 18; i++) begin
      fb  = hdr[i] ^ rem[7];
      rem = {rem[6:0], 1'b0} ^ (fb ? 8'hA7 : 8'h00);
    end
  end

  assign am_addr    = hdr[2:0];
  assign ptype      = pkt_type_e'(hdr[6:3]);
  assign flow       = hdr[7];
  assign arqn       = hdr[8];
  assign seqn       = hdr[9];
  assign hec_ok     = (rem == 8'h00);
  assign addr_match = (hdr[2:0] == own_am_addr) || (hdr[2:0] == 3'd0);
  assign info       = pkt_info(hdr[6:3]);
  assign l_ch       = pl_hdr[1:0];
  assign pl_flow    = pl_hdr[2];
  assign pl_length  = (info.pl_hdr_bytes == 2'd2) ? pl_hdr[11:3] : {4'd0, pl_hdr[7:3]};
endmodule
