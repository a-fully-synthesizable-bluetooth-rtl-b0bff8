// Header error check (HEC) of the Bluetooth packet header.
//
// An 8-bit LFSR with generator D^8+D^7+D^5+D^2+D+1, seeded with the UAP,
// divides the 10 header bits (AM_ADDR, TYPE, FLOW, ARQN, SEQN). On transmit the
// 8 remainder bits are appended MSB first; on receive the 18 header bits are
// shifted through and hec_ok says the remainder is zero. One bit per clock
// with en; init restarts it.
module bt_hec (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [7:0] uap,
  input  logic       en,
  input  logic       din,
  output logic [7:0] hec,
  output logic       hec_ok
);
  bt_lfsr_serial #(.W(8), .POLY(8'hA7)) u_lfsr (
    .clk, .rst_n, .init, .uap, .en, .din, .r(hec), .zero(hec_ok));
endmodule
