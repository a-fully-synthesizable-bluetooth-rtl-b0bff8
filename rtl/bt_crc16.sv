// Payload CRC of Bluetooth data packets.
//
// A 16-bit LFSR with the CCITT generator D^16+D^12+D^5+1, seeded with the UAP
// in its low 8 bits, divides the payload (payload header and data). On
// transmit the 16 remainder bits follow the payload MSB first; on receive the
// payload and received CRC leave a zero remainder, flagged by crc_ok. One bit
// per clock with en; init restarts it.
module bt_crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [7:0]  uap,
  input  logic        en,
  input  logic        din,
  output logic [15:0] crc,
  output logic        crc_ok
);
  bt_lfsr_serial #(.W(16), .POLY(16'h1021)) u_lfsr (
    .clk, .rst_n, .init, .uap, .en, .din, .r(crc), .zero(crc_ok));
endmodule
