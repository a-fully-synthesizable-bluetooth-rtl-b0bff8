// Rate 2/3 forward error correction of Bluetooth payloads: the (15,10)
// shortened Hamming code with generator g(D) = (D+1)(D^4+D+1) = D^5+D^4+D^2+1.
//
// Bit vectors are in transmission order: info[9] and cw[14] are sent first
// and carry the highest power of D. Encoder: cw = {info, parity} with parity
// = info(D)*D^5 mod g(D). Decoder: the syndrome is the received word mod g(D);
// a nonzero syndrome equal to D^i mod g(D) for some position i is a single
// error there and is corrected (corrected=1); any other nonzero syndrome,
// which covers every double error, sets uncorrectable. Both directions are
// combinational, one 10-bit block per clock when used in the data path.
module bt_fec23 (
  input  logic [9:0]  info,
  output logic [14:0] cw,
  input  logic [14:0] rx,
  output logic [9:0]  rx_info,
  output logic        corrected,
  output logic        uncorrectable
);
  localparam logic [5:0] G = 6'b110101;

  // remainder of a 15-bit polynomial modulo g(D)
  function automatic logic [4:0] mod_g(input logic [14:0] v);
    logic [14:0] t;
    t = v;
    for (int i = 14; i >= 5; i--)
      if (t[i]) t[i -: 6] = t[i -: 6] ^ G;
    return t[4:0];
  endfunction

  logic [4:0]  syn;
  logic [14:0] fix;

  assign cw  = {info, mod_g({info, 5'b0})};
  assign syn = mod_g(rx);

  always_comb begin
    fix = '0;
    for (int i = 0; i < 15; i++)
      if (syn != 5'd0 && mod_g(15'(1) << i) == syn) fix[i] = 1'b1;
  end

  assign rx_info       = rx[14:5] ^ fix[14:5];
  assign corrected     = (syn != 5'd0) && (fix != '0);
  assign uncorrectable = (syn != 5'd0) && (fix == '0);
endmodule
