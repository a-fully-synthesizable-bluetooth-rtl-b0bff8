// Sync word generation: builds the 64-bit sync word of the Bluetooth access
// code from a 24-bit lower address part (LAP).
//
// The 30 information bits are the LAP followed by a 6-bit Barker extension
// (001101 when LAP bit 23 is 0, else 110010, listed in sending order). They are
// scrambled with the top 30 bits of the 64-bit PN sequence, encoded with the
// (64,30) expurgated BCH code whose generator is octal 260534236651
// (parity = info(D)*D^34 mod g(D)), and the whole word is XORed with the PN
// sequence again, so the information part reappears in clear. Bit i of sw is
// sent i-th (sw[0] first). Combinational; the link controller registers it.
module bt_syncword (
  input  logic [23:0] lap,
  output logic [63:0] sw
);
  localparam logic [63:0] PN = 64'h8384_8D96_BBCC_54FC;
  localparam logic [34:0] G  = 35'o260534236651;

  logic [29:0] x, xs;
  logic [33:0] par;

  always_comb begin
    logic [63:0] t;
    x  = {(lap[23] ? 6'b010011 : 6'b101100), lap};
    xs = x ^ PN[63:34];
    t  = {xs, 34'b0};
    for (int i = 63; i >= 34; i--)
      if (t[i]) t[i -: 35] = t[i -: 35] ^ G;
    par = t[33:0];
  end

  assign sw = {xs, par} ^ PN;
endmodule
