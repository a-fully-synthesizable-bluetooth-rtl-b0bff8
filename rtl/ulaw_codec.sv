// mu-law log PCM encoder and decoder (ITU-T G.711), one of the three voice
// codings of Bluetooth SCO links.
//
// Encoder: the 16-bit linear sample is cut to 14 bits, its magnitude clipped
// to 8159 and biased by 33, the segment is the position of the leading one,
// and the code is sign, segment and 4 mantissa bits, all inverted. Decoder:
// the inverse with the bias removed. Both are combinational.
module ulaw_codec (
  input  logic signed [15:0] lin_in,
  output logic        [7:0]  code_out,
  input  logic        [7:0]  code_in,
  output logic signed [15:0] lin_out
);
  always_comb begin
    logic [13:0] mag;
    logic [2:0]  seg;
    logic        neg;
    neg = lin_in[15];
    mag = neg ? 14'(-(lin_in >>> 2)) : 14'(lin_in >>> 2);
    if (mag > 14'd8159) mag = 14'd8159;
    mag = mag + 14'd33;
    seg = 3'd0;
    for (int s = 1; s < 8; s++) if (mag >= (14'd64 << (s - 1))) seg = 3'(s);
    if (mag[13]) code_out = ~{neg, 7'h7F};            // 8159 + 33 overflows the top segment
    else         code_out = ~{neg, seg, 4'((mag >> (4'(seg) + 4'd1)) & 14'hF)};
  end

  always_comb begin
    logic [7:0]  u;
    logic [15:0] t;
    u = ~code_in;
    t = ({12'd0, u[3:0]} << 3) + 16'd132;
    t = t << u[6:4];
    lin_out = u[7] ? signed'(16'd132 - t) : signed'(t - 16'd132);
  end
endmodule
