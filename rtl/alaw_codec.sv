// A-law log PCM encoder and decoder (ITU-T G.711), one of the three voice
// codings of Bluetooth SCO links.
//
// Encoder: the 16-bit linear sample is cut to 13 bits, the magnitude is
// placed in one of 8 segments (chord) by its leading one, and the code is
// sign, 3-bit segment and the 4 bits after the leading one, with even bits
// inverted (XOR 0x55). Decoder: the inverse, returning the middle of the
// quantisation interval scaled back to 16 bits. Both are combinational (the
// codec engine registers around them).
module alaw_codec (
  input  logic signed [15:0] lin_in,
  output logic        [7:0]  code_out,
  input  logic        [7:0]  code_in,
  output logic signed [15:0] lin_out
);
  always_comb begin
    logic [11:0] mag;
    logic [2:0]  seg;
    logic [3:0]  mant;
    logic        pos;
    pos = ~lin_in[15];
    mag = pos ? lin_in[14:3] : ~lin_in[14:3];      // |x| (one's complement for negatives)
    seg = 3'd0;
    for (int s = 1; s < 8; s++) if (mag >= (12'd32 << (s - 1))) seg = 3'(s);
    if (seg == 3'd0) mant = mag[4:1];
    else             mant = 4'((mag >> seg) & 12'hF);
    code_out = {pos, seg, mant} ^ 8'h55;
  end

  always_comb begin
    logic [7:0]  a;
    logic [2:0]  seg;
    logic [15:0] t;
    a   = code_in ^ 8'h55;
    seg = a[6:4];
    t   = {8'd0, a[3:0], 4'd0};
    if (seg == 3'd0) t = t + 16'd8;
    else             t = (t + 16'h108) << (seg - 3'd1);
    lin_out = a[7] ? signed'(t) : -signed'(t);
  end
endmodule
