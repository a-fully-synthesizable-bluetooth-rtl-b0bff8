// Data whitening / de-whitening of the Bluetooth header and payload.
//
// A 7-bit LFSR with generator D^7+D^4+1 produces the scrambling sequence that
// is XORed onto every header and payload bit; the same circuit de-whitens at
// the receiver. init loads it from the master clock: bit 0 = 1 and bits 6:1 =
// CLK[6:1]. Each clock with en consumes one bit: dout = din ^ r[6] and the
// register steps once. The output is combinational from din.
module bt_whiten (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic [5:0] clk6,     // CLK[6:1]
  input  logic       en,
  input  logic       din,
  output logic       dout
);
  logic [6:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r <= 7'h01;
    else if (init) r <= {clk6, 1'b1};
    else if (en)   r <= {r[5:4], r[3] ^ r[6], r[2:0], r[6]};
  end

  assign dout = din ^ r[6];
endmodule
