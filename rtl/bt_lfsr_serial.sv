// Bit-serial Galois LFSR divider used by the Bluetooth header error check
// (HEC, 8 bits) and payload CRC (16 bits).
//
// Register bit i holds the coefficient of D^i. On every clock with en high one
// message bit din enters: fb = din ^ r[W-1], r <= {r[W-2:0],0} ^ (fb ? POLY : 0),
// where POLY holds the generator's coefficients below D^W. init loads the
// register with the upper-address-part (UAP) seed in bits 7:0, the rest zero.
// After the message, r is the check word; it is sent MSB (r[W-1]) first. At
// the receiver the message followed by the received check word leaves r == 0,
// which is flagged on zero. Generators and UAP seeding follow the Bluetooth 1.1
// baseband, which the document's HEC and CRC blocks implement.
module bt_lfsr_serial #(
  parameter int unsigned      W    = 8,
  parameter logic [W-1:0]     POLY = 8'hA7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [7:0]   uap,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] r,
  output logic         zero
);
  logic fb;
  assign fb = din ^ r[W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r <= '0;
    else if (init)  r <= W'(uap);
    else if (en)    r <= {r[W-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

  assign zero = (r == '0);
endmodule
