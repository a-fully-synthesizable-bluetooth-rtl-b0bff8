// Encryption engine: the Bluetooth E0 keystream generator.
//
// Four Fibonacci LFSRs of 25, 31, 33 and 39 bits (feedback polynomials
// t^25+t^20+t^12+t^8+1, t^31+t^24+t^16+t^12+1, t^33+t^28+t^24+t^4+1 and
// t^39+t^36+t^28+t^4+1) feed a summation combiner with two 2-bit delay
// elements. Each clock with en the LFSRs step, the 4 output bits (taken at
// positions 24, 24, 32, 32) are added to the combiner state, and one
// keystream bit z is produced; dout = din ^ z encrypts or decrypts one
// payload bit. The combiner update is c(t+1) = s(t+1) ^ c(t) ^ T2(c(t-1)),
// s(t+1) = (x1+x2+x3+x4+c(t)) / 2, T2(a1,a0) = (a0, a1^a0).
// load writes the initial LFSR and combiner state, which the key schedule
// computes from Kc', the master BD_ADDR and the clock.
module bt_e0 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [24:0] init1,
  input  logic [30:0] init2,
  input  logic [32:0] init3,
  input  logic [38:0] init4,
  input  logic [3:0]  init_c,   // {c(t), c(t-1)}
  input  logic        en,
  input  logic        din,
  output logic        z,
  output logic        dout
);
  logic [24:0] r1;
  logic [30:0] r2;
  logic [32:0] r3;
  logic [38:0] r4;
  logic [1:0]  c, cp;
  logic        x1, x2, x3, x4;
  logic [2:0]  y;
  logic [1:0]  s, t2;

  assign x1 = r1[24];
  assign x2 = r2[24];
  assign x3 = r3[32];
  assign x4 = r4[32];
  assign y  = 3'(x1) + 3'(x2) + 3'(x3) + 3'(x4) + 3'(c);
  assign s  = y[2:1];
  assign t2 = {cp[0], cp[1] ^ cp[0]};
  assign z  = x1 ^ x2 ^ x3 ^ x4 ^ c[0];
  assign dout = din ^ z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0; r2 <= '0; r3 <= '0; r4 <= '0; c <= '0; cp <= '0;
    end else if (load) begin
      r1 <= init1; r2 <= init2; r3 <= init3; r4 <= init4;
      c  <= init_c[3:2]; cp <= init_c[1:0];
    end else if (en) begin
      r1 <= {r1[23:0], r1[24] ^ r1[19] ^ r1[11] ^ r1[7]};
      r2 <= {r2[29:0], r2[30] ^ r2[23] ^ r2[15] ^ r2[11]};
      r3 <= {r3[31:0], r3[32] ^ r3[27] ^ r3[23] ^ r3[3]};
      r4 <= {r4[37:0], r4[38] ^ r4[35] ^ r4[27] ^ r4[3]};
      c  <= s ^ c ^ t2;
      cp <= c;
    end
  end
endmodule
