// hop_select: Bluetooth 1.1 frequency hop selection for the 79-channel
// system, connection state.
// What it does: maps the 28-bit master clock CLK and the 28 address bits
// A = {UAP[3:0], LAP} of the master to an RF channel index 0..78 (channel
// 2402 + n MHz), which changes every slot.
// How: the standard hop kernel, all combinational:
//   1. Z = (X + A') mod 32 with X = CLK[6:2]; then Z[3:0] ^= B.
//   2. PERM5: a 7-stage butterfly swaps pairs of Z's five bits under a
//      14-bit control word P = {D, C ^ {5{Y1}}} (pairs listed in PAIRS).
//   3. k = (PERM5(Z) + E + F + Y2) mod 79.
//   4. Register bank: the 79 channels are ordered even first
//      (0, 2, ..., 78) then odd (1, 3, ..., 77); k indexes that list.
// Connection-state inputs: Y1 = CLK[1], Y2 = 32*Y1, A' = A[27:23] ^ CLK[25:21],
// B = A[22:19], C = A[8,6,4,2,0] ^ CLK[20:16], D = A[18:10] ^ CLK[15:7],
// E = A[13,11,9,7,5,3,1], F = 16*CLK[27:7] mod 79.
// Interface: clk_bt[27:0], addr[27:0] in; chan[6:0] out (combinational).
// clk_bt[0] is not used: the channel holds for a whole slot.
// From the document: a hop selection block for the 79-hop system fed by the
// Bluetooth clocks. The kernel itself is the Bluetooth 1.1 one; page,
// inquiry and their response hopping (other X, Y inputs) are not built.
module hop_select (
  input  logic [27:0] clk_bt,
  input  logic [27:0] addr,
  output logic [6:0]  chan
);
  logic [4:0]  x, a5, c5, z, p5;
  logic [3:0]  b4;
  logic [8:0]  d9;
  logic [6:0]  e7, f7, k;
  logic        y1;
  logic [13:0] p;
  logic [9:0]  sum;

  // bit pairs swapped by control bits P0..P13
  localparam int PA [14] = '{0, 2, 1, 3, 0, 1, 0, 2, 1, 0, 3, 1, 0, 2};
  localparam int PB [14] = '{1, 3, 2, 4, 4, 3, 3, 4, 3, 2, 4, 2, 1, 3};

  always_comb begin
    y1 = clk_bt[1];
    x  = clk_bt[6:2];
    a5 = addr[27:23] ^ clk_bt[25:21];
    b4 = addr[22:19];
    c5 = {addr[8], addr[6], addr[4], addr[2], addr[0]} ^ clk_bt[20:16];
    d9 = addr[18:10] ^ clk_bt[15:7];
    e7 = {addr[13], addr[11], addr[9], addr[7], addr[5], addr[3], addr[1]};
    f7 = 7'((25'(clk_bt[27:7]) * 25'd16) % 25'd79);

    z = x + a5;
    z[3:0] = z[3:0] ^ b4;

    p = {d9, c5 ^ {5{y1}}};
    // stages run from the pair of P13/P12 down to P1/P0
    p5 = z;
    for (int i = 13; i >= 0; i--)
      if (p[i]) {p5[PA[i]], p5[PB[i]]} = {p5[PB[i]], p5[PA[i]]};

    sum = 10'(p5) + 10'(e7) + 10'(f7) + (y1 ? 10'd32 : 10'd0);
    k   = 7'(sum % 10'd79);
    chan = (k < 7'd40) ? {k[5:0], 1'b0} : {6'(k - 7'd40), 1'b1};
  end
endmodule
