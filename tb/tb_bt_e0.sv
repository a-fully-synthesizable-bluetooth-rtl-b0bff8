// Testbench of the E0 keystream generator against a bit-array reference
// model of the four LFSRs and the summation combiner; also checks that
// encrypting twice restores the data.
module tb_bt_e0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)
  logic load = 0, en = 0, din = 0, z, dout;
  logic [24:0] i1; logic [30:0] i2; logic [32:0] i3; logic [38:0] i4; logic [3:0] ic;
  bt_e0 dut (.clk, .rst_n, .load, .init1(i1), .init2(i2), .init3(i3), .init4(i4), .init_c(ic),
             .en, .din, .z, .dout);

  // reference: LFSR k as a bit queue, index 0 = newest bit
  bit q1[$], q2[$], q3[$], q4[$];
  int c, cp;   // combiner state c(t), c(t-1) as 2-bit integers
  function automatic bit step_ref();
    bit x1, x2, x3, x4, zz; int s, t2, cn;
    x1 = q1[24]; x2 = q2[24]; x3 = q3[32]; x4 = q4[32];
    zz = x1 ^ x2 ^ x3 ^ x4 ^ c[0];
    s  = (x1 + x2 + x3 + x4 + c) / 2;
    t2 = ((cp & 1) << 1) | (((cp >> 1) ^ cp) & 1);
    cn = s ^ c ^ t2;
    q1.push_front(q1[24] ^ q1[19] ^ q1[11] ^ q1[7]); void'(q1.pop_back());
    q2.push_front(q2[30] ^ q2[23] ^ q2[15] ^ q2[11]); void'(q2.pop_back());
    q3.push_front(q3[32] ^ q3[27] ^ q3[23] ^ q3[3]);  void'(q3.pop_back());
    q4.push_front(q4[38] ^ q4[35] ^ q4[27] ^ q4[3]);  void'(q4.pop_back());
    cp = c; c = cn & 3;
    return zz;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5; n++) begin
      i1 = 25'($urandom); i2 = 31'($urandom); i3 = {1'($urandom), $urandom}; i4 = {7'($urandom), $urandom};
      ic = 4'($urandom);
      q1.delete(); q2.delete(); q3.delete(); q4.delete();
      for (int k = 0; k < 25; k++) q1.push_back(i1[k]);
      for (int k = 0; k < 31; k++) q2.push_back(i2[k]);
      for (int k = 0; k < 33; k++) q3.push_back(i3[k]);
      for (int k = 0; k < 39; k++) q4.push_back(i4[k]);
      c = ic[3:2]; cp = ic[1:0];
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      for (int k = 0; k < 400; k++) begin
        bit zr;
        din = 1'($urandom);
        zr = step_ref();
        #1 check(z == zr, $sformatf("keystream bit %0d", k));
        check(dout == (din ^ zr), "cipher bit");
        en = 1; @(negedge clk); en = 0;
      end
    end
    finish_tb();
  end
endmodule
