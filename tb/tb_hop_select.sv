// Testbench for hop_select. Checks:
//  * random clocks and addresses against a reference written here from the
//    kernel description (integer arithmetic, explicit butterfly stages);
//  * every channel is in 0..78;
//  * within one 32-slot-pair segment (X = CLK[6:2] running 0..31, same Y1 and
//    upper clock) the 32 channels are all different;
//  * over 2 s of clock all 79 channels are used, none more than twice its
//    fair share.
module tb_hop_select;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(2000000)
  logic [27:0] cb, ad; logic [6:0] ch;
  hop_select dut (.clk_bt(cb), .addr(ad), .chan(ch));

  function automatic int ref_chan(input logic [27:0] c, input logic [27:0] a);
    int x, y1, av, bv, cv, dv, ev, fv, z, k, pv;
    int stage_a [7][2], stage_b [7][2];
    logic [4:0] zz;
    logic [13:0] p;
    x  = c[6:2]; y1 = c[1];
    av = a[27:23] ^ c[25:21]; bv = a[22:19];
    cv = {a[8], a[6], a[4], a[2], a[0]} ^ c[20:16];
    dv = a[18:10] ^ c[15:7];
    ev = {a[13], a[11], a[9], a[7], a[5], a[3], a[1]};
    fv = (16 * int'(c[27:7])) % 79;
    z  = ((x + av) % 32) ^ bv;
    zz = 5'(z);
    p  = {9'(dv), 5'(cv ^ (y1 ? 31 : 0))};
    // stage s uses control bits P(13-2s) and P(12-2s)
    stage_a = '{'{2, 0}, '{1, 3}, '{0, 1}, '{2, 0}, '{1, 0}, '{3, 1}, '{2, 0}};
    stage_b = '{'{3, 1}, '{2, 4}, '{2, 3}, '{4, 3}, '{3, 4}, '{4, 2}, '{3, 1}};
    for (int s = 0; s < 7; s++)
      for (int h = 0; h < 2; h++) begin
        pv = 13 - 2 * s - h;
        if (p[pv]) begin
          logic t; t = zz[stage_a[s][h]]; zz[stage_a[s][h]] = zz[stage_b[s][h]]; zz[stage_b[s][h]] = t;
        end
      end
    k = (int'(zz) + ev + fv + 32 * y1) % 79;
    return (k < 40) ? 2 * k : 2 * (k - 40) + 1;
  endfunction

  int hist [79];
  initial begin
    bit seen [79];
    int n;
    bit dup;
    for (int i = 0; i < 3000; i++) begin
      cb = 28'($urandom); ad = 28'($urandom); #1;
      check(ch < 79, "channel in range");
      check(int'(ch) == ref_chan(cb, ad), $sformatf("clk %h addr %h: %0d vs %0d", cb, ad, ch, ref_chan(cb, ad)));
    end
    for (int seg = 0; seg < 200; seg++) begin
      ad = 28'($urandom); cb = 28'($urandom); cb[6:2] = 0;
      foreach (seen[j]) seen[j] = 0;
      dup = 0;
      for (int xx = 0; xx < 32; xx++) begin
        cb[6:2] = 5'(xx); #1;
        if (seen[ch]) dup = 1;
        seen[ch] = 1;
      end
      check(!dup, "32 different channels in a segment");
    end
    ad = 28'h5A3_9E8B; cb = 0;
    for (int i = 0; i < 3200; i++) begin   // 2 s of slots
      cb = 28'(i) << 1; #1; hist[ch]++;
    end
    n = 0;
    foreach (hist[j]) begin if (hist[j] > 0) n++; check(hist[j] <= 2 * 3200 / 79, $sformatf("channel %0d used %0d times", j, hist[j])); end
    check(n == 79, $sformatf("%0d of 79 channels used", n));
    finish_tb();
  end
endmodule
