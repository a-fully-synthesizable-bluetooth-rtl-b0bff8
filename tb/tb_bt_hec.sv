// Testbench of the HEC: compares the serial LFSR with a polynomial division
// (UAP(D)*D^10 + header(D)*D^8 mod g(D)), checks that header+HEC leaves a zero
// remainder and that a flipped bit is caught.
module tb_bt_hec;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)

  logic init = 0, en = 0, din = 0; logic [7:0] uap = 0, hec; logic ok;
  bt_hec dut (.clk, .rst_n, .init, .uap, .en, .din, .hec, .hec_ok(ok));

  function automatic logic [7:0] ref_hec(input logic [7:0] u, input logic [9:0] h);
    logic [17:0] v;
    v = {u, 10'b0};
    for (int k = 0; k < 10; k++) v[8 + 9 - k] ^= h[k];   // first bit sent = highest power
    for (int i = 17; i >= 8; i--) if (v[i]) v[i -: 9] ^= 9'h1A7;
    return v[7:0];
  endfunction

  task automatic shift(input logic b);
    @(negedge clk); en = 1; din = b; @(negedge clk); en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [9:0] h; logic [7:0] exp_h; int flip;
      h = 10'($urandom); uap = 8'($urandom); exp_h = ref_hec(uap, h);
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      for (int k = 0; k < 10; k++) shift(h[k]);
      check(hec == exp_h, $sformatf("HEC uap=%h hdr=%h got %h exp %h", uap, h, hec, exp_h));
      flip = (n % 2) ? int'($urandom_range(17, 0)) : -1;
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      for (int k = 0; k < 18; k++) begin
        logic b;
        b = (k < 10) ? h[k] : exp_h[17 - k];
        shift(b ^ (k == flip));
      end
      check(ok == (flip < 0), $sformatf("HEC check flip=%0d ok=%b", flip, ok));
    end
    finish_tb();
  end
endmodule
