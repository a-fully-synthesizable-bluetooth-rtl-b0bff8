// Testbench of the payload CRC: random payloads of random length against a
// polynomial division reference, then payload+CRC must check clean and a
// single flipped bit must be caught.
module tb_bt_crc16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(400000)

  logic init = 0, en = 0, din = 0; logic [7:0] uap = 0; logic [15:0] crc; logic ok;
  bt_crc16 dut (.clk, .rst_n, .init, .uap, .en, .din, .crc, .crc_ok(ok));

  logic msg [$];

  // (UAP(D) * D^n + m(D) * D^16) mod g(D), m's first bit the highest power
  function automatic logic [15:0] ref_crc(input logic [7:0] u);
    logic [16:0] r;   // running remainder, processed MSB-first long division
    r = 17'(u);
    foreach (msg[k]) begin
      logic top;
      top = r[15] ^ msg[k];
      r = {r[15:0], 1'b0};
      r[16] = 1'b0;
      if (top) r[15:0] ^= 16'h1021;
    end
    return r[15:0];
  endfunction

  task automatic shift(input logic b);
    @(negedge clk); en = 1; din = b; @(negedge clk); en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [15:0] exp_c; int len, flip;
      len = $urandom_range(200, 8); msg.delete();
      for (int k = 0; k < len; k++) msg.push_back(1'($urandom));
      uap = 8'($urandom); exp_c = ref_crc(uap);
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      foreach (msg[k]) shift(msg[k]);
      check(crc == exp_c, $sformatf("CRC got %h exp %h", crc, exp_c));
      flip = (n % 2) ? $urandom_range(len + 15, 0) : -1;
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      for (int k = 0; k < len + 16; k++)
        shift(((k < len) ? msg[k] : exp_c[15 - (k - len)]) ^ (k == flip));
      check(ok == (flip < 0), $sformatf("CRC check flip=%0d", flip));
    end
    finish_tb();
  end
endmodule
