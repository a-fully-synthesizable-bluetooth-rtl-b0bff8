// Testbench of the Rx correlator: a sync word buried in random bits is found
// exactly once, at its last bit, with up to 6 bit errors; with 10 errors or
// with search off it is not found.
module tb_bt_correlator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(200000)
  logic search = 1, bit_en = 0, din = 0, det; logic [63:0] sw; logic [6:0] score;
  bt_correlator dut (.clk, .rst_n, .search, .bit_en, .din, .sync_word(sw), .score, .det);

  int ndet, det_at, bitno;
  always @(posedge clk) if (det) begin ndet++; det_at = bitno; end

  task automatic send(input logic b);
    @(negedge clk); bit_en = 1; din = b; bitno++; @(negedge clk); bit_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      int nerr; logic [63:0] e;
      sw = {$urandom, $urandom};
      nerr = (n % 3 == 0) ? 10 : $urandom_range(6, 0);
      search = (n % 5 != 4);
      e = 0;
      while ($countones(e) < nerr) e[$urandom_range(63, 0)] = 1;
      ndet = 0; bitno = 0;
      for (int k = 0; k < 100; k++) send(1'($urandom));
      ndet = 0;
      for (int k = 0; k < 64; k++) send(sw[k] ^ e[k]);
      for (int k = 0; k < 20; k++) send(1'($urandom));
      if (nerr <= 6 && search) begin
        check(ndet == 1, $sformatf("found once (%0d) with %0d errors", ndet, nerr));
        check(det_at == 164, $sformatf("found at bit %0d", det_at));
      end else
        check(ndet == 0, $sformatf("no detection with %0d errors search=%b", nerr, search));
    end
    finish_tb();
  end
endmodule
