// Testbench for sram_sp: random word and byte-enable writes against a model
// of the whole 4 kB array, reads checked one clock after the address (the
// read is synchronous), and a read with en low must leave q unchanged.
module tb_sram_sp;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)
  logic en = 0, we = 0; logic [3:0] be = 0; logic [9:0] addr = 0; logic [31:0] d = 0, q;
  sram_sp dut (.clk, .en, .we, .be, .addr, .d, .q);
  logic [31:0] model [1024];
  initial begin
    logic [31:0] held;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); en = 1; we = 1; be = 4'hF; addr = 10'(i); d = $urandom; model[i] = d;
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      en = 1; addr = 10'($urandom); we = 1'($urandom); be = 4'($urandom); d = $urandom;
      if (we) for (int b = 0; b < 4; b++) if (be[b]) model[addr][8*b +: 8] = d[8*b +: 8];
      if (!we) begin
        @(negedge clk); en = 0;
        check(q == model[addr], $sformatf("read %0d: %h vs %h", addr, q, model[addr]));
        held = q; addr = addr + 10'd1; @(negedge clk);
        check(q == held, "q holds while disabled");
      end
    end
    finish_tb();
  end
endmodule
