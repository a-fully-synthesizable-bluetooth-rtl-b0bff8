// Testbench of the sync word generator: for random LAPs the word must hold the
// LAP and Barker extension in clear, and after removing the PN cover it must
// be a codeword of the (64,30) code, i.e. divisible by octal 260534236651.
module tb_bt_syncword;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(100000)
  logic [23:0] lap; logic [63:0] sw;
  bt_syncword dut (.lap, .sw);
  localparam logic [63:0] PN = 64'h83848D96BBCC54FC;

  function automatic bit is_codeword(input logic [63:0] v);
    logic [34:0] g = 35'o260534236651;
    logic [33:0] r = 0;
    for (int i = 63; i >= 0; i--) begin
      logic fb;
      fb = r[33] ^ v[i];
      r = {r[32:0], 1'b0};
      if (fb) r ^= g[33:0];
    end
    return r == 0;
  endfunction

  initial begin
    for (int n = 0; n < 500; n++) begin
      lap = (n < 2) ? {n[0], 23'h0} : 24'($urandom);
      #1;
      check(sw[57:34] == lap, "LAP in clear");
      check(sw[63:58] == (lap[23] ? 6'b010011 : 6'b101100), "Barker extension");
      check(is_codeword(sw ^ PN), $sformatf("codeword for LAP %h", lap));
    end
    finish_tb();
  end
endmodule
