// Testbench of the mu-law codec: known G.711 points, every code decodes and
// re-encodes to itself, the code is monotonic in the input and the round trip
// error stays within half a quantisation step of the segment.
module tb_ulaw_codec;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(1000000)
  logic signed [15:0] li, lo; logic [7:0] co, ci;
  ulaw_codec dut (.lin_in(li), .code_out(co), .code_in(ci), .lin_out(lo));

  // mu-law code order: magnitude rank of a code (sign handled separately)
  function automatic int rank(input logic [7:0] c);
    logic [7:0] a = ~c;
    return a[7] ? -int'(a[6:0]) - 1 : int'(a[6:0]);
  endfunction

  initial begin
    li = 0;      #1 check(co == 8'hFF, "0 -> FF");
    li = 32767;  #1 check(co == 8'h80, "max -> 80");
    li = -32768; #1 check(co == 8'h00, "min -> 00");
    ci = 8'hFF;  #1 check(lo == 0, "FF -> 0");
    ci = 8'h7F;  #1 check(lo == 0, "7F -> 0");
    ci = 8'h80;  #1 check(lo == 32124, "80 -> 32124");
    for (int c = 0; c < 256; c++) begin
      ci = 8'(c); #1 li = lo; #1
      // 0x7F (negative zero) re-encodes as 0xFF
      check(co == 8'(c) || (c == 8'h7F && co == 8'hFF), $sformatf("code %h round trip", c));
    end
    begin
      int prev = -1000;
      for (int x = -32768; x < 32768; x += 7) begin
        int err, step;
        li = 16'(x); #1; ci = co; #1;
        check(rank(co) >= prev, $sformatf("monotonic at %0d", x)); prev = rank(co);
        err = int'(lo) - x; if (err < 0) err = -err;
        step = (x < 0 ? -x : x) / 16 + 8;
        check(err <= step, $sformatf("error %0d at %0d", err, x));
      end
    end
    finish_tb();
  end
endmodule
