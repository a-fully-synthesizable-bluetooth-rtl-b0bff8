// Testbench of the A-law codec: known G.711 points, every code decodes and
// re-encodes to itself, the code is monotonic in the input and the round trip
// error stays within half a quantisation step of the segment.
module tb_alaw_codec;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(1000000)
  logic signed [15:0] li, lo; logic [7:0] co, ci;
  alaw_codec dut (.lin_in(li), .code_out(co), .code_in(ci), .lin_out(lo));

  // A-law code order: magnitude rank of a code (sign handled separately)
  function automatic int rank(input logic [7:0] c);
    logic [7:0] a = c ^ 8'h55;
    return a[7] ? int'(a[6:0]) : -int'(a[6:0]) - 1;
  endfunction

  initial begin
    li = 0;      #1 check(co == 8'hD5, "0 -> D5");
    li = -1;     #1 check(co == 8'h55, "-1 -> 55");
    li = 32767;  #1 check(co == 8'hAA, "max -> AA");
    li = -32768; #1 check(co == 8'h2A, "min -> 2A");
    ci = 8'hD5;  #1 check(lo == 8, "D5 -> 8");
    ci = 8'hAA;  #1 check(lo == 32256, "AA -> 32256");
    for (int c = 0; c < 256; c++) begin
      ci = 8'(c); #1 li = lo; #1 check(co == 8'(c), $sformatf("code %h round trip", c));
    end
    begin
      int prev = -1000;
      for (int x = -32768; x < 32768; x += 7) begin
        int err, step;
        li = 16'(x); #1; ci = co; #1;
        check(rank(co) >= prev, $sformatf("monotonic at %0d", x)); prev = rank(co);
        err = int'(lo) - x; if (err < 0) err = -err;
        step = (x < 0 ? -x : x) / 16 + 16;
        check(err <= step, $sformatf("error %0d at %0d", err, x));
      end
    end
    finish_tb();
  end
endmodule
