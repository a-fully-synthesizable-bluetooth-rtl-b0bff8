// Baud generator of the HCI UART: a numerically controlled oscillator.
//
// Each clock a 20-bit phase accumulator is advanced by inc; every carry out
// is one tick of the 8x oversampling clock, so the bit rate is
// f_clk * inc / 2^20 / 8. At 12 MHz, inc = 40265 gives 57.6 kbit/s (the
// default rate) and inc = 2^20 gives 1.5 Mbit/s (a tick every clock); 300
// bit/s needs inc = 210. tick is one clock wide.
module uart_baud (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [20:0] inc,
  output logic        tick
);
  logic [19:0] acc;
  logic [20:0] sum;
  assign sum  = {1'b0, acc} + inc;
  assign tick = sum[20];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc <= '0;
    else        acc <= sum[19:0];
endmodule
