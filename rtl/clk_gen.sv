// clk_gen: timing strobes for the baseband. The whole module runs from one
// system clock (12 MHz by default, the USB-derived rate). Rather than make
// new clocks, which a portable synthesizable design should avoid, this block
// makes one-cycle enable strobes from it:
//   tick_1m  : 1 MHz, the air bit rate (one strobe every DIV_1M clocks)
//   tick_3k2 : 3.2 kHz, the Bluetooth native clock rate. 1 MHz / 3.2 kHz is
//              312.5, so the divider alternates 312 and 313 microsecond
//              periods; the average rate is exact.
// Interface: clk, rst_n in; tick_1m, tick_3k2 out (both registered, high for
// one clock). tick_3k2 always falls on a tick_1m clock.
// From the document: the 1 Mbit/s air rate and the 3.2 kHz native clock
// (Bluetooth 1.1). Own choices: strobes instead of derived clocks, and the
// 312/313 alternation.
module clk_gen #(
  parameter int unsigned DIV_1M = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick_1m,
  output logic tick_3k2
);
  logic [$clog2(DIV_1M)-1:0] div_q;
  logic [8:0]                us_q;
  logic                      odd_q;   // selects the 313 us half of the pair

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q    <= '0;
      us_q     <= '0;
      odd_q    <= 1'b0;
      tick_1m  <= 1'b0;
      tick_3k2 <= 1'b0;
    end else begin
      tick_1m  <= 1'b0;
      tick_3k2 <= 1'b0;
      if (div_q == $bits(div_q)'(DIV_1M - 1)) begin
        div_q   <= '0;
        tick_1m <= 1'b1;
        if (us_q == (odd_q ? 9'd312 : 9'd311)) begin
          us_q     <= '0;
          odd_q    <= ~odd_q;
          tick_3k2 <= 1'b1;
        end else begin
          us_q <= us_q + 9'd1;
        end
      end else begin
        div_q <= div_q + 1'b1;
      end
    end
  end
endmodule
