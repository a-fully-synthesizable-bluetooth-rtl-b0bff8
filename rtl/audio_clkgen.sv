// Clock generator of the audio codec: derives the 256 kHz PCM bit clock, the
// 64 kHz CVSD sample strobe and the 8 kHz frame strobe from the 12 MHz system
// clock.
//
// A 16-bit phase accumulator advanced by INC each clock overflows at 512 kHz
// (12 MHz * 2796 / 65536 = 512.0 kHz, 0.01 % off); each overflow toggles
// pcm_clk, whose rising edge is the 256 kHz strobe. Every 4th 256 kHz strobe
// is a 64 kHz strobe and every 8th of those an 8 kHz strobe, so the three
// rates stay locked to each other. All strobes are one clock wide.
module audio_clkgen #(
  parameter logic [15:0] INC = 16'd2796
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic pcm_clk,
  output logic tick256,
  output logic tick64,
  output logic tick8
);
  logic [15:0] acc;
  logic        ovf;
  logic [4:0]  div;   // counts 256 kHz strobes within an 8 kHz frame

  assign ovf     = ({1'b0, acc} + 17'(INC)) > 17'hFFFF;
  assign tick256 = run & ovf & ~pcm_clk;
  assign tick64  = tick256 & (div[1:0] == 2'd3);
  assign tick8   = tick256 & (div == 5'd31);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; pcm_clk <= 1'b0; div <= '0;
    end else if (run) begin
      acc <= acc + INC;
      if (ovf)     pcm_clk <= ~pcm_clk;
      if (tick256) div <= div + 5'd1;
    end else begin
      acc <= '0; pcm_clk <= 1'b0; div <= '0;
    end
  end
endmodule
