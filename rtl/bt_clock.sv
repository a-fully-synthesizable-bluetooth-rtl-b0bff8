// Bluetooth clock control: the timebase with the native clock CLKN and the
// CLK offset control that forms the estimated clock CLKE and the master clock
// CLK.
//
// The RF module's 3.2 kHz clock (asynchronous) is synchronised with two flops
// and each rising edge advances the 28-bit CLKN. CLKE and CLK are CLKN plus
// offsets held in the link controller registers (modulo 2^28). The
// microcontroller may load CLKN. slot_start pulses when CLK enters a new
// 625 us slot (CLK[1:0] becomes 0), half_slot on every CLK[0] rising edge.
module bt_clock (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rf_clk3k2,
  input  logic        clkn_load,
  input  logic [27:0] clkn_wdata,
  input  logic [27:0] off_e,
  input  logic [27:0] off_m,
  output logic [27:0] clkn,
  output logic [27:0] clke,
  output logic [27:0] clk_bt,
  output logic        tick,
  output logic        slot_start,
  output logic        half_slot
);
  logic [2:0] sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
      clkn <= '0;
    end else begin
      sync <= {sync[1:0], rf_clk3k2};
      if (clkn_load)  clkn <= clkn_wdata;
      else if (tick)  clkn <= clkn + 28'd1;
    end
  end

  assign tick   = sync[1] & ~sync[2];
  assign clke   = clkn + off_e;
  assign clk_bt = clkn + off_m;

  logic [27:0] clk_next;
  assign clk_next   = clk_bt + 28'd1;
  assign slot_start = tick & ~clkn_load & (clk_next[1:0] == 2'b00);
  assign half_slot  = tick & ~clkn_load & clk_next[0];
endmodule
