// External PCM interface to a PCM (A/D, D/A) chip.
//
// One 8 kHz frame is 32 cycles of the 256 kHz bit clock. pcm_sync is high
// during the first bit of a frame. The 16-bit linear sample for the D/A is
// shifted out MSB first on pcm_dout in bits 0..15; the A/D sample is shifted
// in from pcm_din in the same bits and is presented on rx_sample with
// rx_valid at the end of bit 15. tx_sample is taken at the start of every
// frame. pcm_dout changes and pcm_din is sampled on the 256 kHz strobe (the
// rising bit clock edge). The frame format is this design's choice; the
// document only says the interface follows a common commercial PCM chip and
// passes 8- to 16-bit linear samples.
module pcm_if (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick256,
  input  logic               tick8,
  input  logic signed [15:0] tx_sample,
  output logic signed [15:0] rx_sample,
  output logic               rx_valid,
  output logic               pcm_sync,
  output logic               pcm_dout,
  input  logic               pcm_din
);
  logic [4:0]  bitn;    // bit of the frame now on the line
  logic [4:0]  nxt;
  logic [15:0] tx_sh, rx_sh;

  assign nxt      = tick8 ? 5'd0 : bitn + 5'd1;
  assign pcm_sync = (bitn == 5'd0);
  assign pcm_dout = (bitn < 5'd16) & tx_sh[15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitn <= 5'd31; tx_sh <= '0; rx_sh <= '0; rx_sample <= '0; rx_valid <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (tick256) begin
        if (bitn < 5'd16) rx_sh <= {rx_sh[14:0], pcm_din};
        if (bitn == 5'd15) begin
          rx_sample <= {rx_sh[14:0], pcm_din};
          rx_valid  <= 1'b1;
        end
        bitn  <= nxt;
        tx_sh <= (nxt == 5'd0) ? tx_sample : {tx_sh[14:0], 1'b0};
      end
    end
  end
endmodule
