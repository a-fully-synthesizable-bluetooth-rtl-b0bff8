// UART receiver: Rx shift register, receiver control with the data check
// that validates start bits, and the receiver buffer.
//
// rxd is synchronised with two flops. A falling edge starts a frame; the
// start bit is checked again half a bit later (4 of the 8 oversampling ticks)
// and a glitch is dropped. Data bits are sampled in the middle of each bit,
// LSB first, then the stop bit: if it is low, ferr flags a framing error.
// A good byte is put in the receiver buffer and announced by a one-clock
// valid pulse with the byte on rdata.
module uart_rx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] rdata,
  output logic       ferr
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;
  rstate_e st;
  logic [1:0] sync;
  logic [2:0] sub;
  logic [2:0] nb;
  logic [7:0] sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11; st <= R_IDLE; sub <= '0; nb <= '0; sh <= '0;
      valid <= 1'b0; rdata <= '0; ferr <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      ferr  <= 1'b0;
      if (tick) begin
        sub <= sub + 3'd1;
        unique case (st)
          R_IDLE:  if (!sync[1]) begin st <= R_START; sub <= 3'd1; end
          R_START: if (sub == 3'd3) begin
                     if (sync[1]) st <= R_IDLE;          // glitch, not a start bit
                     else begin st <= R_DATA; sub <= '0; nb <= '0; end
                   end
          R_DATA:  if (sub == 3'd7) begin
                     sh <= {sync[1], sh[7:1]};
                     nb <= nb + 3'd1;
                     if (nb == 3'd7) st <= R_STOP;
                   end
          R_STOP:  if (sub == 3'd7) begin
                     st <= R_IDLE;
                     if (sync[1]) begin valid <= 1'b1; rdata <= sh; end
                     else ferr <= 1'b1;
                   end
          default: st <= R_IDLE;
        endcase
      end
    end
  end
endmodule
