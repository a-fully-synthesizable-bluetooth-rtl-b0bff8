// UART transmitter: transmitter buffer plus Tx shift register, 8 data bits,
// no parity, one stop bit, LSB first.
//
// A byte offered with wr (when rdy is high) is held in the transmitter
// buffer. When the line is idle and cts allows (flow control), the buffer
// moves to the shift register and the frame start bit, 8 data bits and stop
// bit goes out on txd, each bit lasting 8 oversampling ticks. rdy is high
// while the buffer is free, so the next byte can be loaded during the
// current frame and the line stays busy. busy covers the whole frame.
module uart_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       cts,
  input  logic       wr,
  input  logic [7:0] wdata,
  output logic       rdy,
  output logic       txd,
  output logic       busy
);
  logic [7:0] buf_q;
  logic       buf_full;
  logic [9:0] sh;      // {stop, data, start}, bit 0 on the line
  logic [3:0] nbit;    // bits left in the frame
  logic [2:0] sub;

  assign rdy  = ~buf_full;
  assign busy = (nbit != 0);
  assign txd  = busy ? sh[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0; buf_full <= 1'b0; sh <= '1; nbit <= '0; sub <= '0;
    end else begin
      if (wr && !buf_full) begin
        buf_q    <= wdata;
        buf_full <= 1'b1;
      end
      if (tick) begin
        if (nbit == 0) begin
          if (buf_full && cts) begin
            sh       <= {1'b1, buf_q, 1'b0};
            nbit     <= 4'd10;
            sub      <= '0;
            buf_full <= 1'b0;
          end
        end else begin
          sub <= sub + 3'd1;
          if (sub == 3'd7) begin
            sh   <= {1'b1, sh[9:1]};
            nbit <= nbit - 4'd1;
          end
        end
      end
    end
  end
endmodule
