// Rx correlator: slides a 64-bit window over the received bitstream and
// flags the sync word of the expected access code.
//
// Each clock with bit_en shifts one received bit in; after 64 bits the window
// holds the last 64 bits with the oldest in bit 0, matching the sending order
// of the sync word. score counts the bits that agree with sync_word; while
// search is high, det pulses in the clock after a bit whose window scores at
// least THRESH (the window is then cleared, so one sync word triggers once).
// The threshold is this design's choice and can be lowered to tolerate more
// bit errors.
module bt_correlator #(
  parameter int unsigned THRESH = 58
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        search,
  input  logic        bit_en,
  input  logic        din,
  input  logic [63:0] sync_word,
  output logic [6:0]  score,
  output logic        det
);
  logic [63:0] win, nxt;

  assign nxt = {din, win[63:1]};

  always_comb begin
    score = '0;
    for (int i = 0; i < 64; i++) score += {6'd0, ~(nxt[i] ^ sync_word[i])};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
      det <= 1'b0;
    end else begin
      det <= 1'b0;
      if (bit_en) begin
        if (search && score >= 7'(THRESH)) begin
          det <= 1'b1;
          win <= ~sync_word;   // cleared: needs a full new word to trigger
        end else begin
          win <= nxt;
        end
      end
    end
  end
endmodule
