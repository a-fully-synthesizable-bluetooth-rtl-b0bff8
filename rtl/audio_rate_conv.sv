// Sample-rate conversion between the 8 kHz PCM interface and the 64 kHz CVSD
// coder.
//
// Up-sampler (8 -> 64 kHz, linear interpolation): each new 8 kHz sample
// (up_in_en) becomes the target; on each 64 kHz strobe (up_out_en) the output
// steps k/8 of the way from the previous sample to it, k = 0..7. The output
// therefore lags the input by one 8 kHz sample.
// Down-sampler (64 -> 8 kHz): every 64 kHz input (dn_in_en) passes a 5-
// coefficient second-order IIR low-pass (direct form I, Q14 coefficients; an
// elliptic design, 0.5 dB ripple, 3.6 kHz edge) and every 8th filtered value
// is the 8 kHz output, flagged by dn_out_valid. The coefficient values are
// this design's own; they can be replaced through the parameters.
module audio_rate_conv #(
  parameter int B0 = 702,
  parameter int B1 = 901,
  parameter int B2 = 702,
  parameter int A1 = -23951,
  parameter int A2 = 10010
) (
  input  logic               clk,
  input  logic               rst_n,
  // up-sampler
  input  logic               up_in_en,
  input  logic signed [15:0] up_in,
  input  logic               up_out_en,
  output logic signed [15:0] up_out,
  // down-sampler
  input  logic               dn_in_en,
  input  logic signed [15:0] dn_in,
  output logic               dn_out_valid,
  output logic signed [15:0] dn_out
);
  // ---------------- up-sampler ----------------
  logic signed [15:0] prev, cur;
  logic [2:0]         k;
  logic signed [19:0] interp;

  assign interp = (20'(prev) <<< 3) + 20'(cur - prev) * signed'({17'd0, k});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; cur <= '0; k <= '0; up_out <= '0;
    end else begin
      if (up_in_en) begin
        prev <= cur;
        cur  <= up_in;
        k    <= '0;
      end else if (up_out_en) begin
        up_out <= 16'(interp >>> 3);
        k      <= k + 3'd1;
      end
    end
  end

  // ---------------- down-sampler ----------------
  logic signed [15:0] x1, x2, y1, y2;
  logic signed [35:0] acc;
  logic signed [15:0] y;
  logic [2:0]         ph;

  always_comb begin
    logic signed [35:0] s;
    acc = 36'(B0) * dn_in + 36'(B1) * x1 + 36'(B2) * x2 - 36'(A1) * y1 - 36'(A2) * y2;
    s = acc >>> 14;
    if (s > 36'sd32767)       y = 16'sh7FFF;
    else if (s < -36'sd32768) y = -16'sh8000;
    else                      y = 16'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0; ph <= '0;
      dn_out <= '0; dn_out_valid <= 1'b0;
    end else begin
      dn_out_valid <= 1'b0;
      if (dn_in_en) begin
        x2 <= x1; x1 <= dn_in; y2 <= y1; y1 <= y;
        ph <= ph + 3'd1;
        if (ph == 3'd7) begin
          dn_out       <= y;
          dn_out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
