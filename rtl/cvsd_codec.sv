// CVSD (continuous variable slope delta) encoder and decoder of Bluetooth
// voice, running at 64 kHz.
//
// Both sides keep an accumulator y and a step size delta. Each sample the
// encoder sends b = 1 when the input is at or above the previous estimate
// x_hat, else b = 0 (-1). When the last four bits are all equal the step
// grows by DELTA_MIN (up to DELTA_MAX), otherwise it decays by the factor
// 1 - 1/1024 (down to DELTA_MIN); y = sat(x_hat + b*delta) and
// x_hat = (1 - 1/32) * y. The decoder runs the same recursion from the bits
// and outputs x_hat. The constants are those of the Bluetooth specification;
// y and delta carry FRAC fraction bits so the 1/1024 decay is exact. One
// encoder step per clock with enc_en, one decoder step with dec_en; results
// are registered.
module cvsd_codec #(
  parameter int unsigned FRAC      = 10,
  parameter int          DELTA_MIN = 10,
  parameter int          DELTA_MAX = 1280
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enc_en,
  input  logic signed [15:0] enc_x,
  output logic               enc_bit,
  input  logic               dec_en,
  input  logic               dec_bit,
  output logic signed [15:0] dec_x
);
  localparam int W = 16 + FRAC + 2;
  typedef struct packed {
    logic signed [W-1:0] xh;     // estimate x_hat, FRAC fraction bits
    logic        [W-1:0] delta;  // step size, FRAC fraction bits
    logic        [3:0]   hist;   // last four bits, newest in bit 0
  } cvsd_st_t;

  localparam logic signed [W-1:0] YMAX = W'((32'sd32767) <<< FRAC);
  localparam logic signed [W-1:0] YMIN = -YMAX;
  localparam logic [W-1:0] DMIN = W'(DELTA_MIN) << FRAC;
  localparam logic [W-1:0] DMAX = W'(DELTA_MAX) << FRAC;

  function automatic cvsd_st_t step(input cvsd_st_t s, input logic b);
    cvsd_st_t n;
    logic signed [W:0] y;
    n.hist = {s.hist[2:0], b};
    if (n.hist == 4'b0000 || n.hist == 4'b1111)
      n.delta = (s.delta + DMIN > DMAX) ? DMAX : s.delta + DMIN;
    else
      n.delta = (s.delta - (s.delta >> 10) < DMIN) ? DMIN : s.delta - (s.delta >> 10);
    y = b ? (W+1)'(s.xh) + signed'({1'b0, n.delta}) : (W+1)'(s.xh) - signed'({1'b0, n.delta});
    if (y > (W+1)'(YMAX)) y = (W+1)'(YMAX);
    if (y < (W+1)'(YMIN)) y = (W+1)'(YMIN);
    n.xh = W'(y - (y >>> 5));
    return n;
  endfunction

  cvsd_st_t es, ds;
  logic eb;
  logic signed [W-1:0] xin;
  assign xin = W'(enc_x) <<< FRAC;
  assign eb  = (xin >= es.xh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      es <= '{xh: '0, delta: DMIN, hist: 4'b0101};
      ds <= '{xh: '0, delta: DMIN, hist: 4'b0101};
      enc_bit <= 1'b0;
    end else begin
      if (enc_en) begin
        es      <= step(es, eb);
        enc_bit <= eb;
      end
      if (dec_en) ds <= step(ds, dec_bit);
    end
  end

  assign dec_x = 16'(ds.xh >>> FRAC);
endmodule
