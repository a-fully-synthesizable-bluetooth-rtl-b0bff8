// Testbench of the CVSD codec: the encoder's bits fed to the decoder must
// rebuild a 1 kHz tone sampled at 64 kHz (checked by the error energy), the
// decoder must match a floating-point model of the Bluetooth CVSD recursion,
// the step size must grow on a steep slope (four equal bits) and the
// accumulator must saturate on a full-scale step.
module tb_cvsd_codec;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(200000)
  logic ee = 0, de = 0, eb, db = 0; logic signed [15:0] ex = 0, dx;
  cvsd_codec dut (.clk, .rst_n, .enc_en(ee), .enc_x(ex), .enc_bit(eb), .dec_en(de), .dec_bit(db), .dec_x(dx));

  real rxh = 0, rdelta = 10; int hist = 4'b0101;
  function automatic real model(input bit b);
    real y;
    hist = ((hist << 1) | b) & 15;
    if (hist == 0 || hist == 15) rdelta = (rdelta + 10 > 1280) ? 1280 : rdelta + 10;
    else rdelta = (rdelta * (1.0 - 1.0/1024) < 10) ? 10 : rdelta * (1.0 - 1.0/1024);
    y = b ? rxh + rdelta : rxh - rdelta;
    if (y > 32767) y = 32767;
    if (y < -32767) y = -32767;
    rxh = y * (1.0 - 1.0/32);
    return rxh;
  endfunction

  initial begin
    real se = 0, ss = 0, maxdev = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1280; n++) begin
      real x, m, d;
      x = 8000.0 * $sin(2.0 * 3.14159265 * 1000.0 * n / 64000.0);
      ex = 16'(int'(x));
      ee = 1; @(negedge clk); ee = 0;
      db = eb; de = 1; @(negedge clk); de = 0;
      m = model(eb);
      d = m - real'(dx); if (d < 0) d = -d; if (d > maxdev) maxdev = d;
      if (n >= 320) begin se += (x - real'(dx)) ** 2; ss += x ** 2; end
    end
    check(maxdev < 64.0, $sformatf("decoder follows model, max deviation %f", maxdev));
    check(se < ss / 10.0, $sformatf("tone rebuilt: error energy %f of %f", se, ss));
    // steep rise: the step must reach its maximum and the output clip near full scale
    for (int n = 0; n < 300; n++) begin ex = 16'sd32767; ee = 1; @(negedge clk); ee = 0; db = eb; de = 1; @(negedge clk); de = 0; end
    check(dut.es.delta == (1280 << 10), "step size grows to its maximum");
    check(dx > 30000, $sformatf("accumulator reaches near full scale (%0d)", dx));
    finish_tb();
  end
endmodule
