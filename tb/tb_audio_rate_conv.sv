// Testbench of the rate converters. Up-sampler: the 64 kHz output must step
// linearly, k/8 of the way between consecutive 8 kHz samples. Down-sampler:
// one output per 8 inputs, DC passes with the filter's DC gain (about 0.94),
// a 1 kHz tone passes, a 16 kHz tone is attenuated by more than 20 dB.
module tb_audio_rate_conv;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(200000)
  logic uie = 0, uoe = 0, die = 0, dov; logic signed [15:0] ui = 0, uo, di = 0, dout;
  audio_rate_conv dut (.clk, .rst_n, .up_in_en(uie), .up_in(ui), .up_out_en(uoe), .up_out(uo),
                       .dn_in_en(die), .dn_in(di), .dn_out_valid(dov), .dn_out(dout));
  int nout = 0; real pk = 0;
  always @(posedge clk) if (dov) begin nout++; if ((dout < 0 ? -real'(dout) : real'(dout)) > pk) pk = (dout < 0 ? -real'(dout) : real'(dout)); end

  task automatic run_dn(input real f, input real amp, input int n);
    for (int i = 0; i < n; i++) begin
      di = 16'(int'(amp * (f == 0 ? 1.0 : $sin(2.0 * 3.14159265 * f * i / 64000.0))));
      die = 1; @(negedge clk); die = 0; @(negedge clk);
    end
  endtask

  initial begin
    logic signed [15:0] s [12];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 12; i++) s[i] = 16'($urandom_range(20000, 0) - 10000);
    for (int i = 0; i < 12; i++) begin
      ui = s[i]; uie = 1; @(negedge clk); uie = 0;
      for (int k = 0; k < 8; k++) begin
        uoe = 1; @(negedge clk); uoe = 0;
        if (i > 0) begin
          int e;
          e = (int'(s[i-1]) * 8 + (int'(s[i]) - int'(s[i-1])) * k) >>> 3;
          check(uo == 16'(e), $sformatf("interpolated %0d/%0d got %0d exp %0d", i, k, uo, e));
        end
      end
    end
    nout = 0; run_dn(0, 10000, 800);
    check(nout == 100, $sformatf("decimation by 8 (%0d outputs)", nout));
    check(dout > 9000 && dout < 9800, $sformatf("DC gain (%0d)", dout));
    pk = 0; run_dn(1000, 10000, 800);
    check(pk > 8000, $sformatf("1 kHz passes (peak %f)", pk));
    run_dn(16000, 10000, 200);
    pk = 0; run_dn(16000, 10000, 800);
    check(pk < 1000, $sformatf("16 kHz stopped (peak %f)", pk));
    finish_tb();
  end
endmodule
