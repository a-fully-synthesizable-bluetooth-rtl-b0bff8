// Testbench of the audio codec unit with a model of the PCM chip and of the
// SRAM behind the DMA port. The encoder ring and the decoder ring are the
// same buffer, so the voice loops back from the A/D to the D/A: for A-law and
// mu-law the D/A samples must equal the A/D samples of some frames earlier
// within the G.711 quantisation error; for CVSD the rebuilt tone must follow
// the input. Also checks one DMA write and one DMA read per 8 kHz frame
// (1500 clocks at 12 MHz), the 32-bit PCM frame with its sync, and the ring
// wrap interrupt.
module tb_audio_codec;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #41.667 clk = ~clk;   // 12 MHz
  `include "tb_check.svh"
  `TB_WATCHDOG(700000)

  logic we = 0, irq; logic [2:0] ad = 0; logic [31:0] wd = 0, rd;
  dma_req_t rq; dma_rsp_t rs;
  logic pclk, psync, pdout, pdin = 0;
  audio_codec dut (.clk, .rst_n, .reg_we(we), .reg_addr(ad), .reg_wdata(wd), .reg_rdata(rd), .irq,
                   .dma_req(rq), .dma_rsp(rs), .pcm_clk(pclk), .pcm_sync(psync), .pcm_dout(pdout), .pcm_din(pdin));

  // G.711 A-law expansion (table form: segment base and step)
  function automatic int alaw_ref(input logic [7:0] c);
    logic [7:0] a; int seg, mant, m;
    a = c ^ 8'h55; seg = a[6:4]; mant = a[3:0];
    m = (seg == 0) ? mant * 16 + 8 : (256 + mant * 16 + 8) * (1 << (seg - 1));
    return a[7] ? m : -m;
  endfunction
  int cur_mode = -1, nlaw = 0, bad_law = 0;

  // SRAM model: ack 3 clocks after a request
  logic [7:0] mem [4096];
  int nwr = 0, nrd = 0, wait_c = 0;
  always @(posedge clk) begin
    rs.ack <= 1'b0;
    if (rq.req && !rs.ack) begin
      wait_c++;
      if (wait_c == 3) begin
        wait_c = 0; rs.ack <= 1'b1;
        if (rq.we) begin
          mem[rq.addr] = rq.wdata; nwr++;
          if (cur_mode == 0 && frame > 2) begin
            int e;
            e = alaw_ref(rq.wdata) - int'(adc[frame]);
            if (e < 0) e = -e;
            nlaw++;
            if (e > (adc[frame] < 0 ? -int'(adc[frame]) : int'(adc[frame])) / 16 + 16) bad_law++;
          end
        end
        else begin rs.rdata <= mem[rq.addr]; nrd++; end
      end
    end
  end

  // PCM chip model: A/D sends a tone, D/A samples are recorded
  int frame = 0, idx = 99, nsync = 0;
  real amp = 8000.0, fsig = 500.0;
  logic signed [15:0] adc [1000], dac [1000];
  logic [15:0] dsh;
  always @(negedge pclk) begin
    if (psync) begin idx = 0; nsync++; frame++; adc[frame] = 16'(int'(amp * $sin(2.0 * 3.14159265 * fsig * frame / 8000.0))); end
    if (idx < 16) begin
      dsh = {dsh[14:0], pdout};
      pdin = adc[frame][15 - idx];
      if (idx == 15) dac[frame] = dsh;
    end
    idx++;
  end

  task automatic wreg(input int a, input int d);
    @(negedge clk); we = 1; ad = 3'(a); wd = d; @(negedge clk); we = 0;
  endtask

  // best match of dac[] against adc[] delayed by 1..8 frames over frames lo..hi
  task automatic match(input int lo, input int hi, output int best_d, output real best_e, output real sig);
    best_e = 1e30; best_d = -1; sig = 0;
    for (int n = lo; n <= hi; n++) sig += real'(adc[n]) ** 2;
    for (int d = 1; d <= 8; d++) begin
      real e = 0;
      for (int n = lo; n <= hi; n++) e += (real'(dac[n]) - real'(adc[n - d])) ** 2;
      if (e < best_e) begin best_e = e; best_d = d; end
    end
  endtask

  task automatic run_mode(input int mode, input string name, input real tol);
    int d, f0, w0, r0; real e, s;
    wreg(0, 0);
    wreg(1, mode);
    cur_mode = mode;
    for (int i = 0; i < 4096; i++) mem[i] = (mode == 1) ? 8'hFF : (mode == 0) ? 8'hD5 : 8'h55;
    wreg(0, 3'b111);
    repeat (3000) @(negedge clk);
    f0 = frame; w0 = nwr; r0 = nrd;
    repeat (60 * 1500) @(negedge clk);
    check((nwr - w0) >= (frame - f0) - 1 && (nwr - w0) <= (frame - f0) + 1, $sformatf("%s: one DMA write per frame (%0d in %0d)", name, nwr - w0, frame - f0));
    check((nrd - r0) >= (frame - f0) - 1 && (nrd - r0) <= (frame - f0) + 1, $sformatf("%s: one DMA read per frame (%0d in %0d)", name, nrd - r0, frame - f0));
    match(frame - 40, frame - 1, d, e, s);
    check(e < tol * s, $sformatf("%s loop-back: delay %0d frames, error %f of signal %f", name, d, e, s));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wreg(2, 12'h100); wreg(3, 12'h100); wreg(4, 16);
    run_mode(0, "A-law", 0.001);
    check(irq, "ring wrap interrupt");
    check(nlaw > 50 && bad_law == 0, $sformatf("A-law bytes in SRAM code the A/D samples (%0d bad of %0d)", bad_law, nlaw));
    wreg(5, 7); #1 check(!irq, "interrupt cleared");
    check(nsync >= 60, "PCM frame sync seen");
    run_mode(1, "mu-law", 0.001);
    run_mode(2, "CVSD", 0.1);
    finish_tb();
  end
endmodule
