// Self-checking testbench of the MMU with the SRAM behind it.
// Checks CPU word access, DMA byte writes/reads against a reference memory,
// the 2-cycle DMA (set-up + access, ack one cycle later), the 1-cycle CPU
// stall in the access cycle, the 2-cycle stall of a pre-empted stack access,
// and that continuous CPU traffic holds a DMA off until the CPU is idle.
module tb_mmu;
  import bb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cpu_req = 0, cpu_we = 0, cpu_stack = 0, cpu_ready, cpu_rvalid;
  logic [3:0] cpu_be = 4'hF;
  logic [15:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic io_req, io_we; logic [14:0] io_addr; logic [31:0] io_wdata, io_rdata;
  dma_req_t dreq [DMA_NCH];
  dma_rsp_t drsp [DMA_NCH];
  logic ram_en, ram_we; logic [3:0] ram_be; logic [9:0] ram_addr; logic [31:0] ram_d, ram_q;
  logic ev_stall, ev_pre;
  logic [7:0] refm [4096];

  assign io_rdata = {17'h0, io_addr} ^ 32'hA5A5_0000;

  mmu dut (.clk, .rst_n, .cpu_req, .cpu_we, .cpu_stack, .cpu_be, .cpu_addr, .cpu_wdata,
           .cpu_ready, .cpu_rvalid, .cpu_rdata, .io_req, .io_we, .io_addr, .io_wdata, .io_rdata,
           .dma_req(dreq), .dma_rsp(drsp), .ram_en, .ram_we, .ram_be, .ram_addr, .ram_d, .ram_q,
           .ev_cpu_stall(ev_stall), .ev_stack_preempt(ev_pre));
  sram_sp ram (.clk, .en(ram_en), .we(ram_we), .be(ram_be), .addr(ram_addr), .d(ram_d), .q(ram_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nstall = 0, npre = 0;
  always @(posedge clk) begin
    if (ev_stall) nstall++;
    if (ev_pre) npre++;
  end

  // CPU word write; returns the number of cycles waited
  task automatic cpu_write(input logic [15:0] a, input logic [31:0] d, input bit stack, output int waited);
    waited = 0;
    @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d; cpu_stack = stack;
    @(posedge clk); while (!cpu_ready) begin waited++; @(posedge clk); end
    for (int b = 0; b < 4; b++) refm[{a[11:2], 2'(b)}] = d[8*b +: 8];
    #1 cpu_req = 0; cpu_stack = 0;
  endtask

  task automatic cpu_read(input logic [15:0] a, output logic [31:0] d, output int waited);
    waited = 0;
    @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = a; cpu_stack = 0;
    @(posedge clk); while (!cpu_ready) begin waited++; @(posedge clk); end
    #1 cpu_req = 0;
    d = cpu_rdata;
    check(cpu_rvalid, "rvalid after read");
  endtask

  // DMA access on channel ch; returns cycles from request to ack
  task automatic dma(input int ch, input bit we, input logic [11:0] a, input logic [7:0] wd,
                     output logic [7:0] rd, output int lat);
    lat = 0;
    @(negedge clk); dreq[ch].req = 1; dreq[ch].we = we; dreq[ch].addr = a; dreq[ch].wdata = wd;
    do begin @(posedge clk); lat++; #1; end while (!drsp[ch].ack);
    rd = drsp[ch].rdata;
    if (we) refm[a] = wd;
    dreq[ch].req = 0;
  endtask

  logic [31:0] rd32; logic [7:0] rd8; int w, lat;

  initial begin
    for (int i = 0; i < DMA_NCH; i++) dreq[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // CPU word writes and reads
    for (int i = 0; i < 16; i++) begin
      cpu_write(16'(i*4), $urandom, 0, w); check(w == 0, "CPU write not stalled when idle");
    end
    for (int i = 0; i < 16; i++) begin
      cpu_read(16'(i*4), rd32, w);
      check(rd32 == {refm[i*4+3], refm[i*4+2], refm[i*4+1], refm[i*4]}, "CPU read data");
    end
    // I/O space access goes to the I/O port
    cpu_read(16'h8010, rd32, w); check(rd32 == (32'h10 ^ 32'hA5A5_0000), "I/O read");
    // DMA byte writes with the CPU idle: 2 cycles + ack
    for (int i = 0; i < 8; i++) begin
      dma(i % DMA_NCH, 1, 12'(64 + i), 8'(8'h30 + i), rd8, lat);
      check(lat == 3, $sformatf("DMA write latency %0d", lat));
    end
    for (int i = 0; i < 8; i++) begin
      dma(DMA_UART, 0, 12'(64 + i), 0, rd8, lat);
      check(rd8 == refm[64 + i], "DMA read byte");
    end
    cpu_read(16'd64, rd32, w);
    check(rd32 == {refm[67], refm[66], refm[65], refm[64]}, "CPU sees DMA bytes");
    // CPU request arriving in the DMA access cycle: 1 cycle stall
    fork
      dma(DMA_LC, 1, 12'd100, 8'h5A, rd8, lat);
      begin
        @(posedge clk); @(posedge clk); // DMA now in access cycle next
        #1;
        begin
          int s0 = nstall;
          cpu_req = 1; cpu_we = 0; cpu_addr = 16'd0; w = 0;
          @(posedge clk); while (!cpu_ready) begin w++; @(posedge clk); end
          #1 cpu_req = 0;
        end
      end
    join
    check(w == 1, $sformatf("CPU stalled %0d cycles in DMA access (expect 1)", w));
    // continuous CPU (non-stack) traffic holds the DMA off
    fork
      begin
        @(negedge clk); cpu_req = 1; cpu_we = 0; cpu_addr = 16'd8;
        repeat (10) @(posedge clk);
        #1 cpu_req = 0;
      end
      dma(DMA_USB, 1, 12'd200, 8'hC3, rd8, lat);
    join
    check(lat >= 10, $sformatf("DMA waited for CPU traffic (%0d)", lat));
    // continuous stack traffic: stack access stalled 2 cycles and DMA goes
    fork
      dma(DMA_AUDIO, 1, 12'd300, 8'h77, rd8, lat);
      begin
        int p0 = npre;
        cpu_write(16'd512, 32'hDEADBEEF, 1, w);
        check(w == 2, $sformatf("stack access stalled %0d cycles (expect 2)", w));
        check(npre == p0 + 1, "stack pre-emption event");
      end
    join
    check(lat == 2, $sformatf("DMA latency under stack traffic %0d", lat));
    dma(DMA_AUDIO, 0, 12'd300, 0, rd8, lat); check(rd8 == 8'h77, "pre-empting DMA wrote");
    dma(DMA_USB, 0, 12'd200, 0, rd8, lat);   check(rd8 == 8'hC3, "held-off DMA wrote");
    cpu_read(16'd512, rd32, w); check(rd32 == 32'hDEADBEEF, "stack write landed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
