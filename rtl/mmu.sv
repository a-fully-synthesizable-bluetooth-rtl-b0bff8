// Memory management unit: shares the single-port SRAM between the
// microcontroller and the peripherals' DMA channels, and routes the
// microcontroller's memory-mapped I/O accesses to the peripheral registers.
//
// Address map (CPU byte address, 16 bits): addr[15]=0 selects the SRAM
// (mirrored every 4 kB), addr[15]=1 selects the I/O space, which is passed
// straight to io_* and never waits for the SRAM.
//
// Arbitration follows the document's rules:
//  * the microcontroller has priority: a DMA only starts in a cycle in which
//    the CPU does not request the SRAM, so CPU requests interrupt a stream of
//    DMA transfers between bytes;
//  * one byte of DMA takes 2 cycles: a set-up cycle (channel chosen, address
//    latched, SRAM still free) and an access cycle. A CPU SRAM request that
//    arrives in the access cycle is stalled for 1 cycle;
//  * when the CPU issues a stack access (cpu_stack) while a DMA is waiting,
//    the stack access is held for 2 cycles and the DMA runs, so continuous
//    stack traffic cannot starve the peripherals.
// These give the 1-cycle and 2-cycle stalls of the CPU degradation formula.
// Which channel wins among several waiting ones (lowest index) is this
// design's choice.
//
// Timing: cpu_ready is combinational and says the CPU access is taken this
// cycle; read data is on cpu_rdata with cpu_rvalid one cycle later. A DMA
// channel holds req until a one-cycle ack, which comes one cycle after the
// access cycle together with the read byte.
module mmu
  import bb_pkg::*;
#(
  parameter int unsigned NCH = DMA_NCH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // microcontroller bus
  input  logic                 cpu_req,
  input  logic                 cpu_we,
  input  logic                 cpu_stack,
  input  logic [3:0]           cpu_be,
  input  logic [15:0]          cpu_addr,
  input  logic [31:0]          cpu_wdata,
  output logic                 cpu_ready,
  output logic                 cpu_rvalid,
  output logic [31:0]          cpu_rdata,
  // memory-mapped I/O towards the peripheral registers
  output logic                 io_req,
  output logic                 io_we,
  output logic [14:0]          io_addr,
  output logic [31:0]          io_wdata,
  input  logic [31:0]          io_rdata,
  // DMA channels
  input  dma_req_t             dma_req [NCH],
  output dma_rsp_t             dma_rsp [NCH],
  // SRAM port
  output logic                 ram_en,
  output logic                 ram_we,
  output logic [3:0]           ram_be,
  output logic [MEM_AW-3:0]    ram_addr,
  output logic [31:0]          ram_d,
  input  logic [31:0]          ram_q,
  // event strobes (for monitoring)
  output logic                 ev_cpu_stall,
  output logic                 ev_stack_preempt
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ACCESS} state_e;
  state_e state, state_nx;

  logic [$clog2(NCH)-1:0] ch_q, ch_pick;
  logic                   pend;
  logic [NCH-1:0]         ack_q;
  dma_req_t               cur;   // cur.req is implied by the state
  logic                   cpu_ram, cpu_io;
  logic                   rd_ram_q, rd_io_q;
  logic [1:0]             lane_q;
  logic [31:0]            io_rdata_q;

  assign cpu_ram = cpu_req & ~cpu_addr[15];
  assign cpu_io  = cpu_req &  cpu_addr[15];

  // pick the waiting channel with the lowest index; a channel being acked
  // this cycle still shows its old request and is skipped
  always_comb begin
    pend    = 1'b0;
    ch_pick = '0;
    for (int i = NCH-1; i >= 0; i--)
      if (dma_req[i].req && !ack_q[i]) begin
        pend    = 1'b1;
        ch_pick = i[$clog2(NCH)-1:0];
      end
  end

  assign cur = dma_req[ch_q];

  always_comb begin
    state_nx         = state;
    cpu_ready        = 1'b0;
    ev_cpu_stall     = 1'b0;
    ev_stack_preempt = 1'b0;
    ram_en   = 1'b0;
    ram_we   = 1'b0;
    ram_be   = '0;
    ram_addr = cpu_addr[MEM_AW-1:2];
    ram_d    = cpu_wdata;
    unique case (state)
      S_IDLE: begin
        if (cpu_ram && cpu_stack && pend) begin
          // stack access pre-empted: this cycle is the DMA set-up cycle
          ev_stack_preempt = 1'b1;
          ev_cpu_stall     = 1'b1;
          state_nx         = S_ACCESS;
        end else if (cpu_ram) begin
          cpu_ready = 1'b1;
          ram_en    = 1'b1;
          ram_we    = cpu_we;
          ram_be    = cpu_be;
        end else if (pend) begin
          state_nx = S_SETUP;
        end
        if (cpu_io) cpu_ready = 1'b1;
      end
      S_SETUP: begin
        // set-up cycle of the DMA: channel and address are latched, the SRAM
        // is free, so a CPU access taken here goes ahead of the DMA access
        if (cpu_ram) begin
          cpu_ready = 1'b1;
          ram_en    = 1'b1;
          ram_we    = cpu_we;
          ram_be    = cpu_be;
        end else begin
          state_nx = S_ACCESS;
        end
        if (cpu_io) cpu_ready = 1'b1;
      end
      S_ACCESS: begin
        ram_en   = 1'b1;
        ram_we   = cur.we;
        ram_be   = 4'b0001 << cur.addr[1:0];
        ram_addr = cur.addr[MEM_AW-1:2];
        ram_d    = {4{cur.wdata}};
        if (cpu_ram) ev_cpu_stall = 1'b1;
        if (cpu_io)  cpu_ready    = 1'b1;
        state_nx = S_IDLE;
      end
      default: state_nx = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ch_q       <= '0;
      ack_q      <= '0;
      rd_ram_q   <= 1'b0;
      rd_io_q    <= 1'b0;
      lane_q     <= '0;
      io_rdata_q <= '0;
    end else begin
      state <= state_nx;
      if (state == S_IDLE) ch_q <= ch_pick;
      ack_q <= '0;
      if (state == S_ACCESS) begin
        ack_q[ch_q] <= 1'b1;
        lane_q      <= cur.addr[1:0];
      end
      rd_ram_q   <= cpu_ready & cpu_ram & ~cpu_we;
      rd_io_q    <= cpu_io & ~cpu_we;
      io_rdata_q <= io_rdata;
    end
  end

  assign io_req   = cpu_io;
  assign io_we    = cpu_we;
  assign io_addr  = cpu_addr[14:0];
  assign io_wdata = cpu_wdata;

  assign cpu_rvalid = rd_ram_q | rd_io_q;
  assign cpu_rdata  = rd_io_q ? io_rdata_q : ram_q;

  always_comb
    for (int i = 0; i < NCH; i++) begin
      dma_rsp[i].ack   = ack_q[i];
      dma_rsp[i].rdata = ram_q[8*lane_q +: 8];
    end

  // a DMA channel must hold its request until it sees the acknowledge
  for (genvar g = 0; g < NCH; g++) begin : g_hold
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (dma_req[g].req && !dma_rsp[g].ack) |=> (dma_req[g].req || dma_rsp[g].ack));
  end
endmodule
