// Single-port synchronous SRAM, 4 kB by default (1024 words of 32 bits).
//
// One access per clock: when en is high the word at addr is written under the
// byte enables (we=1) or read (we=0). Read data appears on q one clock after
// the read. This is the one on-chip memory of the module: it holds the
// microcontroller's data and every peripheral's data buffer, which the MMU
// shares between them. The 4 kB size follows the document; the 32-bit word
// width matches the ARM7-class microcontroller and is this design's choice.
module sram_sp #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                en,
  input  logic                we,
  input  logic [DATA_W/8-1:0] be,
  input  logic [ADDR_W-1:0]   addr,
  input  logic [DATA_W-1:0]   d,
  output logic [DATA_W-1:0]   q
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < DATA_W/8; b++)
          if (be[b]) mem[addr][8*b +: 8] <= d[8*b +: 8];
      end else begin
        q <= mem[addr];
      end
    end
  end
endmodule
