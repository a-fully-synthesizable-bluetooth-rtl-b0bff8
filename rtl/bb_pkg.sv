// Shared types and constants of the Bluetooth baseband module.
//
// The DMA request/response structs are the byte-wide bus every peripheral
// (USB, link controller, audio codec, UART) uses to reach the shared SRAM
// through the memory management unit. Peripherals move 8 bits per DMA, as the
// module's data transfer unit is one byte. The channel numbering is this
// design's own choice: a lower number wins arbitration.
package bb_pkg;

  localparam int unsigned MEM_AW = 12;          // byte address into the 4 kB SRAM

  typedef struct packed {
    logic              req;    // hold high until ack
    logic              we;     // 1 = write byte, 0 = read byte
    logic [MEM_AW-1:0] addr;   // byte address
    logic [7:0]        wdata;
  } dma_req_t;

  typedef struct packed {
    logic       ack;           // one-cycle pulse: access done, rdata valid
    logic [7:0] rdata;
  } dma_rsp_t;

  localparam int unsigned DMA_USB   = 0;
  localparam int unsigned DMA_LC    = 1;
  localparam int unsigned DMA_AUDIO = 2;
  localparam int unsigned DMA_UART  = 3;
  localparam int unsigned DMA_NCH   = 4;

  // Bluetooth packet type codes (TYPE field of the packet header, v1.1)
  typedef enum logic [3:0] {
    PT_NULL = 4'h0, PT_POLL = 4'h1, PT_FHS = 4'h2, PT_DM1 = 4'h3,
    PT_DH1  = 4'h4, PT_HV1  = 4'h5, PT_HV2 = 4'h6, PT_HV3 = 4'h7,
    PT_DV   = 4'h8, PT_AUX1 = 4'h9, PT_DM3 = 4'hA, PT_DH3 = 4'hB,
    PT_DM5  = 4'hE, PT_DH5  = 4'hF
  } pkt_type_e;

  // What the Tx/Rx sequencers need to know about a packet type (v1.1, ACL
  // types plus the SCO types HV1..HV3). DV is treated as its 10 voice bytes.
  typedef enum logic [1:0] {FEC_NONE = 2'd0, FEC_13 = 2'd1, FEC_23 = 2'd2} fec_e;

  typedef struct packed {
    logic       has_payload;
    logic [1:0] pl_hdr_bytes;  // 0, 1 (single-slot) or 2 (multi-slot)
    logic [8:0] max_bytes;     // user data bytes, excluding payload header
    fec_e       fec;
    logic       has_crc;
    logic [2:0] slots;
  } pkt_info_t;

  function automatic pkt_info_t pkt_info(input logic [3:0] t);
    pkt_info_t i;
    i = '{has_payload: 1'b1, pl_hdr_bytes: 2'd1, max_bytes: 9'd0, fec: FEC_NONE,
          has_crc: 1'b1, slots: 3'd1};
    unique case (t)
      PT_NULL, PT_POLL: begin i.has_payload = 1'b0; i.has_crc = 1'b0; end
      PT_FHS:  begin i.pl_hdr_bytes = 2'd0; i.max_bytes = 9'd18;  i.fec = FEC_23; end
      PT_DM1:  begin i.max_bytes = 9'd17;  i.fec = FEC_23; end
      PT_DH1:  begin i.max_bytes = 9'd27; end
      PT_AUX1: begin i.max_bytes = 9'd29;  i.has_crc = 1'b0; end
      PT_HV1:  begin i.pl_hdr_bytes = 2'd0; i.max_bytes = 9'd10; i.fec = FEC_13; i.has_crc = 1'b0; end
      PT_HV2:  begin i.pl_hdr_bytes = 2'd0; i.max_bytes = 9'd20; i.fec = FEC_23; i.has_crc = 1'b0; end
      PT_HV3, PT_DV: begin i.pl_hdr_bytes = 2'd0; i.max_bytes = 9'd30; i.has_crc = 1'b0;
                           if (t == PT_DV) i.max_bytes = 9'd10; end
      PT_DM3:  begin i.pl_hdr_bytes = 2'd2; i.max_bytes = 9'd121; i.fec = FEC_23; i.slots = 3'd3; end
      PT_DH3:  begin i.pl_hdr_bytes = 2'd2; i.max_bytes = 9'd183; i.slots = 3'd3; end
      PT_DM5:  begin i.pl_hdr_bytes = 2'd2; i.max_bytes = 9'd224; i.fec = FEC_23; i.slots = 3'd5; end
      PT_DH5:  begin i.pl_hdr_bytes = 2'd2; i.max_bytes = 9'd339; i.slots = 3'd5; end
      default: begin i.has_payload = 1'b0; i.has_crc = 1'b0; end
    endcase
    return i;
  endfunction

endpackage
