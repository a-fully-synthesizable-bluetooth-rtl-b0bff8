// HCI packet decoder of the UART receive path: follows the byte stream of
// the Bluetooth HCI UART transport and finds the type and length of each
// packet, so the microcontroller need not parse it byte by byte.
//
// The first byte of a packet is its indicator: 1 command (3 header bytes,
// length in header byte 2), 2 ACL data (4 header bytes, 16-bit length in
// bytes 2-3), 3 SCO data (3 header bytes, length in byte 2), 4 event (2
// header bytes, length in byte 1). After the header the decoder counts the
// payload bytes; done pulses with the byte that ends the packet, with ptype
// and plen valid. An unknown indicator pulses err and the byte is skipped.
module hci_pkt_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic [7:0]  data,
  output logic        done,
  output logic        err,
  output logic [2:0]  ptype,
  output logic [15:0] plen,
  output logic        in_pkt
);
  typedef enum logic [1:0] {H_TYPE, H_HDR, H_PAY} hstate_e;
  hstate_e    st;
  logic [2:0] hcnt, hlen;
  logic [15:0] rem;

  assign in_pkt = (st != H_TYPE);

  // length field as it stands after the current header byte
  logic [15:0] hl;
  always_comb begin
    hl = plen;
    if (hcnt == hlen - 3'd1 && ptype == 3'd2) hl[15:8] = data;   // ACL length MSB
    else if (hcnt == hlen - 3'd1)             hl[7:0]  = data;
    else if (hcnt == 3'd2 && ptype == 3'd2)   hl[7:0]  = data;   // ACL length LSB
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_TYPE; hcnt <= '0; hlen <= '0; rem <= '0; ptype <= '0; plen <= '0;
      done <= 1'b0; err <= 1'b0;
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      if (valid) begin
        unique case (st)
          H_TYPE: begin
            hcnt <= '0;
            plen <= '0;
            unique case (data)
              8'h01:   begin ptype <= 3'd1; hlen <= 3'd3; st <= H_HDR; end
              8'h02:   begin ptype <= 3'd2; hlen <= 3'd4; st <= H_HDR; end
              8'h03:   begin ptype <= 3'd3; hlen <= 3'd3; st <= H_HDR; end
              8'h04:   begin ptype <= 3'd4; hlen <= 3'd2; st <= H_HDR; end
              default: err <= 1'b1;
            endcase
          end
          H_HDR: begin
            plen <= hl;
            hcnt <= hcnt + 3'd1;
            if (hcnt == hlen - 3'd1) begin
              rem <= hl;
              if (hl == 16'd0) begin done <= 1'b1; st <= H_TYPE; end
              else st <= H_PAY;
            end
          end
          H_PAY: begin
            rem <= rem - 16'd1;
            if (rem == 16'd1) begin done <= 1'b1; st <= H_TYPE; end
          end
          default: st <= H_TYPE;
        endcase
      end
    end
  end
endmodule
