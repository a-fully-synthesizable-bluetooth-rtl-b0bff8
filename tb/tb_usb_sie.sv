// tb_usb_sie: self-checking testbench for the USB serial interface engine.
// Part 1 drives the receiver of u_b from a line encoder written here (NRZI,
// bit stuffing, sync, SE0 EOP) with bit lengths of 3 to 5 clocks to test
// clock recovery: token packets with CRC5, data packets with CRC16 and long
// runs of 1s, a packet with a damaged CRC and one with a stuffing error.
// Part 2 sends data packets from the transmitter of u_a to the receiver of
// u_b over the wire and checks bytes, CRC, the bit count of the packet on
// the line and that usb_oe is released. CRCs are computed here bit by bit.
module tb_usb_sie;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;   // 48 MHz nominal; only the clock count matters

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // line driven by the test encoder
  logic drv_dp = 1'b1, drv_dm = 1'b0;
  logic use_a = 1'b0;

  logic a_dp, a_dm, a_oe, b_dp, b_dm, b_oe;
  logic a_rx_active, a_rx_valid, a_rx_eop, a_pid_err, a_stuff_err, a_c5, a_c16;
  logic [7:0] a_rx_data;
  logic b_rx_active, b_rx_valid, b_rx_eop, b_pid_err, b_stuff_err, b_c5, b_c16;
  logic [7:0] b_rx_data;
  logic a_tx_valid = 1'b0, a_tx_ready, b_tx_ready;
  logic [7:0] a_tx_data = '0;

  usb_sie u_a (
    .clk, .rst_n, .usb_dp_i(1'b1), .usb_dm_i(1'b0),
    .usb_dp_o(a_dp), .usb_dm_o(a_dm), .usb_oe(a_oe),
    .rx_active(a_rx_active), .rx_valid(a_rx_valid), .rx_data(a_rx_data),
    .rx_eop(a_rx_eop), .rx_pid_err(a_pid_err), .rx_stuff_err(a_stuff_err),
    .rx_crc5_ok(a_c5), .rx_crc16_ok(a_c16),
    .tx_valid(a_tx_valid), .tx_data(a_tx_data), .tx_ready(a_tx_ready)
  );

  logic line_dp, line_dm;
  assign line_dp = use_a ? (a_oe ? a_dp : 1'b1) : drv_dp;
  assign line_dm = use_a ? (a_oe ? a_dm : 1'b0) : drv_dm;

  usb_sie u_b (
    .clk, .rst_n, .usb_dp_i(line_dp), .usb_dm_i(line_dm),
    .usb_dp_o(b_dp), .usb_dm_o(b_dm), .usb_oe(b_oe),
    .rx_active(b_rx_active), .rx_valid(b_rx_valid), .rx_data(b_rx_data),
    .rx_eop(b_rx_eop), .rx_pid_err(b_pid_err), .rx_stuff_err(b_stuff_err),
    .rx_crc5_ok(b_c5), .rx_crc16_ok(b_c16),
    .tx_valid(1'b0), .tx_data(8'h00), .tx_ready(b_tx_ready)
  );

  // collect what u_b receives
  byte unsigned got[$];
  int eops = 0;
  bit last_c5, last_c16, last_pid_err, last_stuff;
  always @(posedge clk) begin
    if (b_rx_valid) got.push_back(b_rx_data);
    if (b_rx_eop) begin
      eops++; last_c5 = b_c5; last_c16 = b_c16; last_pid_err = b_pid_err;
    end
    if (b_stuff_err) last_stuff = 1'b1;
  end

  // ---- reference CRCs (USB 1.1 generator polynomials, LSB-first data) ----
  function automatic logic [15:0] crc16_of(input byte unsigned d[$]);
    logic [15:0] c = 16'hFFFF;
    foreach (d[i]) for (int k = 0; k < 8; k++) begin
      bit b = d[i][k];
      bit fb = b ^ c[15];
      c = {c[14:0], 1'b0};
      if (fb) c ^= 16'h8005;
    end
    return ~c;
  endfunction

  function automatic logic [4:0] crc5_of(input logic [10:0] v);
    logic [4:0] c = 5'h1F;
    for (int k = 0; k < 11; k++) begin
      bit fb = v[k] ^ c[4];
      c = {c[3:0], 1'b0};
      if (fb) c ^= 5'h05;
    end
    return ~c;
  endfunction

  // ---- test line encoder ----
  bit cur_level = 1'b1;   // D+ level, J = 1
  // Each edge lies on a 4-clock grid, some of them one clock late (the
  // quantization of an asynchronous line; it does not add up from bit to bit).
  int jprev = 0;
  task automatic line_bit(input bit lv);
    int r = $urandom_range(0, 9);
    int j = (r < 3) ? 1 : 0;
    drv_dp = lv; drv_dm = ~lv;
    repeat (4 + j - jprev) @(posedge clk);
    jprev = j;
  endtask

  task automatic send_bits(input bit bits[$], input bit bad_stuff);
    int ones = 0;
    bit stuffed_bad = 0;
    // sync 00000001
    for (int k = 0; k < 8; k++) begin
      bit b = (k == 7);
      if (!b) cur_level = ~cur_level;
      line_bit(cur_level);
    end
    ones = 1;
    foreach (bits[i]) begin
      if (!bits[i]) cur_level = ~cur_level;
      line_bit(cur_level);
      ones = bits[i] ? ones + 1 : 0;
      if (ones == 6) begin
        if (bad_stuff && !stuffed_bad) stuffed_bad = 1;        // leave the stuff bit out
        else begin cur_level = ~cur_level; line_bit(cur_level); end
        ones = 0;
      end
    end
    drv_dp = 0; drv_dm = 0; repeat (8) @(posedge clk);
    drv_dp = 1; drv_dm = 0; cur_level = 1; repeat (4) @(posedge clk);
    repeat ($urandom_range(4, 20)) @(posedge clk);
  endtask

  function automatic void push_byte(ref bit q[$], input byte unsigned v);
    for (int k = 0; k < 8; k++) q.push_back(v[k]);
  endfunction

  function automatic byte unsigned pid_byte(input logic [3:0] p);
    return {~p, p};
  endfunction

  task automatic data_packet(input int n, input bit damage, input bit bad_stuff, input bit via_a);
    byte unsigned pl[$];
    byte unsigned all[$];
    logic [15:0] c;
    bit bits[$];
    int e0;
    for (int i = 0; i < n; i++) begin
      int r = $urandom_range(0, 3);
      pl.push_back(r == 0 ? 8'hFF : byte'($urandom));
    end
    if (bad_stuff && n > 0) pl[0] = 8'hFF;
    c = crc16_of(pl);
    all.push_back(pid_byte(4'b0011));        // DATA0
    foreach (pl[i]) all.push_back(pl[i]);
    // CRC16 is sent highest coefficient first
    all.push_back({<<{c[15:8]}});
    all.push_back({<<{c[7:0]}});
    if (damage) all[1] ^= 8'h10;
    got.delete(); e0 = eops; last_stuff = 0;
    if (!via_a) begin
      foreach (all[i]) push_byte(bits, all[i]);
      send_bits(bits, bad_stuff);
    end else begin
      int idx = 0;
      int clks = 0, se0_clks = 0;
      use_a = 1'b1;
      a_tx_data = all[0]; a_tx_valid = 1'b1;
      while (!a_oe) @(posedge clk);
      while (a_oe) begin
        @(posedge clk);
        clks++;
        if (!a_dp && !a_dm) se0_clks++;
        if (a_tx_ready) begin
          idx++;
          if (idx < all.size()) a_tx_data = all[idx];
          else a_tx_valid = 1'b0;
        end
      end
      check(se0_clks == 8, $sformatf("SE0 lasts 2 bits (%0d clocks)", se0_clks));
      check(clks % 4 == 0 && clks >= 4 * (8 * (all.size() + 1) + 3),
            $sformatf("packet length %0d clocks for %0d bytes", clks, all.size()));
      repeat (40) @(posedge clk);
      use_a = 1'b0;
    end
    repeat (20) @(posedge clk);
    if (bad_stuff) begin
      check(last_stuff, "stuffing error flagged");
      return;
    end
    check(eops == e0 + 1, "one EOP");
    check(got.size() == all.size(), $sformatf("byte count %0d vs %0d", got.size(), all.size()));
    foreach (all[i]) if (i < got.size()) check(got[i] == all[i], $sformatf("byte %0d", i));
    check(!last_pid_err, "PID check");
    check(last_c16 == !damage, $sformatf("CRC16 ok=%0d damage=%0d", last_c16, damage));
  endtask

  task automatic token_packet(input bit bad_pid);
    logic [10:0] v = 11'($urandom);
    logic [4:0]  c = crc5_of(v);
    bit bits[$];
    int e0 = eops;
    byte unsigned p = pid_byte(4'b1001);     // IN
    if (bad_pid) p ^= 8'h80;
    push_byte(bits, p);
    for (int k = 0; k < 11; k++) bits.push_back(v[k]);
    for (int k = 4; k >= 0; k--) bits.push_back(c[k]);
    got.delete();
    send_bits(bits, 0);
    repeat (20) @(posedge clk);
    check(eops == e0 + 1, "token EOP");
    check(got.size() == 3, $sformatf("token bytes %0d", got.size()));
    if (got.size() >= 3) check({got[2][2:0], got[1]} == v, "token address/endpoint");
    check(last_c5, "CRC5 residual");
    check(last_pid_err == bad_pid, "PID complement check");
  endtask

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    for (int t = 0; t < 20; t++) token_packet(t == 7);
    for (int t = 0; t < 30; t++) data_packet($urandom_range(0, 64), 0, 0, 0);
    data_packet(32, 1, 0, 0);
    data_packet(64, 0, 0, 0);
    data_packet(16, 0, 1, 0);   // first byte 0xFF: one stuff bit left out
    for (int t = 0; t < 20; t++) data_packet($urandom_range(1, 64), 0, 0, 1);
    data_packet(8, 1, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
