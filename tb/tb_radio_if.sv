// Testbench for radio_if.
// Serial port: random 24-bit control words must come out MSB first (captured
// on rising ser_clk) with one ser_le pulse, 3 clocks per bit (4 MHz at
// 12 MHz); busy covers the shift and a write while busy is ignored.
// Receive DPLL: a bit stream is sent with a random start phase and a clock
// that drifts (some bits 11 or 13 clocks long instead of 12); after the
// first 8 bits every recovered bit must equal the sent one at a fixed bit
// latency, and every sample must fall at least 3 clocks from a transition.
// Transmit: tx bits reach rf_tx_data after an air strobe, rf_tx_en follows
// tx_on and rf_rx_en is off while transmitting.
module tb_radio_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(400000)
  logic air_en = 0, tx_bit = 0, tx_on = 0, rx_want = 0, rx_bit, rx_stb, rf_tx_data, rf_tx_en, rf_rx_en, rf_rx_data = 0;
  logic wr = 0, sclk, sdat, sle, busy; logic [23:0] word = 0;
  radio_if dut (.clk, .rst_n, .air_en, .tx_bit, .tx_on, .rx_want, .rx_bit, .rx_stb, .rf_tx_data, .rf_tx_en, .rf_rx_en,
                .rf_rx_data, .ctl_wr(wr), .ctl_word(word), .ser_clk(sclk), .ser_data(sdat), .ser_le(sle), .busy);
  logic [23:0] sh; int nbits = 0, nle = 0, cyc = 0, last_rise = 0, bad_period = 0;
  always @(posedge clk) cyc++;
  always @(posedge sclk) begin
    if (nbits > 0 && cyc - last_rise != 3) bad_period++;
    sh <= {sh[22:0], sdat}; nbits++;
    last_rise = cyc;
  end
  always @(posedge clk) if (sle) nle++;

  // receive: record recovered bits and the clock distance of each sample
  // from the last line transition
  logic sent [$], got [$];
  int last_edge = 0, min_dist = 99, nsamp = 0;
  logic prev_line = 0;
  always @(posedge clk) begin
    if (rf_rx_data != prev_line) last_edge = cyc;
    prev_line = rf_rx_data;
    if (rx_stb && rx_want) begin
      got.push_back(rx_bit);
      nsamp++;
      // rx_bit was taken 3 clocks back (2 synchronizer flops + 1 register)
      if (nsamp > 8 && cyc - 3 - last_edge < min_dist) min_dist = cyc - 3 - last_edge;
    end
  end

  initial begin
    logic [23:0] w;
    int lat, len;
    bit ok;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      w = 24'($urandom);
      nbits = 0; nle = 0;
      @(negedge clk); word = w; wr = 1; @(negedge clk); wr = 0; word = ~w;
      check(busy, "busy after write");
      @(negedge clk); wr = 1; @(negedge clk); wr = 0;       // ignored while busy
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      check(nbits == 24 && nle == 1, $sformatf("24 bits and one latch pulse (%0d, %0d)", nbits, nle));
      check(sh == w, $sformatf("control word %h sent as %h", w, sh));
    end
    check(bad_period == 0, "serial clock period is 3 clocks");

    // receive with a random phase and a drifting bit clock
    for (int run = 0; run < 4; run++) begin
      sent.delete(); got.delete(); nsamp = 0; min_dist = 99;
      repeat ($urandom_range(0, 11)) @(negedge clk);
      rx_want = 1;
      for (int i = 0; i < 300; i++) begin
        rf_rx_data = (i < 4) ? 1'(i) : 1'($urandom);   // preamble-like start
        sent.push_back(rf_rx_data);
        len = 12;
        if (i % 25 == 7) len = (run % 2) ? 13 : 11;
        repeat (len) @(negedge clk);
      end
      rx_want = 0;
      lat = -1;
      for (int l = 0; l < 4; l++) begin
        ok = 1;
        for (int i = 8; i + l < got.size() && i < sent.size(); i++) if (got[i + l] != sent[i]) ok = 0;
        if (ok && lat < 0) lat = l;
      end
      check(lat >= 0, $sformatf("run %0d: recovered bits match the sent ones (%0d bits)", run, got.size()));
      check(got.size() >= 290 && got.size() <= 310, $sformatf("run %0d: one strobe per bit (%0d)", run, got.size()));
      check(min_dist >= 3, $sformatf("run %0d: samples at least 3 clocks from an edge (%0d)", run, min_dist));
    end

    // transmit data path
    rx_want = 1; @(negedge clk); @(negedge clk);
    check(rf_rx_en && !rf_tx_en, "receiver enabled when not transmitting");
    tx_on = 1;
    for (int k = 0; k < 50; k++) begin
      tx_bit = 1'($urandom); air_en = 1; @(negedge clk); air_en = 0; @(negedge clk);
      check(rf_tx_data == tx_bit && rf_tx_en && !rf_rx_en, "tx bit on the pin");
    end
    finish_tb();
  end
endmodule
