// tb_wsn_link_top: end-to-end test of the wireless link model: the TX chip
// sends test packets, its 8-bit symbol output is the RX chip's ADC input
// (real rail; imaginary rail 0), and the RX chip detects the preambles and
// extracts the PLHs.
//
// Both chips are configured only through their own JTAG ports, and the tb
// reads the received PLH through the 4-bit plh_out port (16 read_en
// pulses per header).  The TX clock is clk_2x_chip (10 ns), the RX clock
// clk_4x_chip (5 ns) with an arbitrary phase, so the receiver sees two
// samples per chip with an unknown timing offset.  Scenarios:
//   1 shaping filter + matched filter, payload on, spacing 1;
//   2 filters bypassed, no payload, packets back to back, silent level 1;
//   3 external noise samples added in the RX channel emulator;
//   4 frequency offset in the channel emulator;
//   5 constant non-codeword PLH -> false-alarm counter;
//   6 RX held in reset during the first packets -> miss counter;
//   7 threshold above the maximum correlation -> no detection.
// For each received header the decoded packet id must follow 0,1,2,...
// (ids are rate-4 repetition coded on the TX side) and the JTAG monitor
// counters must match.  Each mechanism is counted; a mechanism that never
// happened is a failure.  The tb uses the top's default parameters.
`include "tb_check.svh"
module tb_wsn_link_top;
  import mote_pkg::*;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic tx_clk = 0, rx_clk = 0, tx_reset_n = 1, rx_reset_n = 1, test_start = 0, read_en = 0;
  logic ttck, ttms, ttdi, ttrst_n, ttdo, rtck, rtms, rtdi, rtrst_n, rtdo;
  logic test_done, chip_out, chip_out_valid, symbol_out_valid, hb, hbv, ack;
  logic tx_clk_chip, tx_clk_bit, rx_clk_2x, rx_clk_chip;
  logic signed [7:0] symbol_out, noise_re = 0, noise_im = 0;
  logic [3:0] plh_out; logic plh_out_valid, plh_ready, pdet, plh_rcv;
  logic noise_on = 0;
  // received headers
  logic [63:0] rx_plh [$];
  int n_det = 0, n_rcv = 0, n_ack = 0, n_silent_bad = 0;
  // mechanism counters
  int m_detect, m_plh_ok, m_payload, m_nopayload, m_b2b, m_gap, m_txfilt, m_txbyp,
      m_rxfilt, m_noise, m_freq, m_false_alarm, m_miss, m_done, m_read, m_silent, m_nodet;

  always #5 tx_clk = ~tx_clk;
  initial begin #1.7; forever #2.5 rx_clk = ~rx_clk; end

  jtag_bfm tx_jtag (.tck(ttck), .tms(ttms), .tdi(ttdi), .trst_n(ttrst_n), .tdo(ttdo));
  jtag_bfm rx_jtag (.tck(rtck), .tms(rtms), .tdi(rtdi), .trst_n(rtrst_n), .tdo(rtdo));

  wsn_link_top dut (
    .tx_reset_n, .tx_clk_2x_chip(tx_clk), .tx_tck(ttck), .tx_trst_n(ttrst_n), .tx_tms(ttms),
    .tx_tdi(ttdi), .tx_tdo(ttdo), .test_start, .test_done, .chip_out, .chip_out_valid,
    .symbol_out, .symbol_out_valid, .header_bit_out(hb), .header_bit_out_valid(hbv),
    .pkt_sent_ack(ack), .tx_clk_chip, .tx_clk_bit,
    .rx_reset_n, .rx_clk_4x_chip(rx_clk), .rx_tck(rtck), .rx_trst_n(rtrst_n), .rx_tms(rtms),
    .rx_tdi(rtdi), .rx_tdo(rtdo), .noise_re, .noise_im, .read_en, .plh_out, .plh_out_valid,
    .plh_ready, .preamble_detected(pdet), .plh_received(plh_rcv), .rx_clk_2x_chip(rx_clk_2x),
    .rx_clk_chip);

  initial begin #60000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // noise source: sum of four uniform values, roughly Gaussian, sigma ~ 4.6
  always @(posedge rx_clk_2x) begin
    if (noise_on) begin
      noise_re <= 8'($urandom_range(0, 4) + $urandom_range(0, 4) + $urandom_range(0, 4)
                    + $urandom_range(0, 4)) - 8'sd8;
      noise_im <= 8'($urandom_range(0, 4) + $urandom_range(0, 4) + $urandom_range(0, 4)
                    + $urandom_range(0, 4)) - 8'sd8;
    end else begin
      noise_re <= 0; noise_im <= 0;
    end
  end

  always @(posedge tx_clk) if (ack) n_ack++;
  always @(negedge tx_clk_chip) if (!chip_out_valid && tx_reset_n && chip_out !== cur_silent) n_silent_bad++;
  always @(posedge rx_clk_2x) if (pdet) n_det++;

  // PLH read-out through the 4-bit port
  logic cur_silent = 0;
  initial begin
    forever begin
      @(posedge rx_clk_2x);
      if (plh_ready && rx_reset_n) begin
        logic [63:0] v;
        for (int i = 0; i < 16; i++) begin
          @(negedge rx_clk_2x) read_en = 1;
          @(negedge rx_clk_2x) read_en = 0;
          if (plh_out_valid) v[4*i +: 4] = plh_out;
        end
        rx_plh.push_back(v);
        m_read++;
      end
    end
  end

  task automatic tx_wr(int r, logic [1023:0] v, int n);
    logic [1023:0] o;
    tx_jtag.scan_ir(1024'(r), 4, o); tx_jtag.scan_dr(v, n, o);
  endtask
  task automatic rx_wr(int r, logic [1023:0] v, int n);
    logic [1023:0] o;
    rx_jtag.scan_ir(1024'(r), 4, o); rx_jtag.scan_dr(v, n, o);
  endtask
  task automatic rx_rd(int r, int n, output logic [15:0] val);
    logic [1023:0] o;
    rx_jtag.scan_ir(1024'(r), 4, o); rx_jtag.scan_dr('0, n, o); val = o[15:0];
  endtask

  // One test: configure, reset the RX counters, send npkt packets.
  task automatic run(string name, int npkt, int sp, logic [3:0] tx_mux, logic [2:0] rx_mux,
                     logic [11:0] fo, logic [7:0] thr, logic [63:0] cplh, int rx_hold,
                     int exp_first, int exp_fa, int exp_miss);
    logic [15:0] fa, miss;
    int got;
    $display("scenario %s", name);
    tx_wr(TXDR_NPKT, 1024'(npkt), 32);
    tx_wr(TXDR_SPACING, 1024'(sp), 16);
    tx_wr(TXDR_MUX_SEL, 1024'(tx_mux), 4);
    tx_wr(TXDR_PLH, 1024'(cplh), 64);
    rx_wr(5, 1024'(rx_mux), 3);
    rx_wr(3, 1024'(fo), 12);
    rx_wr(2, 1024'(thr), 8);
    noise_on = rx_mux[1];
    cur_silent = tx_mux[1];
    rx_plh.delete(); n_det = 0; n_ack = 0; n_silent_bad = 0;
    rx_reset_n = 0;
    @(negedge tx_clk) test_start = 1; @(negedge tx_clk) test_start = 0;
    fork
      begin
        repeat (rx_hold) @(posedge tx_clk iff ack);
        #100 rx_reset_n = 1;
      end
    join_none
    fork
      wait (test_done);
      #20000000;
    join_any
    disable fork;
    rx_reset_n = 1;
    #60000;   // last PLH extraction and read-out
    `CHECK_EQ(test_done, 1'b1, {name, ": test_done"})
    `CHECK_EQ(n_ack, npkt, {name, ": packets sent"})
    if (n_ack == npkt) m_done++;
    `CHECK_EQ(n_silent_bad, 0, {name, ": chip_out at silent level between packets"})
    if (tx_mux[1] && n_silent_bad == 0) m_silent++;
    rx_rd(6, 16, fa);
    rx_rd(7, 16, miss);
    `CHECK_EQ(int'(fa), exp_fa, {name, ": false alarm counter"})
    `CHECK_EQ(int'(miss), exp_miss, {name, ": miss counter"})
    if (exp_fa > 0 && int'(fa) == exp_fa) m_false_alarm++;
    if (exp_miss > 0 && int'(miss) == exp_miss) m_miss++;
    got = rx_plh.size();
    if (thr == 8'hFF) begin
      `CHECK_EQ(n_det, 0, {name, ": no detection above maximum threshold"})
      `CHECK_EQ(got, 0, {name, ": no header received"})
      if (n_det == 0) m_nodet++;
      return;
    end
    `CHECK_EQ(got, npkt - exp_first, {name, ": headers received"})
    `CHECK_EQ(n_det, npkt - exp_first, {name, ": detections"})
    if (n_det > 0) m_detect++;
    for (int i = 0; i < got; i++) begin
      logic [63:0] e = tx_mux[0] ? cplh : rep4(16'(exp_first + i));
      `CHECK_EQ(rx_plh[i], e, $sformatf("%s: header %0d", name, i))
      if (rx_plh[i] == e) begin
        m_plh_ok++;
        if (tx_mux[3]) m_payload++; else m_nopayload++;
        if (sp == 0) m_b2b++; else m_gap++;
        if (tx_mux[2]) m_txfilt++; else m_txbyp++;
        if (rx_mux[0]) m_rxfilt++;
        if (rx_mux[1]) m_noise++;
        if (rx_mux[2] && fo != 0) m_freq++;
      end
    end
  endtask

  initial begin
    #1 tx_reset_n = 0; rx_reset_n = 0;
    #30 tx_reset_n = 1; rx_reset_n = 1;
    fork tx_jtag.reset(); rx_jtag.reset(); join
    //   name        npkt sp tx_mux   rx_mux  fo      thr    cplh                 hold first fa miss
    run("filtered",    4, 1, 4'b1100, 3'b001, 12'd0,  8'h28, 64'h0,                 0, 0, 0, 0);
    run("bypass",      3, 0, 4'b0010, 3'b000, 12'd0,  8'h28, 64'h0,                 0, 0, 0, 0);
    run("noise",       3, 1, 4'b0100, 3'b011, 12'd0,  8'h28, 64'h0,                 0, 0, 0, 0);
    run("freq offset", 3, 1, 4'b0100, 3'b101, 12'd8,  8'h64, 64'h0,                 0, 0, 0, 0);
    run("false alarm", 2, 1, 4'b0101, 3'b001, 12'd0,  8'h28, 64'h0000000000000001,  0, 0, 2, 0);
    run("miss",        4, 1, 4'b0100, 3'b001, 12'd0,  8'h28, 64'h0,                 2, 2, 0, 2);
    run("threshold",   2, 1, 4'b0100, 3'b001, 12'd0,  8'hFF, 64'h0,                 0, 0, 0, 0);
    `CHECK(m_detect > 0,      "mechanism: preamble detection")
    `CHECK(m_plh_ok > 0,      "mechanism: PLH extraction")
    `CHECK(m_read > 0,        "mechanism: PLH read-out")
    `CHECK(m_payload > 0,     "mechanism: packets with payload")
    `CHECK(m_nopayload > 0,   "mechanism: packets without payload")
    `CHECK(m_b2b > 0,         "mechanism: back-to-back packets")
    `CHECK(m_gap > 0,         "mechanism: inter-packet spacing")
    `CHECK(m_txfilt > 0,      "mechanism: TX shaping filter")
    `CHECK(m_txbyp > 0,       "mechanism: TX filter bypass")
    `CHECK(m_rxfilt > 0,      "mechanism: RX matched filter")
    `CHECK(m_noise > 0,       "mechanism: channel noise")
    `CHECK(m_freq > 0,        "mechanism: frequency offset")
    `CHECK(m_false_alarm > 0, "mechanism: false-alarm counting")
    `CHECK(m_miss > 0,        "mechanism: miss counting")
    `CHECK(m_done > 0,        "mechanism: test_done")
    `CHECK(m_silent > 0,      "mechanism: silent level")
    `CHECK(m_nodet > 0,       "mechanism: threshold rejects")
    $display("mechanisms: detect=%0d plh=%0d read=%0d payload=%0d nopayload=%0d b2b=%0d gap=%0d txfilt=%0d txbyp=%0d rxfilt=%0d noise=%0d freq=%0d fa=%0d miss=%0d done=%0d silent=%0d nodet=%0d",
             m_detect, m_plh_ok, m_read, m_payload, m_nopayload, m_b2b, m_gap, m_txfilt, m_txbyp,
             m_rxfilt, m_noise, m_freq, m_false_alarm, m_miss, m_done, m_silent, m_nodet);
    `TB_FINISH
  end
endmodule
