// tb_mote_tx_top: drives the TX chip only through its pins, as the test
// platform would: JTAG writes of the configuration, a test_start pulse,
// then observation of chip_out, header_bit_out, symbol_out, pkt_sent_ack
// and test_done, and JTAG reads of the monitor registers.
//
// Test 1: 3 packets, spacing 1, payload and shaping filter on, counter PLH.
// Test 2: 2 packets back to back, constant PLH, silent level 1, filter
// bypassed, no payload.  chip_out is sampled at each falling edge of the
// clk_chip pin (mid chip) and header_bit_out at each falling edge of
// clk_bit; the streams of each packet are compared with the reference
// model (preamble, rate-4 coded counter, DBPSK, 16-chip spreading, payload).
// In bypass symbol_out must be +16/-16 for chip 0/1; with the filter on the
// number of valid symbol samples per test is checked.  Between packets
// chip_out must rest at the silent level.
`include "tb_check.svh"
module tb_mote_tx_top;
  import mote_pkg::*;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, test_start = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic test_done, chip_out, chip_out_valid, symbol_out_valid, hb, hbv, ack, clk_chip, clk_bit;
  logic signed [7:0] symbol_out;
  logic [39:0] pre; logic [15:0] seq; logic [63:0] plh; logic [511:0] pay; logic [3:0] mux;
  int npkt;
  logic chips [$]; logic hbits [$];
  int n_ack = 0, n_sym = 0, n_bypass_bad = 0, n_silent_bad = 0;
  always #5 clk = ~clk;

  jtag_bfm bfm (.tck, .tms, .tdi, .trst_n, .tdo);
  mote_tx_top dut (.reset_n, .clk_2x_chip(clk), .tck, .trst_n, .tdi, .tdo, .tms, .test_start,
    .test_done, .chip_out, .chip_out_valid, .symbol_out, .symbol_out_valid,
    .header_bit_out(hb), .header_bit_out_valid(hbv), .pkt_sent_ack(ack), .clk_chip, .clk_bit);

  initial begin #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  always @(negedge clk_chip) begin
    if (chip_out_valid) chips.push_back(chip_out);
    else if (chip_out !== mux[1]) n_silent_bad++;
  end
  always @(negedge clk_bit) if (hbv) hbits.push_back(hb);
  always @(posedge clk) begin
    if (ack) n_ack++;
    if (symbol_out_valid) n_sym++;
  end
  // bypass: symbol_out follows chip_out two clk_2x_chip cycles later
  logic c_d1, c_d2, v_d1, v_d2;
  always @(posedge clk) begin
    c_d1 <= chip_out; c_d2 <= c_d1; v_d1 <= chip_out_valid; v_d2 <= v_d1;
    if (!mux[2] && v_d2 && symbol_out != (c_d2 ? -8'sd16 : 8'sd16)) n_bypass_bad++;
  end

  task automatic wr(int r, logic [1023:0] v, int n);
    logic [1023:0] o;
    bfm.scan_ir(1024'(r), 4, o); bfm.scan_dr(v, n, o);
  endtask
  task automatic rd(int r, int n, output logic [1023:0] o);
    bfm.scan_ir(1024'(r), 4, o); bfm.scan_dr('0, n, o); bfm.scan_dr(o, n, o);
  endtask

  task automatic run(int n, int sp, logic [3:0] m);
    int per = 1664 + (m[3] ? 512 : 0);
    logic [1023:0] o;
    npkt = n; mux = m;
    wr(TXDR_PLH, 1024'(plh), 64);
    wr(TXDR_PAYLOAD, 1024'(pay), 512);
    wr(TXDR_SPACING, 1024'(sp), 16);
    wr(TXDR_NPKT, 1024'(n), 32);
    wr(TXDR_MUX_SEL, 1024'(m), 4);
    chips.delete(); hbits.delete(); n_ack = 0; n_sym = 0; n_bypass_bad = 0; n_silent_bad = 0;
    @(negedge clk) test_start = 1; @(negedge clk) test_start = 0;
    fork
      wait (test_done);
      begin #15000000; end
    join_any
    disable fork;
    repeat (200) @(negedge clk);
    `CHECK_EQ(test_done, 1'b1, "test_done")
    `CHECK_EQ(n_ack, n, "pkt_sent_ack pulses")
    `CHECK_EQ(chips.size(), n * per, "chips sent")
    `CHECK_EQ(hbits.size(), n * 104, "header bits sent")
    for (int p = 0; p < n && chips.size() >= n * per; p++) begin
      automatic int bad = 0, badh = 0;
      automatic logic [63:0] pl = m[0] ? plh : rep4(16'(p));
      for (int c = 0; c < per; c++)
        if (chips[p*per + c] !== ref_chip(pre, pl, seq, pay, c)) bad++;
      for (int b = 0; b < 104 && hbits.size() >= n * 104; b++)
        if (hbits[p*104 + b] !== ref_hdr_bit(pre, pl, b)) badh++;
      `CHECK_EQ(bad, 0, $sformatf("chip errors in packet %0d", p))
      `CHECK_EQ(badh, 0, $sformatf("header bit errors in packet %0d", p))
    end
    `CHECK_EQ(n_silent_bad, 0, "chip_out at silent level outside packets")
    if (m[2]) `CHECK(n_sym >= n * per * 2, "filtered symbols valid for every chip")
    else begin
      `CHECK_EQ(n_sym, n * per * 2, "bypass symbols: two per chip")
      `CHECK_EQ(n_bypass_bad, 0, "bypass symbol level")
    end
    rd(TXDR_PLH_CNT, 16, o);
    `CHECK_EQ(o[15:0], 16'(n), "PLH counter read through JTAG")
    rd(TXDR_EN_STATUS, 3, o);
    `CHECK_EQ(o[2:0], 3'b000, "enables idle after the test")
  endtask

  initial begin
    pre = TX_PREAMBLE_DEF; seq = TX_SPREAD_DEF; pay = TX_PAYLOAD_DEF; plh = 64'h0123456789ABCDEF;
    mux = 4'hC;
    #1 reset_n = 0; #22 reset_n = 1;
    bfm.reset();
    run(3, 1, 4'b1100);
    pay = {16{$urandom}};
    run(2, 0, 4'b0011);
    `TB_FINISH
  end
endmodule
