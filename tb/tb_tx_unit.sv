// tb_tx_unit: checks the TX datapath (header generator, DBPSK encoder,
// spreader, payload register, chip register, shaping filter) with the
// clock generator and control unit as stimulus.
//
// Two packets with payload are sent with random preamble, spreading
// sequence and payload; chip_out is sampled in the ce_chip cycle (the chip
// register updates at its end) and compared with the reference chip stream.
// Header bits are compared in each ce_bit cycle.  symbol_out is checked
// against the bypass level in one run and against the FIR of the chip
// stream (reference convolution of the zero-inserted chips) in another.
`include "tb_check.svh"
module tb_tx_unit;
  import mote_pkg::*;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, test_start = 0;
  logic clk_chip, clk_bit, ce_chip, ce_bit, first_half; logic [3:0] chip_idx;
  logic [39:0] pre; logic [15:0] spr; logic [63:0] plh; logic [95:0] cof;
  logic [511:0] pay; logic [3:0] mux;
  logic [15:0] spread_seq; logic [95:0] filter_coeff; logic [511:0] payload_seq;
  logic silent_level, txfilter_en, hdr_load, enc_clear, payload_load, pre_en, plh_en, pay_en;
  logic ack, done; logic [103:0] hw; logic [15:0] plh_counter; cu_state_e state;
  logic hb, hbv, co, cov, sv; logic signed [7:0] so;
  logic chips [$]; logic hbits [$];
  int xin [$]; int n_filt_bad = 0, n_filt = 0;
  always #5 clk = ~clk;

  tx_clock_generator #(.LB(16)) u_clk (.clk_2x_chip(clk), .reset_n, .clk_chip, .clk_bit,
    .ce_chip, .ce_bit, .first_half, .chip_idx);
  tx_control_unit u_cu (.clk, .reset_n, .ce_bit, .test_start, .cfg_preamble(pre),
    .cfg_spread(spr), .cfg_plh(plh), .cfg_spacing(16'd1), .cfg_npkt(32'd2), .cfg_coeff(cof),
    .cfg_payload(pay), .cfg_mux_sel(mux), .spread_seq, .filter_coeff, .payload_seq,
    .silent_level, .txfilter_en, .header_word(hw), .hdr_load, .enc_clear, .payload_load,
    .preamble_sr_en(pre_en), .plh_sr_en(plh_en), .payload_sr_en(pay_en),
    .pkt_sent_ack(ack), .test_done(done), .plh_counter, .state);
  tx_unit dut (.clk, .reset_n, .ce_bit, .ce_chip, .first_half, .chip_idx, .header_word(hw),
    .spread_seq, .filter_coeff, .payload_seq, .silent_level, .txfilter_en, .hdr_load,
    .enc_clear, .payload_load, .preamble_sr_en(pre_en), .plh_sr_en(plh_en),
    .payload_sr_en(pay_en), .header_bit_out(hb), .header_bit_out_valid(hbv),
    .chip_out(co), .chip_out_valid(cov), .symbol_out(so), .symbol_out_valid(sv));

  initial begin #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  always @(posedge clk) begin
    if (ce_chip && cov) chips.push_back(co);
    if (ce_bit && hbv) hbits.push_back(hb);
  end
  // reference FIR: x is the zero-inserted chip stream at the chip register
  // output; symbol_out follows two cycles later
  always @(posedge clk) begin
    automatic int acc = 0;
    xin.push_front((cov && first_half) ? (co ? -1 : 1) : 0);
    if (xin.size() > 14) void'(xin.pop_back());
    if (xin.size() == 14 && txfilter_en) begin
      for (int k = 1; k <= 12; k++) acc += coef(filter_coeff, k) * xin[k+1];
      acc = acc >>> 1; acc = acc > 127 ? 127 : acc < -128 ? -128 : acc;
      n_filt++;
      if (int'(so) != acc) n_filt_bad++;
    end
  end

  task automatic run(logic [3:0] m);
    mux = m; chips.delete(); hbits.delete(); n_filt_bad = 0; n_filt = 0;
    pre = {8'($urandom), 32'($urandom)}; spr = 16'($urandom); plh = '0;
    for (int k = 0; k < 16; k++) pay[32*k +: 32] = $urandom;
    @(negedge clk) test_start = 1; @(negedge clk) test_start = 0;
    wait (done); repeat (100) @(negedge clk);
    `CHECK_EQ(chips.size(), 2 * 2176, "chip count")
    `CHECK_EQ(hbits.size(), 2 * 104, "header bit count")
    for (int p = 0; p < 2 && chips.size() == 2 * 2176; p++) begin
      automatic int bad = 0, badh = 0;
      for (int c = 0; c < 2176; c++)
        if (chips[p*2176 + c] !== ref_chip(pre, rep4(16'(p)), spr, pay, c)) bad++;
      for (int b = 0; b < 104; b++)
        if (hbits[p*104 + b] !== ref_hdr_bit(pre, rep4(16'(p)), b)) badh++;
      `CHECK_EQ(bad, 0, $sformatf("chip errors packet %0d", p))
      `CHECK_EQ(badh, 0, $sformatf("header bit errors packet %0d", p))
    end
    if (m[2]) begin
      `CHECK(n_filt > 1000, "filter outputs compared")
      `CHECK_EQ(n_filt_bad, 0, "filter output mismatches")
    end
  endtask

  initial begin
    cof = {8'h00,8'hFF,8'h04,8'hF9,8'hF6,8'h34,8'h66,8'h34,8'hF6,8'hF9,8'h04,8'hFF};
    #1 reset_n = 0; #22 reset_n = 1;
    run(4'b1100);
    cof = {3{$urandom}};
    run(4'b1110);
    `TB_FINISH
  end
endmodule
