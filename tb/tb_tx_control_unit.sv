// tb_tx_control_unit: runs complete tests through the TX control unit and
// checks the packet sequence bit period by bit period.
//
// ce_bit is driven as a one-cycle pulse every 3rd clock (the unit only
// sees ce_bit, so shortened bit periods speed up the test).  In each ce_bit
// cycle the tb records the field of the ending bit period: 'A' preamble,
// 'L' PLH, 'P' payload, '-' none.  After leading idle periods are dropped
// the record must equal the expected packet/gap pattern built from the
// configuration: 40 A, 64 L, optionally 32 P per packet and
// spacing*104 '-' between packets.  Also checked: the number of
// pkt_sent_ack pulses, one hdr_load/enc_clear per packet, header_word at
// each hdr_load (preamble, then rate-4 coded packet counter 0,1,2,... or the
// constant PLH), payload_load once per packet with payload on, test_done
// after the last packet, a test with zero packets, and that a JTAG change
// during a test does not affect the running test.
`include "tb_check.svh"
module tb_tx_control_unit;
  import mote_pkg::*;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, ce_bit = 0, test_start = 0;
  logic [39:0] pre; logic [15:0] spr, spc; logic [63:0] plh; logic [31:0] npk;
  logic [95:0] cof; logic [511:0] pay; logic [3:0] mux;
  logic [15:0] spread_seq; logic [95:0] filter_coeff; logic [511:0] payload_seq;
  logic silent_level, txfilter_en, hdr_load, enc_clear, payload_load;
  logic pre_en, plh_en, pay_en, ack, done;
  logic [103:0] hw; logic [15:0] plh_counter; cu_state_e state;
  string rec;
  int n_ack, n_load, n_pload, n_done_early;
  logic [63:0] plh_seen [$];
  always #5 clk = ~clk;

  tx_control_unit dut (.clk, .reset_n, .ce_bit, .test_start, .cfg_preamble(pre),
    .cfg_spread(spr), .cfg_plh(plh), .cfg_spacing(spc), .cfg_npkt(npk), .cfg_coeff(cof),
    .cfg_payload(pay), .cfg_mux_sel(mux), .spread_seq, .filter_coeff, .payload_seq,
    .silent_level, .txfilter_en, .header_word(hw), .hdr_load, .enc_clear, .payload_load,
    .preamble_sr_en(pre_en), .plh_sr_en(plh_en), .payload_sr_en(pay_en),
    .pkt_sent_ack(ack), .test_done(done), .plh_counter, .state);

  initial begin #50000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  task automatic run(int n, int sp, logic [3:0] m, int bits);
    string exp = "";
    int cyc = 0;
    npk = n; spc = 16'(sp); mux = m;
    pre = {8'($urandom), 32'($urandom)}; plh = {32'($urandom), 32'($urandom)};
    spr = 16'($urandom); cof = {3{32'($urandom)}};
    for (int k = 0; k < 16; k++) pay[32*k +: 32] = $urandom;
    rec = ""; n_ack = 0; n_load = 0; n_pload = 0; n_done_early = 0; plh_seen.delete();
    @(negedge clk) test_start = 1; @(negedge clk) test_start = 0;
    `CHECK_EQ(done, 1'(n == 0), "test_done right after test_start")
    `CHECK_EQ(spread_seq, spr, "spreading sequence copied")
    `CHECK_EQ(filter_coeff, cof, "filter coefficients copied")
    `CHECK_EQ(payload_seq, pay, "payload copied")
    `CHECK_EQ({txfilter_en, silent_level}, {m[2], m[1]}, "filter enable and silent level")
    // a JTAG write during the test must not change the running test
    spc = spc + 16'd3; pre = ~pre;
    for (int b = 0; b < bits; b++) begin
      cyc = 0;
      while (cyc < 3) begin
        ce_bit = (cyc == 2);
        @(posedge clk);
        if (ce_bit) begin
          rec = {rec, pre_en ? "A" : plh_en ? "L" : pay_en ? "P" : "-"};
          if (ack) n_ack++;
          if (hdr_load) begin
            n_load++; plh_seen.push_back(hw[103:40]);
            `CHECK_EQ(hw[39:0], ~pre, "preamble in header word")
            `CHECK_EQ(enc_clear, 1'b1, "enc_clear with hdr_load")
          end
          if (payload_load) n_pload++;
          if (done && n_ack < n) n_done_early++;
        end
        @(negedge clk); ce_bit = 0; cyc++;
      end
    end
    for (int p = 0; p < n; p++) begin
      for (int i = 0; i < 40; i++) exp = {exp, "A"};
      for (int i = 0; i < 64; i++) exp = {exp, "L"};
      if (m[3]) for (int i = 0; i < 32; i++) exp = {exp, "P"};
      if (p != n - 1) for (int i = 0; i < sp * 104; i++) exp = {exp, "-"};
    end
    while (rec.len() > 0 && rec[0] == "-") rec = rec.substr(1, rec.len() - 1);
    while (rec.len() > 0 && rec[rec.len()-1] == "-") rec = rec.substr(0, rec.len() - 2);
    `CHECK(rec == exp, $sformatf("field sequence n=%0d spacing=%0d mux=%h (len %0d vs %0d)",
                                 n, sp, m, rec.len(), exp.len()))
    `CHECK_EQ(n_ack, n, "pkt_sent_ack count")
    `CHECK_EQ(n_load, n, "hdr_load count")
    `CHECK_EQ(n_pload, m[3] ? n : 0, "payload_load count")
    `CHECK_EQ(done, 1'b1, "test_done at end")
    `CHECK_EQ(n_done_early, 0, "test_done not before last packet")
    for (int p = 0; p < plh_seen.size(); p++)
      `CHECK_EQ(plh_seen[p], m[0] ? plh : rep4(16'(p)), $sformatf("PLH of packet %0d", p))
  endtask

  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    `CHECK_EQ(state, CU_IDLE, "idle after reset")
    run(3, 1, 4'b1100, 3 * 136 + 2 * 104 + 20);   // payload on, spacing 1
    run(4, 0, 4'b0100, 4 * 104 + 20);             // no payload, back to back
    run(2, 2, 4'b0011, 2 * 104 + 2 * 104 + 20);   // constant PLH, spacing 2
    run(3, 0, 4'b1000, 3 * 136 + 20);             // payload, back to back
    run(0, 1, 4'b0000, 30);                       // zero packets
    `TB_FINISH
  end
endmodule
