// tb_rx_unit: checks detection and PLH extraction on the two sample paths.
//
// The tb plays the matched-filter outputs: one even and one odd complex
// value per chip, with en pulsing every second clock.  Packets (spread
// DBPSK preamble + rate-4 coded PLH) are sent as +/-100 on one path while
// the other path carries small random values (chip-transition samples), or
// on both paths; random values fill the gaps.  Checks: one
// preamble_detected per packet, detect_path naming the signal path (even
// when both carry it), plh_received once per packet with the sent PLH, and
// no extra detection while a PLH is being extracted.
`include "tb_check.svh"
module tb_rx_unit;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, en = 0;
  logic signed [19:0] er = 0, ei = 0, orr = 0, oi = 0;
  logic [15:0] seq = 16'h066B;
  logic [39:0] pre = 40'h2481F1539C;
  logic det, dpath, rcv; logic [1:0] pd; logic signed [23:0] eta_e, eta_o; logic [63:0] plh;
  int n_det = 0, n_rcv = 0, last_path = -1;
  logic [63:0] got [$];
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (det) begin n_det++; last_path = int'(dpath); end
    if (rcv) begin n_rcv++; got.push_back(plh); end
  end
  rx_unit #(.LB(16), .W(40), .PLH_BITS(64), .TRUNC(3), .IN_W(20)) dut (.clk, .reset_n, .en,
    .even_re(er), .even_im(ei), .odd_re(orr), .odd_im(oi), .seq, .preamble(pre),
    .threshold(8'h28), .preamble_detected(det), .detect_path(dpath), .path_detect(pd),
    .eta_even(eta_e), .eta_odd(eta_o), .plh_received(rcv), .plh);
  initial begin #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  function automatic logic signed [19:0] rnd();
    return 20'($urandom_range(0, 20)) - 20'sd10;
  endfunction
  task automatic chip(logic signed [19:0] a, logic signed [19:0] b);
    @(negedge clk); en = 1; er = a; ei = rnd(); orr = b; oi = rnd();
    @(negedge clk); en = 0;
  endtask
  // mode 0: even path, 1: odd path, 2: both
  task automatic packet(int mode, int id);
    logic [63:0] h = rep4(16'(id));
    n_det = 0; n_rcv = 0; got.delete();
    repeat (300) chip(rnd(), rnd());
    for (int c = 0; c < 1664; c++) begin
      logic signed [19:0] v = ref_chip(pre, h, seq, '0, c) ? -20'sd100 : 20'sd100;
      chip(mode != 1 ? v : rnd(), mode != 0 ? v : rnd());
    end
    repeat (60) chip(rnd(), rnd());
    `CHECK_EQ(n_det, 1, $sformatf("detections (mode %0d)", mode))
    `CHECK_EQ(last_path, mode == 1 ? 1 : 0, $sformatf("detect_path (mode %0d)", mode))
    `CHECK_EQ(n_rcv, 1, $sformatf("plh_received (mode %0d)", mode))
    if (got.size() > 0) `CHECK_EQ(got[0], h, $sformatf("PLH (mode %0d)", mode))
  endtask
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    packet(0, 0); packet(1, 1); packet(2, 2); packet(1, 16'hA5C3);
    `TB_FINISH
  end
endmodule
