// tb_plh_extractor: checks PLH recovery after a start pulse.
//
// Chips enter every second clock (en); ev is en delayed by one cycle, as in
// the receiver.  A packet's chips (spread DBPSK preamble + random PLH) go
// to the selected path and random chips to the other path.  start (with
// path) is given in the ev cycle after the last preamble chip entered.
// Then plh_received must pulse exactly once, after the 64th PLH symbol,
// with plh equal to the sent header; busy must cover the extraction and a
// second start while busy must be ignored.  Cases: even path, odd path,
// signal on both rails of the complex input, inverted carrier (all chips
// negated, which differential decoding must not notice).
`include "tb_check.svh"
module tb_plh_extractor;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, en = 0, ev = 0, start = 0, path = 0;
  logic [1:0] cre = 0, cim = 0;
  logic [15:0] seq = 16'h066B;
  logic [39:0] pre = 40'h2481F1539C;
  logic busy, rcv; logic [63:0] plh;
  int n_rcv = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin ev <= en; if (rcv) n_rcv++; end
  plh_extractor #(.LB(16), .PLH_BITS(64)) dut (.clk, .reset_n, .en, .ev, .start, .path,
    .chip_re(cre), .chip_im(cim), .seq, .busy, .plh_received(rcv), .plh);
  initial begin #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  task automatic run(bit p, bit both, bit inv);
    logic [63:0] h = {32'($urandom), 32'($urandom)};
    n_rcv = 0;
    for (int c = 0; c < 1664 + 40; c++) begin
      bit b = (c < 1664) ? ref_chip(pre, h, seq, '0, c) ^ inv : 1'($urandom);
      @(negedge clk); en = 1; start = 0;
      cre[p] = b; cim[p] = both ? b : 1'b0;
      cre[!p] = 1'($urandom); cim[!p] = 1'($urandom);
      @(negedge clk); en = 0;
      if (c == 639) begin start = 1; path = p; end
      if (c == 700) begin start = 1; path = !p; end   // ignored while busy
      if (c == 640) `CHECK_EQ(busy, 1'b1, "busy after start")
    end
    start = 0;
    `CHECK_EQ(n_rcv, 1, "plh_received pulses")
    `CHECK_EQ(plh, h, $sformatf("extracted PLH path=%0d both=%0d inv=%0d", p, both, inv))
    `CHECK_EQ(busy, 1'b0, "idle after extraction")
  endtask

  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    run(0, 0, 0);
    run(1, 0, 0);
    run(0, 1, 0);
    run(1, 1, 1);
    `TB_FINISH
  end
endmodule
