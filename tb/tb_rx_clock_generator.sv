// tb_rx_clock_generator: checks the receiver clock division.
//
// Counts clk_4x_chip, clk_2x_chip and clk_chip rising edges over a fixed
// time (ratio 4:2:1), checks that clk_2x_chip rises with clk_4x_chip, and
// that en_even and en_odd alternate in the clk_2x_chip domain with en_even
// high while clk_chip is high.  Reset is driven low from a high level.
`include "tb_check.svh"
module tb_rx_clock_generator;
  int checks = 0, failures = 0;
  logic clk4 = 0, reset_n = 1, clk2, clkc, ev, od;
  int n4 = 0, n2 = 0, nc = 0, n_alt_bad = 0, n_phase_bad = 0;
  logic last_ev;
  always #5 clk4 = ~clk4;
  rx_clock_generator dut (.clk_4x_chip(clk4), .reset_n, .clk_2x_chip(clk2), .clk_chip(clkc),
    .en_even(ev), .en_odd(od));
  initial begin #100000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  always @(posedge clk4) if (reset_n) n4++;
  always @(posedge clkc) if (reset_n) nc++;
  always @(posedge clk2) if (reset_n) begin
    n2++;
    if (ev === od) n_alt_bad++;
    if (n2 > 1 && ev === last_ev) n_alt_bad++;
    if (clkc !== ev) n_phase_bad++;
    if (clk4 !== 1'b1) n_phase_bad++;
    last_ev = ev;
  end
  initial begin
    #1 reset_n = 0; #22 reset_n = 1;
    #8000;
    `CHECK(n4 >= 799 && n4 <= 801, $sformatf("clk_4x_chip edges %0d", n4))
    `CHECK(n2 >= 2 * (n4 / 4) - 1 && n2 <= n4 / 2 + 1, $sformatf("clk_2x_chip edges %0d", n2))
    `CHECK(nc >= n4 / 4 - 1 && nc <= n4 / 4 + 1, $sformatf("clk_chip edges %0d", nc))
    `CHECK_EQ(n_alt_bad, 0, "en_even/en_odd alternate")
    `CHECK_EQ(n_phase_bad, 0, "clock phase relations")
    `TB_FINISH
  end
endmodule
