// tb_tx_clock_generator: checks the derived chip/bit clocks and enables of
// the TX clock generator over several bit periods.
//
// After reset the counter starts at 0; the first edge after reset makes it
// 1.  With c the count in a cycle the tb checks: ce_chip = (c odd),
// first_half = (c even), chip_idx = (c mod 32)/2, ce_bit = (c mod 32 == 31), clk_chip high in even cycles and clk_bit high in
// the first 16 cycles of a bit period.  It also counts the enable pulses.
// Reset is driven low from a high level so the asynchronous reset sees an
// edge.
`include "tb_check.svh"
module tb_tx_clock_generator;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1;
  logic clk_chip, clk_bit, ce_chip, ce_bit, first_half;
  logic [3:0] chip_idx;
  int n_chip = 0, n_bit = 0;
  always #5 clk = ~clk;
  tx_clock_generator #(.LB(16)) dut (.clk_2x_chip(clk), .reset_n, .clk_chip, .clk_bit,
    .ce_chip, .ce_bit, .first_half, .chip_idx);
  initial begin #100000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    @(negedge clk);
    for (int k = 0; k < 32 * 4; k++) begin
      automatic int c = (k + 1) % 32;
      `CHECK_EQ(ce_chip, 1'(c % 2 == 1), "ce_chip")
      `CHECK_EQ(first_half, 1'(c % 2 == 0), "first_half")
      `CHECK_EQ(chip_idx, 4'(c / 2), "chip_idx")
      `CHECK_EQ(ce_bit, 1'(c == 31), "ce_bit")
      `CHECK_EQ(clk_chip, 1'(c % 2 == 0), "clk_chip")
      `CHECK_EQ(clk_bit, 1'(c < 16), "clk_bit")
      n_chip += int'(ce_chip); n_bit += int'(ce_bit);
      @(negedge clk);
    end
    `CHECK_EQ(n_chip, 64, "chip enables in 4 bit periods")
    `CHECK_EQ(n_bit, 4, "bit enables in 4 bit periods")
    `TB_FINISH
  end
endmodule
