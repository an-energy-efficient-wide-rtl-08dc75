// tb_tx_filter: random chip streams through the TX pulse-shaping filter,
// compared with a sample-by-sample reference.
//
// The tb drives first_half alternating 1,0 (two clk_2x_chip cycles per
// chip), a random chip per chip period and random gaps in chip_valid.  The
// reference builds the upsampled input x (+1 for chip 0, -1 for chip 1 in
// the first cycle, else 0) and checks, one cycle later than the DUT's input
// register, y = sat8((sum_k coeff_k * x[n-k]) >>> 1) with coeff_1 on the
// newest sample.  With the filter disabled it checks the +/-16 bypass level
// and symbol_out_valid = chip_valid delayed by one cycle.  Covers the
// default coefficients and random ones (which also reach saturation).
`include "tb_check.svh"
module tb_tx_filter;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, en = 1, first_half = 0, chip = 0, chip_valid = 0;
  logic [95:0] coeff;
  logic signed [7:0] y; logic yv;
  int xh [$]; int vh [$]; int n_sat = 0;
  logic cd = 0, vd = 0, cd1 = 0, vd1 = 0;
  always #5 clk = ~clk;
  tx_filter #(.TAPS(12), .COEFF_W(8), .OUT_SHIFT(1)) dut (.clk, .reset_n, .en, .first_half,
    .chip, .chip_valid, .coeff, .symbol_out(y), .symbol_out_valid(yv));
  initial begin #5000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    coeff = {8'h00,8'hFF,8'h04,8'hF9,8'hF6,8'h34,8'h66,8'h34,8'hF6,8'hF9,8'h04,8'hFF};
    for (int i = 0; i < 14; i++) begin xh.push_front(0); vh.push_front(0); end
    #1 reset_n = 0; #12 reset_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n == 2000) en = 0;
      // check output of the previous edges
      if (n > 14) begin
        if (en) begin
          automatic int acc = 0, v = 0;
          for (int k = 1; k <= 12; k++) acc += coef(coeff, k) * xh[k];
          acc = acc >>> 1;
          if (acc > 127) begin acc = 127; n_sat++; end
          if (acc < -128) begin acc = -128; n_sat++; end
          for (int k = 1; k <= 12; k++) v |= vh[k];
          `CHECK_EQ(int'(y), acc, $sformatf("filtered sample n=%0d", n))
          `CHECK_EQ(yv, 1'(v), "symbol_out_valid (filter)")
        end else if (n > 2001) begin
          `CHECK_EQ(int'(y), vd ? (cd ? -16 : 16) : 0, "bypass level")
          `CHECK_EQ(yv, vd, "symbol_out_valid (bypass)")
        end
      end
      if (n == 1000) for (int k = 0; k < 3; k++) coeff[32*k +: 32] = $urandom;
      first_half = ~first_half;
      if (first_half) begin
        chip = 1'($urandom);
        chip_valid = 1'($urandom_range(0, 9) != 0);
        if (n % 400 > 340) chip_valid = 0;
      end
      xh.push_front((chip_valid && first_half) ? (chip ? -1 : 1) : 0); void'(xh.pop_back());
      vh.push_front(int'(chip_valid)); void'(vh.pop_back());
      // xh[0] is the sample the next edge registers; after that edge and
      // one more, y uses xh[1..12] as seen at the following check.
      cd = cd1; vd = vd1; cd1 = chip; vd1 = chip_valid;
      @(posedge clk);
    end
    `CHECK(n_sat > 0, "saturation exercised")
    `TB_FINISH
  end
endmodule
