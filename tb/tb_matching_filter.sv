// tb_matching_filter: random samples through the receive matched filter,
// compared with a reference convolution.
//
// en_odd alternates every cycle (starting with an even sample).  The
// reference keeps the input history; the result for the sample taken at
// edge n (sum_k coeff_k * x[n-k+1], coeff_1 on the newest) must be in
// out_even or out_odd after edge n+1 according to the sample's parity, and
// out_valid must pulse after each odd result.  Also checks bypass (en low:
// the sample itself) with the default and with random coefficients.
`include "tb_check.svh"
module tb_matching_filter;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, en = 1, en_odd = 0;
  logic [95:0] cof;
  logic signed [7:0] din = 0;
  logic signed [19:0] oe, oo; logic ov;
  int xh [$]; int par [$];
  int n_bad = 0, n_val = 0, n_cmp = 0;
  always #5 clk = ~clk;
  matching_filter #(.TAPS(12), .OUT_W(20)) dut (.clk, .reset_n, .en, .en_odd, .coeff(cof),
    .din, .out_even(oe), .out_odd(oo), .out_valid(ov));
  initial begin #1000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    cof = {8'h00,8'hFF,8'h04,8'hF9,8'hF6,8'h34,8'h66,8'h34,8'hF6,8'hF9,8'h04,8'hFF};
    for (int i = 0; i < 16; i++) begin xh.push_front(0); par.push_front(0); end
    #1 reset_n = 0; #12 reset_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // xh[1] is the sample registered one edge before the latest output update
      if (n > 16) begin
        automatic int y = 0;
        if (en) for (int k = 1; k <= 12; k++) y += coef(cof, k) * xh[k];
        else y = xh[1];
        n_cmp++;
        if (par[1]) begin
          if (int'(oo) != y) n_bad++;
          if (!ov) n_bad++; else n_val++;
        end else begin
          if (int'(oe) != y) n_bad++;
          if (ov) n_bad++;
        end
      end
      if (n == 1000) cof = {3{$urandom}};
      if (n == 2000) en = 0;
      din = 8'($urandom); en_odd = ~en_odd;
      xh.push_front(int'(din)); void'(xh.pop_back());
      par.push_front(int'(en_odd)); void'(par.pop_back());
    end
    `CHECK_EQ(n_bad, 0, "filter output / steering mismatches")
    `CHECK(n_val > 1000, "out_valid pulses")
    `TB_FINISH
  end
endmodule
