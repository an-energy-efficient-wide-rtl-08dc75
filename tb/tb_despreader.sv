// tb_despreader: random chips into the despreader, compared with the
// despreading sum over the last 16 chips (oldest chip with seq[0]).
// Also feeds a clean spread symbol stream and checks the +16/-16 peak at
// the end of each symbol.  Inputs change after the falling edge; en is
// random, so holding is checked too.
`include "tb_check.svh"
module tb_despreader;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, en = 0, cre = 0, cim = 0;
  logic [15:0] seq;
  logic signed [5:0] dre, dim;
  bit hre [$]; bit him [$];
  int n_bad = 0, n_peak = 0;
  always #5 clk = ~clk;
  despreader #(.LB(16)) dut (.clk, .reset_n, .en, .chip_re(cre), .chip_im(cim), .seq,
    .d_re(dre), .d_im(dim));
  function automatic int dsum(bit h [$], logic [15:0] s);
    int d = 0;
    for (int l = 0; l < 16; l++) d += (h[h.size() - 16 + l] ^ s[l]) ? -1 : 1;
    return d;
  endfunction
  initial begin #1000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    seq = 16'h066B;
    for (int i = 0; i < 16; i++) begin hre.push_back(0); him.push_back(0); end
    #1 reset_n = 0; #12 reset_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (int'(dre) != dsum(hre, seq) || int'(dim) != dsum(him, seq)) n_bad++;
      if (n == 2000) seq = 16'($urandom);
      if (n >= 3000 && (n - 3000) % 16 == 0 && dre == ((hre[$] ^ seq[15]) ? -6'sd16 : 6'sd16)) ;
      en = (n >= 3000) ? 1'b1 : 1'($urandom);
      if (n >= 3000) begin
        automatic bit a = ((n - 3000) / 16) % 3 == 1;
        cre = a ^ seq[(n - 3000) % 16]; cim = ~cre;
        if ((n - 3000) % 16 == 0 && n > 3016 && (dre == 16 || dre == -16) && dim == -dre) n_peak++;
      end else begin
        cre = 1'($urandom); cim = 1'($urandom);
      end
      if (en) begin hre.push_back(cre); him.push_back(cim); end
    end
    `CHECK_EQ(n_bad, 0, "despreader sum mismatches")
    `CHECK(n_peak >= 60, $sformatf("full-scale peaks at symbol ends (%0d)", n_peak))
    `TB_FINISH
  end
endmodule
