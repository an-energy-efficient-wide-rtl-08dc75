// tb_symbol_rotator: checks the frequency-offset rotator against a
// reference built from $sin/$cos.
//
// The reference table is round(16*sin(2*pi*i/16)) and the cosine one
// quarter turn ahead; the reference phase accumulator adds
// frequency_offset at each adv.  Random samples (including full-scale ones
// that saturate) and random adv are applied; one cycle later out_re/out_im
// must equal sat8((re*cos - im*sin) >>> 4) and sat8((re*sin + im*cos) >>> 4)
// for the phase before the update.  With en low the output must equal the
// input delayed by one cycle and the phase must restart from zero.
`include "tb_check.svh"
module tb_symbol_rotator;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, en = 1, adv = 0;
  logic [11:0] fo;
  logic signed [7:0] ire = 0, iim = 0, ore, oim;
  int ph = 0, ers = 0, eim = 0, n_sat = 0;
  int st [16];
  always #5 clk = ~clk;
  symbol_rotator #(.PHASE_W(12), .LUT_ENTRIES(16)) dut (.clk, .reset_n, .en, .adv,
    .frequency_offset(fo), .in_re(ire), .in_im(iim), .out_re(ore), .out_im(oim));
  function automatic int sat(int v);
    return v > 127 ? 127 : v < -128 ? -128 : v;
  endfunction
  initial begin #1000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    for (int i = 0; i < 16; i++) st[i] = int'($floor(16.0 * $sin(2.0 * 3.14159265358979 * i / 16.0) + 0.5));
    fo = 12'd37;
    #1 reset_n = 0; #12 reset_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int s, c;
      @(negedge clk);
      if (n > 0) begin
        `CHECK_EQ(int'(ore), ers, $sformatf("out_re n=%0d", n))
        `CHECK_EQ(int'(oim), eim, $sformatf("out_im n=%0d", n))
      end
      if (n == 1000) fo = 12'd611;
      if (n == 2000) en = 0;
      if (n == 2500) en = 1;
      ire = 8'($urandom); iim = 8'($urandom); adv = 1'($urandom);
      s = st[ph / 256]; c = st[(ph / 256 + 4) % 16];
      if (en) begin
        ers = sat((int'(ire) * c - int'(iim) * s) >>> 4);
        eim = sat((int'(ire) * s + int'(iim) * c) >>> 4);
        if (ers == 127 || ers == -128) n_sat++;
        if (adv) ph = (ph + int'(fo)) % 4096;
      end else begin
        ers = int'(ire); eim = int'(iim); ph = 0;
      end
    end
    `CHECK(n_sat > 0, "saturation exercised")
    `TB_FINISH
  end
endmodule
