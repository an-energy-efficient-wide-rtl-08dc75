// tb_channel_emulator: checks the channel emulator's two stages and their
// enables.
//
// Random ADC and noise samples are applied every cycle.  With both stages
// off the output is the input two cycles later; with awgn_en it is the
// saturated sum with the noise sample given one cycle after the ADC sample;
// with freq_offset_en and frequency_offset 0 the rotation is by angle 0
// (cos = 16/16), so the output again equals the input; with a non-zero
// offset and a constant input the output must rotate: the tb checks that
// the sample magnitude is kept within rounding and that the angle changes.
`include "tb_check.svh"
module tb_channel_emulator;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, awgn = 0, foe = 0, adv = 0;
  logic [11:0] fo = 0;
  logic signed [7:0] are = 0, aim = 0, nre = 0, nim = 0, ore, oim;
  int q_re [$], q_im [$];
  int n_sat = 0, n_bad = 0, n_rot = 0;
  always #5 clk = ~clk;
  channel_emulator dut (.clk, .reset_n, .awgn_en(awgn), .freq_offset_en(foe), .adv,
    .frequency_offset(fo), .adc_re(are), .adc_im(aim), .noise_re(nre), .noise_im(nim),
    .out_re(ore), .out_im(oim));
  function automatic int sat(int v);
    return v > 127 ? 127 : v < -128 ? -128 : v;
  endfunction
  initial begin #1000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  task automatic phase(logic a, logic f, int n);
    awgn = a; foe = f; q_re.delete(); q_im.delete(); n_bad = 0;
    repeat (4) @(negedge clk);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (q_re.size() == 2) begin
        if (int'(ore) != q_re[1] || int'(oim) != q_im[1]) n_bad++;
        void'(q_re.pop_back()); void'(q_im.pop_back());
      end
      are = 8'($urandom); aim = 8'($urandom);
      nre = 8'($urandom_range(0, 80)) - 8'sd40; nim = 8'($urandom_range(0, 80)) - 8'sd40;
      q_re.push_front(int'(are)); q_im.push_front(int'(aim));
      if (a && q_re.size() == 2) begin
        // noise is added in the second stage, one cycle after the ADC sample
        q_re[1] = sat(q_re[1] + int'(nre)); q_im[1] = sat(q_im[1] + int'(nim));
        if (q_re[1] == 127 || q_re[1] == -128) n_sat++;
      end
    end
    `CHECK_EQ(n_bad, 0, $sformatf("output mismatches awgn=%0d rot=%0d", a, f))
  endtask
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    phase(0, 0, 500);
    phase(1, 0, 500);
    `CHECK(n_sat > 0, "noise addition saturates")
    fo = 0; phase(0, 1, 300);  // zero offset: identity rotation
    // non-zero offset, constant input 5.0 + 0j
    fo = 12'd256; foe = 1; awgn = 0; are = 8'sd80; aim = 8'sd0;
    for (int k = 0; k < 64; k++) begin
      automatic int mag2;
      @(negedge clk); adv = ~adv;
      mag2 = int'(ore) * int'(ore) + int'(oim) * int'(oim);
      if (k > 4) begin
        `CHECK(mag2 >= 72 * 72 && mag2 <= 82 * 82, $sformatf("magnitude kept (%0d,%0d)", ore, oim))
        if (oim != 0) n_rot++;
      end
    end
    `CHECK(n_rot > 20, "sample rotated")
    `TB_FINISH
  end
endmodule
