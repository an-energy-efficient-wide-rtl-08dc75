// tb_preamble_detector: checks eta and the detection decision of the
// differential preamble detector against a chip-level reference, for the
// truncated (TRUNC=3) and the full-precision (TRUNC=0) versions.
//
// Chips enter every second clock (en), as in the receiver.  The stream is
// random chips, then a spread DBPSK preamble with a random PLH, then random
// chips; in one part the imaginary rail carries the same signal rotated by
// 90 degrees.  Reference: d(k) is the despread sum of chips k-15..k, a
// truncated to d >>> TRUNC, p_m = a_m re * a_(m-1) re + im * im with a_m
// taken 16 chips apart, eta(k) = sum_m (+/-1 for preamble bit m-1) * p_m.
// After the en that takes chip j the registered eta must be eta(j-3) and
// detected must be eta(j-3) > threshold in the following cycle.  The
// detector must fire at the last chip of each preamble (j-3 = end) and
// never on random chips once the window no longer reaches into a packet.  Correlation side lobes
// inside a packet (PLH field) are allowed; the receiver ignores them while
// it extracts a PLH.
`include "tb_check.svh"
module tb_preamble_detector;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, en = 0, cre = 0, cim = 0;
  logic [15:0] seq = 16'h066B;
  logic [39:0] pre = 40'h2481F1539C;
  logic [7:0] thr = 8'h28, thr0 = 8'd200;
  logic signed [23:0] eta3, eta0; logic det3, det0;
  bit hre [$]; bit him [$]; bit inpkt [$]; bit cur_pkt = 0; int tail = 0;
  int ends [$];
  int n_bad3 = 0, n_bad0 = 0, n_det_bad = 0, n_hit = 0, n_false = 0, n_chips = 0;
  always #5 clk = ~clk;
  preamble_detector #(.LB(16), .W(40), .TRUNC(3)) dut3 (.clk, .reset_n, .en, .chip_re(cre),
    .chip_im(cim), .seq, .preamble(pre), .threshold(thr), .eta(eta3), .detected(det3));
  preamble_detector #(.LB(16), .W(40), .TRUNC(0)) dut0 (.clk, .reset_n, .en, .chip_re(cre),
    .chip_im(cim), .seq, .preamble(pre), .threshold(thr0), .eta(eta0), .detected(det0));

  function automatic int dsp(ref bit h [$], int k);
    int d = 0;
    if (k < -1) return 0;  // history entries still at their reset value
    for (int l = 0; l < 16; l++)
      d += (((k - 15 + l) >= 0 ? h[k - 15 + l] : 1'b0) ^ seq[l]) ? -1 : 1;
    return d;
  endfunction
  function automatic int eta_ref(int k, int tr);
    int e = 0;
    for (int m = 2; m <= 40; m++) begin
      int k1 = k - (40 - m) * 16, k0 = k - (41 - m) * 16;
      int p = (dsp(hre, k1) >>> tr) * (dsp(hre, k0) >>> tr) + (dsp(him, k1) >>> tr) * (dsp(him, k0) >>> tr);
      e += pre[m-1] ? -p : p;
    end
    return e;
  endfunction

  task automatic push(bit r, bit i);
    @(negedge clk); en = 1; cre = r; cim = i;
    hre.push_back(r); him.push_back(i); inpkt.push_back(cur_pkt || tail > 0); if (tail > 0) tail--;
    @(negedge clk); en = 0;
    // en edge for chip j = hre.size()-1 has passed
    begin
      automatic int j = hre.size() - 1;
      automatic int e3 = (j >= 3) ? eta_ref(j - 3, 3) : 0;
      automatic int e0 = (j >= 3) ? eta_ref(j - 3, 0) : 0;
      if (j >= 3) begin
        if (int'(eta3) != e3) n_bad3++;
        if (int'(eta0) != e0) n_bad0++;
      end
      if (det3 !== 1'(e3 > int'(thr))) n_det_bad++;
      if (det3) begin
        if (ends.size() > 0 && (j - 3) == ends[0]) n_hit++;
        else if (!inpkt[j - 3]) n_false++;
      end
      if (ends.size() > 0 && (j - 3) >= ends[0]) void'(ends.pop_front());
    end
  endtask

  initial begin #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      automatic logic [63:0] plh = {32'($urandom), 32'($urandom)};
      repeat (200 + rep * 37) push(1'($urandom), 1'($urandom));
      ends.push_back(hre.size() + 639);
      cur_pkt = 1;
      for (int c = 0; c < 1664; c++) begin
        automatic bit b = ref_chip(pre, plh, seq, '0, c);
        if (rep == 1) push(b, ~b);     // signal on both rails
        else          push(b, 1'b0);   // real signal, imaginary rail silent
      end
      cur_pkt = 0; tail = 640;
    end
    repeat (100) push(1'($urandom), 1'($urandom));
    `CHECK_EQ(n_bad3, 0, "eta mismatches (TRUNC=3)")
    `CHECK_EQ(n_bad0, 0, "eta mismatches (TRUNC=0)")
    `CHECK_EQ(n_det_bad, 0, "detected != (eta > threshold)")
    `CHECK_EQ(n_hit, 3, "detections at the preamble ends")
    `CHECK_EQ(n_false, 0, "detections on random chips")
    `TB_FINISH
  end
endmodule
