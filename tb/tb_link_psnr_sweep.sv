// tb_link_psnr_sweep: measures the preamble miss count of the link against
// the preamble SNR and against the frequency offset, with the receiver's
// own channel emulator adding the noise and the offset.
//
// The TX chip sends packets (shaping filter bypassed, so a chip is +/-1.0);
// the tb scales symbol_out by the chip amplitude A_c before it reaches the
// RX ADC, standing for the path loss, and drives the RX noise inputs with
// Gaussian samples of unit power per rail (Box-Muller from $urandom,
// 4.4 fixed point, so sigma = 16 LSB).  Then cSNR = 10log(A_c^2/2),
// sSNR = cSNR + 10log16 and pSNR = sSNR + 10log40: A_c = 5/16 gives 14.9 dB,
// 8/16 19.0 dB, 12/16 22.5 dB and 15/16 24.4 dB.  The frequency sweep runs
// at 24.4 dB with frequency_offset 0, 4, 8 and 16 (df*Tc = 0, 0.001, 0.002,
// 0.004).  For each point NPKT packets are sent; a packet counts as
// received when its id arrives through the PLH read-out port, and the
// false-alarm counter is read through JTAG.  The threshold stays fixed at
// the register default (the source adjusts it per point for a constant
// false-alarm rate, which a short simulation cannot estimate).  With
// sign-only detector inputs and this threshold the receiver needs more SNR
// than the two-bit detector of the source: with 12 packets per point about
// a sixth to a third are missed at 24.4 dB, most at 22.5 dB and all at 19 dB
// and below; false alarms, each of which blocks the detector for a packet
// length, account for most misses at the higher SNRs.
// Checks: at 24.4 dB at most half the packets are missed; the lowest pSNR
// misses at least as many as the highest; an offset of df*Tc = 0.001
// misses at most three more packets than no offset.  The miss and
// false-alarm counts of all points are printed.
`include "tb_check.svh"
module tb_link_psnr_sweep;
  import mote_pkg::*;
  import mote_ref_pkg::*;
  localparam int NPKT = 12;
  localparam logic [7:0] THR = RX_THRESHOLD_DEF;
  int checks = 0, failures = 0;
  logic tx_clk = 0, rx_clk = 0, tx_reset_n = 1, rx_reset_n = 1, test_start = 0, read_en = 0;
  logic ttck, ttms, ttdi, ttrst_n, ttdo, rtck, rtms, rtdi, rtrst_n, rtdo;
  logic test_done, chip_out, chip_out_valid, sov, hb, hbv, ack, tclk_chip, tclk_bit;
  logic signed [7:0] symbol_out, adc_re, noise_re = 0, noise_im = 0;
  logic [3:0] plh_out; logic ov, rdy, pdet, prcv, rclk2, rclkc;
  int amp = 16;           // chip amplitude in 1/16
  bit noise_on = 0;
  logic [63:0] rx_plh [$];

  always #5 tx_clk = ~tx_clk;
  initial begin #1.3; forever #2.5 rx_clk = ~rx_clk; end

  jtag_bfm tx_jtag (.tck(ttck), .tms(ttms), .tdi(ttdi), .trst_n(ttrst_n), .tdo(ttdo));
  jtag_bfm rx_jtag (.tck(rtck), .tms(rtms), .tdi(rtdi), .trst_n(rtrst_n), .tdo(rtdo));
  mote_tx_top u_tx (.reset_n(tx_reset_n), .clk_2x_chip(tx_clk), .tck(ttck), .trst_n(ttrst_n),
    .tdi(ttdi), .tdo(ttdo), .tms(ttms), .test_start, .test_done, .chip_out, .chip_out_valid,
    .symbol_out, .symbol_out_valid(sov), .header_bit_out(hb), .header_bit_out_valid(hbv),
    .pkt_sent_ack(ack), .clk_chip(tclk_chip), .clk_bit(tclk_bit));
  // path loss: amplitude scaled to A_c (symbol_out is +/-16 in bypass)
  assign adc_re = 8'((int'(symbol_out) * amp) / 16);
  mote_rx_top u_rx (.clk_4x_chip(rx_clk), .reset_n(rx_reset_n), .tck(rtck), .trst_n(rtrst_n),
    .tms(rtms), .tdi(rtdi), .tdo(rtdo), .adc_re, .adc_im(8'sd0), .noise_re, .noise_im,
    .read_en, .plh_out, .plh_out_valid(ov), .plh_ready(rdy), .preamble_detected(pdet),
    .plh_received(prcv), .clk_2x_chip(rclk2), .clk_chip(rclkc));

  initial begin #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic signed [7:0] gauss16();
    real u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    real u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    real g = $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2) * 16.0;
    int v = int'(g);
    return 8'(v > 127 ? 127 : v < -128 ? -128 : v);
  endfunction
  always @(posedge rclk2) begin
    noise_re <= noise_on ? gauss16() : 8'sd0;
    noise_im <= noise_on ? gauss16() : 8'sd0;
  end

  initial forever begin
    @(posedge rclk2);
    if (rdy && rx_reset_n) begin
      logic [63:0] v;
      for (int i = 0; i < 16; i++) begin
        @(negedge rclk2) read_en = 1; @(negedge rclk2) read_en = 0;
        v[4*i +: 4] = plh_out;
      end
      rx_plh.push_back(v);
    end
  end

  task automatic tx_wr(int r, logic [1023:0] v, int n);
    logic [1023:0] o; tx_jtag.scan_ir(1024'(r), 4, o); tx_jtag.scan_dr(v, n, o);
  endtask
  task automatic rx_wr(int r, logic [1023:0] v, int n);
    logic [1023:0] o; rx_jtag.scan_ir(1024'(r), 4, o); rx_jtag.scan_dr(v, n, o);
  endtask
  task automatic rx_rd(int r, int n, output logic [15:0] val);
    logic [1023:0] o; rx_jtag.scan_ir(1024'(r), 4, o); rx_jtag.scan_dr('0, n, o); val = o[15:0];
  endtask

  // one measurement point; returns the number of missed packets
  task automatic point(int a, logic [11:0] fo, output int miss, output int fa);
    bit seen [NPKT];
    logic [15:0] fa16;
    amp = a;
    rx_reset_n = 0;
    rx_wr(RXDR_THRESHOLD, 1024'(THR), 8);
    rx_wr(3, 1024'(fo), 12);
    rx_wr(5, 1024'({fo != 0, 1'b1, 1'b0}), 3);
    noise_on = 1;
    rx_plh.delete();
    #100 rx_reset_n = 1;
    @(negedge tx_clk) test_start = 1; @(negedge tx_clk) test_start = 0;
    wait (test_done);
    #40000;
    for (int i = 0; i < NPKT; i++) seen[i] = 0;
    foreach (rx_plh[i])
      for (int k = 0; k < NPKT; k++) if (rx_plh[i] == rep4(16'(k))) seen[k] = 1;
    miss = 0;
    for (int k = 0; k < NPKT; k++) if (!seen[k]) miss++;
    rx_rd(6, 16, fa16); fa = int'(fa16);
    $display("point A_c=%0d/16 frequency_offset=%0d: missed %0d of %0d, false alarms %0d",
             a, fo, miss, NPKT, fa);
  endtask

  initial begin
    int m [4]; int f [4]; int mf [4]; int ff [4];
    int amps [4] = '{5, 8, 12, 15};
    int fos [4] = '{0, 4, 8, 16};
    #1 tx_reset_n = 0; rx_reset_n = 0;
    #30 tx_reset_n = 1;
    fork tx_jtag.reset(); rx_jtag.reset(); join
    tx_wr(TXDR_NPKT, 1024'(NPKT), 32);
    tx_wr(TXDR_SPACING, 1024'(1), 16);
    tx_wr(TXDR_MUX_SEL, 1024'(4'b0000), 4);
    for (int i = 0; i < 4; i++) point(amps[i], 12'd0, m[i], f[i]);
    for (int i = 0; i < 4; i++) point(15, 12'(fos[i]), mf[i], ff[i]);
    `CHECK(m[3] <= NPKT / 2, "at most half the packets missed at 24.4 dB")
    `CHECK(m[0] >= m[3], "misses do not fall with lower pSNR")
    `CHECK(mf[1] <= mf[0] + 3, "offset df*Tc = 0.001 costs at most three packets")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
