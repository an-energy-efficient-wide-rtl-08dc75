// tb_mote_rx_top: drives the RX chip only through its pins: JTAG
// configuration, 8-bit ADC samples at clk_2x_chip, the noise inputs, and
// the 4-bit PLH read-out port.
//
// The tb generates packets itself: spread DBPSK preamble + rate-4 coded
// packet id, two samples per chip of +/-16 (+/-1.0 in 4.4 format), silence
// (0) between packets.  Sequence: ids 0,1,2 with the matched filter off,
// then id 5 (two missed) and a header with a broken codeword (one false
// alarm), then id 6 with the matched filter and noise on.  Each received
// header is read through plh_out (16 read_en pulses) and compared; the
// false-alarm and miss counters are read through JTAG at the end.  A JTAG
// read of the defaults checks the register file wiring.  The threshold is
// raised to 0x50 so that correlation side lobes of the all-zero headers
// right after a packet stay below it.
`include "tb_check.svh"
module tb_mote_rx_top;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk4 = 0, reset_n = 1, read_en = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic signed [7:0] adc_re = 0, adc_im = 0, nre = 0, nim = 0;
  logic [3:0] plh_out; logic ov, rdy, det, rcv, clk2, clkc;
  logic [15:0] seq = 16'h066B; logic [39:0] pre = 40'h2481F1539C;
  logic [63:0] got [$];
  int n_det = 0;
  logic noise_on = 0;
  always #2.5 clk4 = ~clk4;
  jtag_bfm bfm (.tck, .tms, .tdi, .trst_n, .tdo);
  mote_rx_top dut (.clk_4x_chip(clk4), .reset_n, .tck, .trst_n, .tms, .tdi, .tdo, .adc_re,
    .adc_im, .noise_re(nre), .noise_im(nim), .read_en, .plh_out, .plh_out_valid(ov),
    .plh_ready(rdy), .preamble_detected(det), .plh_received(rcv), .clk_2x_chip(clk2),
    .clk_chip(clkc));
  initial begin #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  always @(posedge clk2) begin
    if (det) n_det++;
    nre <= noise_on ? 8'($urandom_range(0, 6)) - 8'sd3 : 8'sd0;
    nim <= noise_on ? 8'($urandom_range(0, 6)) - 8'sd3 : 8'sd0;
  end
  // read-out of every received header
  initial forever begin
    @(posedge clk2);
    if (rdy) begin
      logic [63:0] v;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk2) read_en = 1; @(negedge clk2) read_en = 0;
        v[4*i +: 4] = plh_out;
      end
      got.push_back(v);
    end
  end
  task automatic send(logic [63:0] h);
    repeat (700) @(negedge clk2) adc_re = 0;
    for (int c = 0; c < 1664; c++) begin
      logic signed [7:0] v = ref_chip(pre, h, seq, '0, c) ? -8'sd16 : 8'sd16;
      @(negedge clk2) adc_re = v; @(negedge clk2) adc_re = v;
    end
    repeat (200) @(negedge clk2) adc_re = 0;
  endtask
  task automatic wr(int r, logic [1023:0] v, int n);
    logic [1023:0] o; bfm.scan_ir(1024'(r), 4, o); bfm.scan_dr(v, n, o);
  endtask
  task automatic rd(int r, int n, output logic [1023:0] o);
    logic [1023:0] t;
    // a scan also updates the register, so the value read is written back
    bfm.scan_ir(1024'(r), 4, o); bfm.scan_dr('0, n, o); bfm.scan_dr(o, n, t);
  endtask
  initial begin
    logic [1023:0] o; logic [63:0] bad;
    // the core is held in reset while JTAG scans pass through the registers
    #1 reset_n = 0;
    bfm.reset();
    rd(2, 8, o);  `CHECK_EQ(o[7:0], 8'h28, "threshold default")
    rd(1, 16, o); `CHECK_EQ(o[15:0], 16'h066B, "spreading default")
    // threshold above the side lobes of a mostly-zero PLH after a packet
    wr(2, 1024'(8'h50), 8);
    rd(2, 8, o);  `CHECK_EQ(o[7:0], 8'h50, "threshold written")
    reset_n = 1;
    send(rep4(0)); send(rep4(1)); send(rep4(2));
    send(rep4(5));
    bad = rep4(7); bad[9] = ~bad[9];
    send(bad);
    wr(5, 1024'(3'b011), 3); noise_on = 1;
    send(rep4(6));
    repeat (300) @(negedge clk2);
    `CHECK_EQ(n_det, 6, "detections")
    `CHECK_EQ(got.size(), 6, "headers read")
    if (got.size() == 6) begin
      `CHECK_EQ(got[0], rep4(0), "header 0")
      `CHECK_EQ(got[1], rep4(1), "header 1")
      `CHECK_EQ(got[2], rep4(2), "header 2")
      `CHECK_EQ(got[3], rep4(5), "header 3")
      `CHECK_EQ(got[4], bad, "header 4")
      `CHECK_EQ(got[5], rep4(6), "header 5")
    end
    rd(6, 16, o); `CHECK_EQ(o[15:0], 16'd1, "false alarm counter")
    rd(7, 16, o); `CHECK_EQ(o[15:0], 16'd2, "miss counter")
    `TB_FINISH
  end
endmodule
