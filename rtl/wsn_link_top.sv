// wsn_link_top: the complete baseband link, mote TX chip to receiver.
//
// The transmitter's shaped baseband output (symbol_out, 8-bit, two samples
// per chip) drives the real input of the receiver and the imaginary input is
// zero, as in a wired baseband connection with the RF stages bypassed; the
// receiver's channel emulator then adds the noise (noise_re/noise_im, from
// an external Gaussian source) and frequency offset under test.  The two
// sides keep separate clocks (tx_clk_2x_chip and rx_clk_4x_chip, nominally
// 2:1 apart but not synchronised), separate resets and separate JTAG ports,
// as two boards would.  All TX pins and the RX read-out pins are brought out.
module wsn_link_top (
  // transmitter
  input  logic              tx_reset_n,
  input  logic              tx_clk_2x_chip,
  input  logic              tx_tck,
  input  logic              tx_trst_n,
  input  logic              tx_tms,
  input  logic              tx_tdi,
  output logic              tx_tdo,
  input  logic              test_start,
  output logic              test_done,
  output logic              chip_out,
  output logic              chip_out_valid,
  output logic signed [7:0] symbol_out,
  output logic              symbol_out_valid,
  output logic              header_bit_out,
  output logic              header_bit_out_valid,
  output logic              pkt_sent_ack,
  output logic              tx_clk_chip,
  output logic              tx_clk_bit,
  // receiver
  input  logic              rx_reset_n,
  input  logic              rx_clk_4x_chip,
  input  logic              rx_tck,
  input  logic              rx_trst_n,
  input  logic              rx_tms,
  input  logic              rx_tdi,
  output logic              rx_tdo,
  input  logic signed [7:0] noise_re,
  input  logic signed [7:0] noise_im,
  input  logic              read_en,
  output logic [3:0]        plh_out,
  output logic              plh_out_valid,
  output logic              plh_ready,
  output logic              preamble_detected,
  output logic              plh_received,
  output logic              rx_clk_2x_chip,
  output logic              rx_clk_chip
);
  mote_tx_top u_tx (
    .reset_n(tx_reset_n), .clk_2x_chip(tx_clk_2x_chip), .tck(tx_tck),
    .trst_n(tx_trst_n), .tdi(tx_tdi), .tdo(tx_tdo), .tms(tx_tms),
    .test_start, .test_done, .chip_out, .chip_out_valid, .symbol_out,
    .symbol_out_valid, .header_bit_out, .header_bit_out_valid, .pkt_sent_ack,
    .clk_chip(tx_clk_chip), .clk_bit(tx_clk_bit));

  mote_rx_top u_rx (
    .clk_4x_chip(rx_clk_4x_chip), .reset_n(rx_reset_n), .tck(rx_tck),
    .trst_n(rx_trst_n), .tms(rx_tms), .tdi(rx_tdi), .tdo(rx_tdo),
    .adc_re(symbol_out), .adc_im(8'sd0), .noise_re, .noise_im, .read_en,
    .plh_out, .plh_out_valid, .plh_ready, .preamble_detected, .plh_received,
    .clk_2x_chip(rx_clk_2x_chip), .clk_chip(rx_clk_chip));
endmodule
