// mote_rx_top: baseband receiver with preamble detection and PLH recovery.
//
// Samples from the two interleaved ADCs (8-bit 4.4 complex, two per chip)
// are registered on clk_2x_chip, pass the channel emulator (frequency
// offset and additive noise, each switchable through mux_sel[2]/[1]), a
// pair of 12-tap matched filters (real and imaginary rails, switchable
// through mux_sel[0]) that split every chip into an even and an odd sample,
// and the RX unit, which runs one preamble detector per sample phase and
// extracts the 64-bit PLH behind a detected preamble.  The PLH is buffered
// for 4-bit read-out (read_en) and checked by the packet monitor, whose
// false-alarm and missed-packet counters are readable over JTAG together
// with the configuration registers (preamble, spreading sequence,
// correlator threshold, frequency offset, filter coefficients, mux_sel).
// Clocks: clk_4x_chip is the reference; all logic runs on the derived
// clk_2x_chip (also an output), the detectors once per chip.  Noise samples
// noise_re/noise_im come from an external Gaussian noise core, one per
// clk_2x_chip cycle.  JTAG configuration is quasi-static (no synchronisers).
module mote_rx_top
  import mote_pkg::*;
#(
  parameter int unsigned TRUNC = 3
) (
  input  logic              clk_4x_chip,
  input  logic              reset_n,
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tms,
  input  logic              tdi,
  output logic              tdo,
  input  logic signed [7:0] adc_re,
  input  logic signed [7:0] adc_im,
  input  logic signed [7:0] noise_re,
  input  logic signed [7:0] noise_im,
  input  logic              read_en,
  output logic [3:0]        plh_out,
  output logic              plh_out_valid,
  output logic              plh_ready,
  output logic              preamble_detected,
  output logic              plh_received,
  output logic              clk_2x_chip,
  output logic              clk_chip
);
  logic [39:0] preamble;
  logic [15:0] seq;
  logic [7:0]  threshold;
  logic [11:0] freq_off;
  logic [95:0] coeff;
  logic [2:0]  mux_sel;
  logic [15:0] fa_cnt, miss_cnt, good_cnt, last_id;
  logic        en_even, en_odd;
  logic signed [7:0]  adc_re_q, adc_im_q, ch_re, ch_im;
  logic signed [19:0] mre_e, mre_o, mim_e, mim_o;
  logic               mf_valid, mf_valid_im;
  logic               detect_path;
  logic [1:0]         path_detect;
  logic signed [23:0] eta_even, eta_odd;
  logic [63:0]        plh;

  rx_clock_generator u_clk (
    .clk_4x_chip, .reset_n, .clk_2x_chip, .clk_chip, .en_even, .en_odd);

  rx_jtag_top u_jtag (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .preamble_sequence(preamble), .preamble_spreading_sequence(seq),
    .correlator_threshold(threshold), .frequency_offset(freq_off),
    .rx_filter_coeff(coeff), .mux_sel,
    .false_alarm_counter(fa_cnt), .miss_alarm_counter(miss_cnt));

  // ADC sample register
  always_ff @(posedge clk_2x_chip or negedge reset_n) begin
    if (!reset_n) begin
      adc_re_q <= '0;
      adc_im_q <= '0;
    end else begin
      adc_re_q <= adc_re;
      adc_im_q <= adc_im;
    end
  end

  channel_emulator u_chan (
    .clk(clk_2x_chip), .reset_n, .awgn_en(mux_sel[MUX_AWGN_EN]),
    .freq_offset_en(mux_sel[MUX_FREQOFF_EN]), .adv(en_odd),
    .frequency_offset(freq_off), .adc_re(adc_re_q), .adc_im(adc_im_q),
    .noise_re, .noise_im, .out_re(ch_re), .out_im(ch_im));

  matching_filter #(.TAPS(FIR_TAPS), .OUT_W(20)) u_mf_re (
    .clk(clk_2x_chip), .reset_n, .en(mux_sel[MUX_RXFILTER_EN]), .en_odd,
    .coeff, .din(ch_re), .out_even(mre_e), .out_odd(mre_o), .out_valid(mf_valid));

  matching_filter #(.TAPS(FIR_TAPS), .OUT_W(20)) u_mf_im (
    .clk(clk_2x_chip), .reset_n, .en(mux_sel[MUX_RXFILTER_EN]), .en_odd,
    .coeff, .din(ch_im), .out_even(mim_e), .out_odd(mim_o), .out_valid(mf_valid_im));

  rx_unit #(.LB(16), .W(40), .PLH_BITS(64), .TRUNC(TRUNC), .IN_W(20)) u_rx (
    .clk(clk_2x_chip), .reset_n, .en(mf_valid),
    .even_re(mre_e), .even_im(mim_e), .odd_re(mre_o), .odd_im(mim_o),
    .seq, .preamble, .threshold, .preamble_detected, .detect_path, .path_detect,
    .eta_even, .eta_odd, .plh_received, .plh);

  plh_buffer #(.PLH_BITS(64), .OUT_W(4)) u_buf (
    .clk(clk_2x_chip), .reset_n, .load(plh_received), .plh_in(plh),
    .read_en, .plh_out, .plh_out_valid, .plh_ready);

  packet_monitor #(.PLH_BITS(64)) u_mon (
    .clk(clk_2x_chip), .reset_n, .plh_received, .plh,
    .false_alarm_counter(fa_cnt), .miss_alarm_counter(miss_cnt),
    .good_packets(good_cnt), .last_id);

  // both rails of the matched filter move in lock step
  assert property (@(posedge clk_2x_chip) disable iff (!reset_n) mf_valid == mf_valid_im);
endmodule
