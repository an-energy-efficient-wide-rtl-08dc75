// channel_emulator: controlled channel impairments in front of the receiver.
//
// The 8-bit complex ADC samples (4.4 two's complement, one per clk_2x_chip
// cycle) are first rotated by the symbol rotator (frequency offset, enabled
// by freq_offset_en) and then, when awgn_en is set, the external Gaussian
// noise samples noise_re/noise_im are added with saturation.  A disabled
// stage passes its input unchanged, so the latency is two cycles in every
// mode.  The two stages and their enables follow the design; the noise
// samples come from a separate noise-generator core, and the order (rotation
// before noise, as in r = exp(j(2 pi df t + phi)) s + n) is this design's.
module channel_emulator
  import mote_pkg::*;
(
  input  logic               clk,
  input  logic               reset_n,
  input  logic               awgn_en,
  input  logic               freq_offset_en,
  input  logic               adv,
  input  logic [11:0]        frequency_offset,
  input  logic signed [7:0]  adc_re,
  input  logic signed [7:0]  adc_im,
  input  logic signed [7:0]  noise_re,
  input  logic signed [7:0]  noise_im,
  output logic signed [7:0]  out_re,
  output logic signed [7:0]  out_im
);
  logic signed [7:0] rot_re, rot_im;

  symbol_rotator u_rot (
    .clk, .reset_n, .en(freq_offset_en), .adv, .frequency_offset,
    .in_re(adc_re), .in_im(adc_im), .out_re(rot_re), .out_im(rot_im));

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      out_re <= '0;
      out_im <= '0;
    end else if (awgn_en) begin
      out_re <= sat8(24'(rot_re) + 24'(noise_re));
      out_im <= sat8(24'(rot_im) + 24'(noise_im));
    end else begin
      out_re <= rot_re;
      out_im <= rot_im;
    end
  end
endmodule
