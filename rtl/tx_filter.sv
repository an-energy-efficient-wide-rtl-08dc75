// tx_filter: chip pulse-shaping filter of the TX unit.
//
// Runs at clk_2x_chip.  The chip stream is upsampled by two with zero
// insertion: in the first clk_2x_chip cycle of a chip period the filter
// input is +1 for chip bit 0 or -1 for chip bit 1, in the second cycle it
// is 0, and it is 0 whenever no packet chip is valid.  The samples pass a
// TAPS-tap FIR whose signed 8-bit coefficients come from coeff packed as
// {coeff_TAPS, ..., coeff_1}; coeff_1 weights the newest sample.  The sum is
// shifted right by OUT_SHIFT and saturated to the 8-bit symbol_out.
// symbol_out_valid is high while any packet sample is inside the filter
// window, so it covers the filter tail.  With en low the filter is bypassed
// and symbol_out is +16 / -16 (+/-1.0 in 4.4 fixed point) on both samples
// of a chip.  Latency: a chip presented in cycle n reaches symbol_out in
// cycle n+2.  Upsampling by two and the 12-tap FIR with register-loaded
// coefficients follow the design; the zero insertion, output scaling and
// bypass level are this design's choices.
module tx_filter
  import mote_pkg::*;
#(
  parameter int unsigned TAPS      = 12,
  parameter int unsigned COEFF_W   = 8,
  parameter int unsigned OUT_SHIFT = 1
) (
  input  logic                      clk,
  input  logic                      reset_n,
  input  logic                      en,
  input  logic                      first_half,
  input  logic                      chip,
  input  logic                      chip_valid,
  input  logic [TAPS*COEFF_W-1:0]   coeff,
  output logic signed [7:0]         symbol_out,
  output logic                      symbol_out_valid
);
  logic signed [1:0] xs [TAPS];
  logic [TAPS-1:0]   vs;
  logic              chip_d, valid_d;
  logic signed [1:0] x_in;
  logic signed [23:0] acc;

  always_comb begin
    if (chip_valid && first_half) x_in = chip ? -2'sd1 : 2'sd1;
    else                          x_in = 2'sd0;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < TAPS; i++) xs[i] <= '0;
      vs      <= '0;
      chip_d  <= 1'b0;
      valid_d <= 1'b0;
    end else begin
      xs[0] <= x_in;
      for (int i = 1; i < TAPS; i++) xs[i] <= xs[i-1];
      vs      <= {vs[TAPS-2:0], chip_valid};
      chip_d  <= chip;
      valid_d <= chip_valid;
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++)
      acc += 24'(signed'(coeff[i*COEFF_W +: COEFF_W])) * 24'(xs[i]);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      symbol_out       <= '0;
      symbol_out_valid <= 1'b0;
    end else if (en) begin
      symbol_out       <= sat8(acc >>> OUT_SHIFT);
      symbol_out_valid <= |vs;
    end else begin
      symbol_out       <= valid_d ? (chip_d ? -8'sd16 : 8'sd16) : 8'sd0;
      symbol_out_valid <= valid_d;
    end
  end
endmodule
