// matching_filter: receive matched filter for one rail (real or imaginary).
//
// A TAPS-tap FIR over the 8-bit samples arriving one per clk_2x_chip cycle,
// with signed 8-bit coefficients packed {coeff_TAPS, ..., coeff_1} (coeff_1
// weights the newest sample).  The full-precision result (OUT_W bits) is
// steered by sample parity: the result for an even sample (en_even) goes to
// out_even, the result for the following odd sample to out_odd, and
// out_valid pulses for one cycle when a pair is complete, i.e. once per
// chip.  With en low the filter is bypassed and the input sample itself is
// steered the same way.  Latency: a sample entering in cycle n is in the
// output register at cycle n+2.  The 12 taps, the register-loaded
// coefficients and the even/odd outputs follow the design; output width and
// bypass are this design's choices.
module matching_filter #(
  parameter int unsigned TAPS  = 12,
  parameter int unsigned OUT_W = 20
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     en,
  input  logic                     en_odd,
  input  logic [TAPS*8-1:0]        coeff,
  input  logic signed [7:0]        din,
  output logic signed [OUT_W-1:0]  out_even,
  output logic signed [OUT_W-1:0]  out_odd,
  output logic                     out_valid
);
  logic signed [7:0]       xs [TAPS];
  logic                    odd_d;
  logic signed [OUT_W-1:0] y;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < TAPS; i++) xs[i] <= '0;
      odd_d <= 1'b0;
    end else begin
      xs[0] <= din;
      for (int i = 1; i < TAPS; i++) xs[i] <= xs[i-1];
      odd_d <= en_odd;
    end
  end

  always_comb begin
    y = '0;
    if (en) begin
      for (int i = 0; i < TAPS; i++)
        y += OUT_W'(signed'(coeff[i*8 +: 8])) * OUT_W'(xs[i]);
    end else begin
      y = OUT_W'(xs[0]);
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      out_even  <= '0;
      out_odd   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= odd_d;
      if (odd_d) out_odd  <= y;
      else       out_even <= y;
    end
  end
endmodule
