// despreader: despreads the most recent LB complex chips.
//
// Each rail keeps the last LB received chip signs (bit 1 = -1, bit 0 = +1)
// in a shift register; sr[0] is the oldest chip and pairs with seq[0], the
// first chip of the spreading sequence.  The outputs are
//   d_re = sum_l (+/-1 chip_re[l]) * (+/-1 seq[l]),  likewise d_im,
// formed by an adder tree, range -LB..LB.  A new chip enters at every en;
// d_re/d_im are combinational from the registers and so describe the window
// that ends with the chip taken at the last en.  The despreading sum follows
// the design; the chip order is this design's choice.
module despreader #(
  parameter int unsigned LB = 16
) (
  input  logic                        clk,
  input  logic                        reset_n,
  input  logic                        en,
  input  logic                        chip_re,
  input  logic                        chip_im,
  input  logic [LB-1:0]               seq,
  output logic signed [$clog2(LB)+1:0] d_re,
  output logic signed [$clog2(LB)+1:0] d_im
);
  localparam int unsigned DW = $clog2(LB) + 2;
  logic [LB-1:0] sr_re, sr_im;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      sr_re <= '0;
      sr_im <= '0;
    end else if (en) begin
      sr_re <= {chip_re, sr_re[LB-1:1]};
      sr_im <= {chip_im, sr_im[LB-1:1]};
    end
  end

  always_comb begin
    d_re = '0;
    d_im = '0;
    for (int l = 0; l < LB; l++) begin
      d_re += (sr_re[l] ^ seq[l]) ? -DW'(1) : DW'(1);
      d_im += (sr_im[l] ^ seq[l]) ? -DW'(1) : DW'(1);
    end
  end
endmodule
