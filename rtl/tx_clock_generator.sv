// tx_clock_generator: derives the chip and bit clocks of the TX chip.
//
// A free-running counter of 2*LB states on clk_2x_chip gives
//   clk_chip = clk_2x_chip / 2      (pin output, high in the first half)
//   clk_bit  = clk_2x_chip / (2*LB) (pin output, high in the first half)
// and the one-cycle enables used inside the core:
//   ce_chip  high in the last clk_2x_chip cycle of every chip period,
//   ce_bit   high in the last clk_2x_chip cycle of every bit period,
//   chip_idx number (0..LB-1) of the chip period within the bit period,
//   first_half high in the first clk_2x_chip cycle of a chip period.
// The derived clocks rise together with the clk_2x_chip edge that starts a
// period.  The frequency ratios (2 and 16) are the design's; driving the
// core with enables in one clock domain, instead of with the derived clocks,
// is this design's choice.  reset_n is asynchronous, active low.
module tx_clock_generator #(
  parameter int unsigned LB = 16
) (
  input  logic                  clk_2x_chip,
  input  logic                  reset_n,
  output logic                  clk_chip,
  output logic                  clk_bit,
  output logic                  ce_chip,
  output logic                  ce_bit,
  output logic                  first_half,
  output logic [$clog2(LB)-1:0] chip_idx
);
  localparam int unsigned CW = $clog2(2 * LB);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk_2x_chip or negedge reset_n) begin
    if (!reset_n) cnt <= '0;
    else          cnt <= cnt + 1'b1;
  end

  assign clk_chip   = ~cnt[0];
  assign clk_bit    = ~cnt[CW-1];
  assign ce_chip    = cnt[0];
  assign ce_bit     = &cnt;
  assign first_half = ~cnt[0];
  assign chip_idx   = cnt[CW-1:1];
endmodule
