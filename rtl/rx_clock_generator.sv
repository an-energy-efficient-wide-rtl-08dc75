// rx_clock_generator: clocks of the receiver design.
//
// clk_2x_chip is clk_4x_chip divided by two (a toggle flip-flop, so it is
// in phase with the rising edges of clk_4x_chip); clk_chip is clk_2x_chip
// divided by two.  In the clk_2x_chip domain en_even marks the cycle that
// carries the first of the two samples of a chip and en_odd the second;
// clk_chip is high during the even cycle.  The ratios follow the design;
// the even/odd convention is this design's.  On an FPGA this module would be
// replaced by a clock manager.  reset_n is asynchronous, active low.
module rx_clock_generator (
  input  logic clk_4x_chip,
  input  logic reset_n,
  output logic clk_2x_chip,
  output logic clk_chip,
  output logic en_even,
  output logic en_odd
);
  logic phase_q;

  always_ff @(posedge clk_4x_chip or negedge reset_n) begin
    if (!reset_n) clk_2x_chip <= 1'b0;
    else          clk_2x_chip <= ~clk_2x_chip;
  end

  always_ff @(posedge clk_2x_chip or negedge reset_n) begin
    if (!reset_n) phase_q <= 1'b0;
    else          phase_q <= ~phase_q;
  end

  assign en_even  = ~phase_q;
  assign en_odd   = phase_q;
  assign clk_chip = ~phase_q;
endmodule
