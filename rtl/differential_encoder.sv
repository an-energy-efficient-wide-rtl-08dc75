// differential_encoder: DBPSK modulator of the TX unit.
//
// Implements a_m = c_m * a_(m-1) on bits, where bit 0 stands for +1 and
// bit 1 for -1, so the product is an XOR: a_m = c_m ^ a_(m-1).  enc_bit is
// the encoded bit for the header bit presented on bit_in during the current
// bit period (combinational from the stored previous symbol).  At ce_bit
// the stored symbol takes enc_bit while en is high; clear (asserted with
// the load of a new packet) restores a_0 = +1 so that a_1 = c_1, as the
// scheme defines.  The bit mapping is this design's choice.
module differential_encoder (
  input  logic clk,
  input  logic reset_n,
  input  logic ce_bit,
  input  logic clear,
  input  logic en,
  input  logic bit_in,
  output logic enc_bit
);
  logic a_prev;

  assign enc_bit = bit_in ^ a_prev;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)          a_prev <= 1'b0;
    else if (clear)        a_prev <= 1'b0;
    else if (ce_bit && en) a_prev <= enc_bit;
  end
endmodule
