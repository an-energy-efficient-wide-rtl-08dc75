// spreader: direct-sequence spreading of the DBPSK bits.
//
// Each encoded bit is multiplied by the LB-chip spreading sequence: chip j
// of a bit period is bit_in XOR seq[j] (bit 0 = +1, bit 1 = -1), with
// chip_idx (0..LB-1, from the clock generator) selecting the chip.  seq[0]
// is the first chip of every bit.  The output is combinational; the TX unit
// registers it once per chip period.  The spreading rule is the design's,
// the chip order is this design's choice.
module spreader #(
  parameter int unsigned LB = 16
) (
  input  logic [LB-1:0]         seq,
  input  logic [$clog2(LB)-1:0] chip_idx,
  input  logic                  bit_in,
  output logic                  chip
);
  assign chip = bit_in ^ seq[chip_idx];
endmodule
