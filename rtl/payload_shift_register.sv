// payload_shift_register: appends the pre-spread payload chips to a packet.
//
// On load the register takes the PAYLOAD_CHIPS-bit payload chip sequence;
// while en is high each ce_chip shifts it one place, so chip_out shows the
// chips LSB first, one per chip period.  The payload is already coded and
// spread, so it bypasses the DBPSK modulator and the spreader.  Length
// follows the design; chip order is this design's choice.
module payload_shift_register #(
  parameter int unsigned PAYLOAD_CHIPS = 512
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     ce_chip,
  input  logic                     load,
  input  logic                     en,
  input  logic [PAYLOAD_CHIPS-1:0] payload,
  output logic                     chip_out
);
  logic [PAYLOAD_CHIPS-1:0] sr;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)           sr <= '0;
    else if (load)          sr <= payload;
    else if (ce_chip && en) sr <= {1'b0, sr[PAYLOAD_CHIPS-1:1]};
  end

  assign chip_out = sr[0];
endmodule
