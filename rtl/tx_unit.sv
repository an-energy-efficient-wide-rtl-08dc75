// tx_unit: baseband datapath of the mote TX chip.
//
// header_generator (preamble + PLH, one bit per bit period) ->
// differential_encoder (DBPSK) -> spreader (LB chips per bit) -> chip
// register -> tx_filter (2x upsampling, 12-tap FIR) -> symbol_out.
// During the payload field the chip register takes the payload shift
// register instead of the spreader, so the pre-spread payload is appended
// unchanged.  Outputs:
//   header_bit_out / _valid : the header bit of the current bit period;
//   chip_out / _valid       : registered at the end of each chip period, so
//                             a chip appears one chip period after it is
//                             formed;
//   symbol_out / _valid     : two clk_2x_chip cycles after chip_out.
// Outside packets chip_out and header_bit_out rest at silent_level
// (mux_sel[1]) and symbol_out is 0.  All logic is on clk_2x_chip with the
// clock generator's enables.  The chain of sub-blocks is the design's; the
// register placement and the silent-level handling are this design's.
module tx_unit
  import mote_pkg::*;
#(
  parameter int unsigned PREAMBLE_BITS = 40,
  parameter int unsigned PLH_BITS      = 64,
  parameter int unsigned PAYLOAD_CHIPS = 512,
  parameter int unsigned LB            = 16
) (
  input  logic                      clk,
  input  logic                      reset_n,
  input  logic                      ce_bit,
  input  logic                      ce_chip,
  input  logic                      first_half,
  input  logic [$clog2(LB)-1:0]     chip_idx,
  input  logic [PREAMBLE_BITS+PLH_BITS-1:0] header_word,
  input  logic [LB-1:0]             spread_seq,
  input  logic [95:0]               filter_coeff,
  input  logic [PAYLOAD_CHIPS-1:0]  payload_seq,
  input  logic                      silent_level,
  input  logic                      txfilter_en,
  input  logic                      hdr_load,
  input  logic                      enc_clear,
  input  logic                      payload_load,
  input  logic                      preamble_sr_en,
  input  logic                      plh_sr_en,
  input  logic                      payload_sr_en,
  output logic                      header_bit_out,
  output logic                      header_bit_out_valid,
  output logic                      chip_out,
  output logic                      chip_out_valid,
  output logic signed [7:0]         symbol_out,
  output logic                      symbol_out_valid
);
  logic hdr_en, hdr_bit, enc_bit, spread_chip, pl_chip;
  logic chip_q, chip_valid_q;

  assign hdr_en = preamble_sr_en | plh_sr_en;

  header_generator #(.PREAMBLE_BITS(PREAMBLE_BITS), .PLH_BITS(PLH_BITS)) u_hdr (
    .clk, .reset_n, .ce_bit, .load(hdr_load), .en(hdr_en),
    .preamble(header_word[PREAMBLE_BITS-1:0]),
    .plh(header_word[PREAMBLE_BITS+PLH_BITS-1:PREAMBLE_BITS]),
    .bit_out(hdr_bit));

  differential_encoder u_dbpsk (
    .clk, .reset_n, .ce_bit, .clear(enc_clear), .en(hdr_en),
    .bit_in(hdr_bit), .enc_bit);

  spreader #(.LB(LB)) u_spread (
    .seq(spread_seq), .chip_idx, .bit_in(enc_bit), .chip(spread_chip));

  payload_shift_register #(.PAYLOAD_CHIPS(PAYLOAD_CHIPS)) u_payload (
    .clk, .reset_n, .ce_chip, .load(payload_load), .en(payload_sr_en),
    .payload(payload_seq), .chip_out(pl_chip));

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      chip_q       <= 1'b0;
      chip_valid_q <= 1'b0;
    end else if (ce_chip) begin
      chip_q       <= payload_sr_en ? pl_chip : spread_chip;
      chip_valid_q <= hdr_en | payload_sr_en;
    end
  end

  assign header_bit_out       = hdr_en ? hdr_bit : silent_level;
  assign header_bit_out_valid = hdr_en;
  assign chip_out             = chip_valid_q ? chip_q : silent_level;
  assign chip_out_valid       = chip_valid_q;

  tx_filter #(.TAPS(FIR_TAPS), .COEFF_W(8), .OUT_SHIFT(1)) u_filter (
    .clk, .reset_n, .en(txfilter_en), .first_half, .chip(chip_q),
    .chip_valid(chip_valid_q), .coeff(filter_coeff), .symbol_out, .symbol_out_valid);
endmodule
