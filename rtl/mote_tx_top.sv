// mote_tx_top: the mote TX chip, a JTAG-configurable baseband packet
// transmitter for asynchronous DSSS packet communication.
//
// Pins follow the chip pinout: clk_2x_chip is the only system clock; the
// clock generator derives clk_chip (/2) and clk_bit (/32) for the pins and
// the chip- and bit-rate enables for the core.  tck/tms/tdi/tdo/trst_n give
// access to the ten JTAG data registers (tx_jtag_top).  A one-cycle
// test_start makes the control unit copy the configuration and send
// total_packet_number packets; test_done then stays high.  Each packet is a
// DBPSK, 16-chip-per-bit DSSS preamble (40 bits) and PLH (64 bits),
// optionally followed by a 512-chip pre-spread payload, leaving as
//   header_bit_out (bit rate), chip_out (chip rate, before shaping) and
//   symbol_out (8-bit, 2x chip rate, after the 12-tap shaping filter),
// each with a valid, plus pkt_sent_ack once per packet.
// The read-only JTAG registers monitor the PLH counter and the shift-register
// enables.  Configuration crosses from tck to clk_2x_chip without
// synchronisers: it must be stable when test_start is given.
module mote_tx_top
  import mote_pkg::*;
(
  input  logic              reset_n,
  input  logic              clk_2x_chip,
  input  logic              tck,
  input  logic              trst_n,
  input  logic              tdi,
  output logic              tdo,
  input  logic              tms,
  input  logic              test_start,
  output logic              test_done,
  output logic              chip_out,
  output logic              chip_out_valid,
  output logic signed [7:0] symbol_out,
  output logic              symbol_out_valid,
  output logic              header_bit_out,
  output logic              header_bit_out_valid,
  output logic              pkt_sent_ack,
  output logic              clk_chip,
  output logic              clk_bit
);
  logic [39:0]  j_preamble;
  logic [15:0]  j_spread, j_spacing, plh_counter;
  logic [63:0]  j_plh;
  logic [31:0]  j_npkt;
  logic [95:0]  j_coeff, filter_coeff;
  logic [511:0] j_payload, payload_seq;
  logic [3:0]   j_mux;
  logic [15:0]  spread_seq;
  logic [103:0] header_word;
  logic         ce_chip, ce_bit, first_half;
  logic [3:0]   chip_idx;
  logic         silent_level, txfilter_en;
  logic         hdr_load, enc_clear, payload_load;
  logic         preamble_sr_en, plh_sr_en, payload_sr_en;
  cu_state_e    cu_state;

  tx_jtag_top u_jtag (
    .tck, .trst_n, .tms, .tdi, .tdo,
    .preamble_sequence(j_preamble), .preamble_spreading_sequence(j_spread),
    .plh_sequence(j_plh), .inter_packet_spacing(j_spacing),
    .total_packet_number(j_npkt), .tx_filter_coeff(j_coeff),
    .payload_chip_sequence(j_payload), .mux_sel(j_mux),
    .plh_sequence_counter(plh_counter),
    .enable_status({payload_sr_en, plh_sr_en, preamble_sr_en}));

  tx_clock_generator #(.LB(16)) u_clkgen (
    .clk_2x_chip, .reset_n, .clk_chip, .clk_bit, .ce_chip, .ce_bit,
    .first_half, .chip_idx);

  tx_control_unit u_ctrl (
    .clk(clk_2x_chip), .reset_n, .ce_bit, .test_start,
    .cfg_preamble(j_preamble), .cfg_spread(j_spread), .cfg_plh(j_plh),
    .cfg_spacing(j_spacing), .cfg_npkt(j_npkt), .cfg_coeff(j_coeff),
    .cfg_payload(j_payload), .cfg_mux_sel(j_mux),
    .spread_seq, .filter_coeff, .payload_seq, .silent_level, .txfilter_en,
    .header_word, .hdr_load, .enc_clear, .payload_load,
    .preamble_sr_en, .plh_sr_en, .payload_sr_en, .pkt_sent_ack, .test_done,
    .plh_counter, .state(cu_state));

  tx_unit u_tx (
    .clk(clk_2x_chip), .reset_n, .ce_bit, .ce_chip, .first_half, .chip_idx,
    .header_word, .spread_seq, .filter_coeff, .payload_seq, .silent_level,
    .txfilter_en, .hdr_load, .enc_clear, .payload_load,
    .preamble_sr_en, .plh_sr_en, .payload_sr_en,
    .header_bit_out, .header_bit_out_valid, .chip_out, .chip_out_valid,
    .symbol_out, .symbol_out_valid);
endmodule
