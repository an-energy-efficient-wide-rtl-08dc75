// tx_jtag_top: JTAG system of the mote TX chip.
//
// A TAP controller (jtag_tap) with a 4-bit instruction register addresses
// ten data registers.  Eight are read/write configuration registers whose
// working registers drive the chip (preamble, spreading sequence, constant
// PLH, inter-packet spacing, packet count, shaping-filter coefficients,
// payload chips, mux_sel); two are read-only monitors of the PLH sequence
// counter and of the {payload, PLH, preamble} shift-register enables.
// Widths and reset defaults are the chip's register table; the IR code of
// each register is its row in that table (0..9), BYPASS is 4'hF.
// Everything runs on tck; trst_n restores all defaults.  The configuration
// outputs are quasi-static: the core samples them only when a test starts.
module tx_jtag_top
  import mote_pkg::*;
(
  input  logic         tck,
  input  logic         trst_n,
  input  logic         tms,
  input  logic         tdi,
  output logic         tdo,
  output logic [39:0]  preamble_sequence,
  output logic [15:0]  preamble_spreading_sequence,
  output logic [63:0]  plh_sequence,
  output logic [15:0]  inter_packet_spacing,
  output logic [31:0]  total_packet_number,
  output logic [95:0]  tx_filter_coeff,
  output logic [511:0] payload_chip_sequence,
  output logic [3:0]   mux_sel,
  input  logic [15:0]  plh_sequence_counter,
  input  logic [2:0]   enable_status
);
  localparam int unsigned NDR = 10;
  logic [NDR-1:0] sel, dr_tdo;
  logic [3:0]     ir;
  logic           cap, sh, upd;
  logic [15:0]    plh_cnt_unused;
  logic [2:0]     en_status_unused;

  jtag_tap #(.IR_WIDTH(4), .NUM_DR(NDR)) u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo, .ir, .dr_sel(sel),
    .capture_dr(cap), .shift_dr(sh), .update_dr(upd), .dr_tdo
  );

  jtag_dr #(.WIDTH(40), .RESET_VALUE(TX_PREAMBLE_DEF)) u_dr0 (
    .tck, .trst_n, .sel(sel[TXDR_PREAMBLE]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_PREAMBLE]), .data_in_i('0), .data_out_o(preamble_sequence));
  jtag_dr #(.WIDTH(16), .RESET_VALUE(TX_SPREAD_DEF)) u_dr1 (
    .tck, .trst_n, .sel(sel[TXDR_SPREAD]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_SPREAD]), .data_in_i('0), .data_out_o(preamble_spreading_sequence));
  jtag_dr #(.WIDTH(64), .RESET_VALUE(TX_PLH_DEF)) u_dr2 (
    .tck, .trst_n, .sel(sel[TXDR_PLH]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_PLH]), .data_in_i('0), .data_out_o(plh_sequence));
  jtag_dr #(.WIDTH(16), .RESET_VALUE(TX_SPACING_DEF)) u_dr3 (
    .tck, .trst_n, .sel(sel[TXDR_SPACING]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_SPACING]), .data_in_i('0), .data_out_o(inter_packet_spacing));
  jtag_dr #(.WIDTH(32), .RESET_VALUE(TX_NPKT_DEF)) u_dr4 (
    .tck, .trst_n, .sel(sel[TXDR_NPKT]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_NPKT]), .data_in_i('0), .data_out_o(total_packet_number));
  jtag_dr #(.WIDTH(96), .RESET_VALUE(FIR_COEFF_DEF)) u_dr5 (
    .tck, .trst_n, .sel(sel[TXDR_FIR]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_FIR]), .data_in_i('0), .data_out_o(tx_filter_coeff));
  jtag_dr #(.WIDTH(512), .RESET_VALUE(TX_PAYLOAD_DEF)) u_dr6 (
    .tck, .trst_n, .sel(sel[TXDR_PAYLOAD]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_PAYLOAD]), .data_in_i('0), .data_out_o(payload_chip_sequence));
  jtag_dr #(.WIDTH(4), .RESET_VALUE(TX_MUX_SEL_DEF)) u_dr7 (
    .tck, .trst_n, .sel(sel[TXDR_MUX_SEL]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_MUX_SEL]), .data_in_i('0), .data_out_o(mux_sel));
  jtag_dr #(.WIDTH(16), .RESET_VALUE('0), .WRITABLE(1'b0)) u_dr8 (
    .tck, .trst_n, .sel(sel[TXDR_PLH_CNT]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_PLH_CNT]), .data_in_i(plh_sequence_counter), .data_out_o(plh_cnt_unused));
  jtag_dr #(.WIDTH(3), .RESET_VALUE('0), .WRITABLE(1'b0)) u_dr9 (
    .tck, .trst_n, .sel(sel[TXDR_EN_STATUS]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[TXDR_EN_STATUS]), .data_in_i(enable_status), .data_out_o(en_status_unused));
endmodule
