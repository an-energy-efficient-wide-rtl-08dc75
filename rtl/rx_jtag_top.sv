// rx_jtag_top: JTAG system of the receiver design.
//
// A TAP controller (jtag_tap) with a 4-bit instruction register addresses
// eight data registers: six read/write configuration registers (preamble,
// spreading sequence, correlator threshold, frequency offset, matched-filter
// coefficients, mux_sel) and two read-only monitors (false-alarm and
// missed-packet counters).  Widths and reset defaults are the receiver's
// register table; the IR code of each register is its row in that table
// (0..7), BYPASS is 4'hF.  Everything runs on tck; trst_n restores the
// defaults.  Configuration outputs are quasi-static towards the receive
// clock domain.
module rx_jtag_top
  import mote_pkg::*;
(
  input  logic        tck,
  input  logic        trst_n,
  input  logic        tms,
  input  logic        tdi,
  output logic        tdo,
  output logic [39:0] preamble_sequence,
  output logic [15:0] preamble_spreading_sequence,
  output logic [7:0]  correlator_threshold,
  output logic [11:0] frequency_offset,
  output logic [95:0] rx_filter_coeff,
  output logic [2:0]  mux_sel,
  input  logic [15:0] false_alarm_counter,
  input  logic [15:0] miss_alarm_counter
);
  // data register i is selected by IR value i (see rx_dr_e)
  localparam int unsigned NDR = 8;
  logic [NDR-1:0] sel, dr_tdo;
  logic [3:0]     ir;
  logic           cap, sh, upd;
  logic [15:0]    fa_unused, miss_unused;

  jtag_tap #(.IR_WIDTH(4), .NUM_DR(NDR)) u_tap (
    .tck, .trst_n, .tms, .tdi, .tdo, .ir, .dr_sel(sel),
    .capture_dr(cap), .shift_dr(sh), .update_dr(upd), .dr_tdo
  );

  jtag_dr #(.WIDTH(40), .RESET_VALUE(TX_PREAMBLE_DEF)) u_dr0 (
    .tck, .trst_n, .sel(sel[0]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[0]), .data_in_i('0), .data_out_o(preamble_sequence));
  jtag_dr #(.WIDTH(16), .RESET_VALUE(TX_SPREAD_DEF)) u_dr1 (
    .tck, .trst_n, .sel(sel[1]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[1]), .data_in_i('0), .data_out_o(preamble_spreading_sequence));
  jtag_dr #(.WIDTH(8), .RESET_VALUE(RX_THRESHOLD_DEF)) u_dr2 (
    .tck, .trst_n, .sel(sel[2]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[2]), .data_in_i('0), .data_out_o(correlator_threshold));
  jtag_dr #(.WIDTH(12), .RESET_VALUE(RX_FREQ_OFF_DEF)) u_dr3 (
    .tck, .trst_n, .sel(sel[3]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[3]), .data_in_i('0), .data_out_o(frequency_offset));
  jtag_dr #(.WIDTH(96), .RESET_VALUE(FIR_COEFF_DEF)) u_dr4 (
    .tck, .trst_n, .sel(sel[4]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[4]), .data_in_i('0), .data_out_o(rx_filter_coeff));
  jtag_dr #(.WIDTH(3), .RESET_VALUE(RX_MUX_SEL_DEF)) u_dr5 (
    .tck, .trst_n, .sel(sel[5]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[5]), .data_in_i('0), .data_out_o(mux_sel));
  jtag_dr #(.WIDTH(16), .RESET_VALUE('0), .WRITABLE(1'b0)) u_dr6 (
    .tck, .trst_n, .sel(sel[6]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[6]), .data_in_i(false_alarm_counter), .data_out_o(fa_unused));
  jtag_dr #(.WIDTH(16), .RESET_VALUE('0), .WRITABLE(1'b0)) u_dr7 (
    .tck, .trst_n, .sel(sel[7]), .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(dr_tdo[7]), .data_in_i(miss_alarm_counter), .data_out_o(miss_unused));
endmodule
