// jtag_tap: IEEE 1149.1 test access port controller with instruction register.
//
// tms is sampled on the rising edge of tck and steps the 16-state TAP state
// machine.  The instruction register (IR_WIDTH bits) is captured with
// 4'b0001, shifted LSB first and updated in Update-IR; its value addresses
// data register number <IR> directly (dr_sel is one-hot over NUM_DR
// registers), and any value without a register selects a 1-bit BYPASS
// register.  capture_dr / shift_dr / update_dr are level strobes that are
// true while the state machine is in the matching state; the addressed data
// register acts on them at the next rising tck edge.  tdo is re-timed on the
// falling edge of tck, as the design requires, and is 0 outside Shift-DR and
// Shift-IR.  trst_n resets asynchronously to Test-Logic-Reset with BYPASS in
// the IR.  The state machine is the standard one; the IR capture value, the
// BYPASS code and the direct IR-to-register addressing are this design's
// choices.
module jtag_tap
  import mote_pkg::*;
#(
  parameter int unsigned IR_WIDTH = 4,
  parameter int unsigned NUM_DR   = 10
) (
  input  logic                tck,
  input  logic                trst_n,
  input  logic                tms,
  input  logic                tdi,
  output logic                tdo,
  output logic [IR_WIDTH-1:0] ir,
  output logic [NUM_DR-1:0]   dr_sel,
  output logic                capture_dr,
  output logic                shift_dr,
  output logic                update_dr,
  input  logic [NUM_DR-1:0]   dr_tdo
);
  tap_state_e state, state_nx;
  logic [IR_WIDTH-1:0] ir_shift;
  logic                bypass_q;
  logic                tdo_mux;

  always_comb begin
    unique case (state)
      TAP_RESET:      state_nx = tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       state_nx = tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_DR:  state_nx = tms ? TAP_SELECT_IR : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: state_nx = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   state_nx = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   state_nx = tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   state_nx = tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   state_nx = tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  state_nx = tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_IR:  state_nx = tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: state_nx = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   state_nx = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   state_nx = tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   state_nx = tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   state_nx = tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  state_nx = tms ? TAP_SELECT_DR : TAP_IDLE;
      default:        state_nx = TAP_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TAP_RESET;
    else         state <= state_nx;
  end

  // instruction register: shift stage and update stage
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_shift <= '1;
      ir       <= '1;
    end else begin
      unique case (state)
        TAP_RESET:      ir <= '1;
        TAP_CAPTURE_IR: ir_shift <= IR_WIDTH'(1);
        TAP_SHIFT_IR:   ir_shift <= {tdi, ir_shift[IR_WIDTH-1:1]};
        TAP_UPDATE_IR:  ir <= ir_shift;
        default: ;
      endcase
    end
  end

  assign capture_dr = (state == TAP_CAPTURE_DR);
  assign shift_dr   = (state == TAP_SHIFT_DR);
  assign update_dr  = (state == TAP_UPDATE_DR);

  always_comb begin
    dr_sel = '0;
    for (int i = 0; i < NUM_DR; i++)
      dr_sel[i] = (ir == IR_WIDTH'(i));
  end

  // BYPASS register
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                       bypass_q <= 1'b0;
    else if (capture_dr && !(|dr_sel)) bypass_q <= 1'b0;
    else if (shift_dr && !(|dr_sel))   bypass_q <= tdi;
  end

  always_comb begin
    tdo_mux = bypass_q;
    for (int i = 0; i < NUM_DR; i++)
      if (dr_sel[i]) tdo_mux = dr_tdo[i];
    if (state == TAP_SHIFT_IR)       tdo_mux = ir_shift[0];
    else if (state != TAP_SHIFT_DR)  tdo_mux = 1'b0;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_mux;
  end
endmodule
