// jtag_dr: one JTAG data register (shift register beside a working register).
//
// On capture_dr the shift register is loaded in parallel: a writable register
// captures its own working register, a read-only one captures data_in_i.
// On shift_dr it moves one place towards bit 0, taking tdi into the top bit;
// bit 0 is the serial output.  On update_dr a writable register copies the
// shift register into the working register (data_out_o).  All strobes only
// act while sel is high.  Everything is clocked on the rising edge of tck;
// trst_n loads RESET_VALUE asynchronously, so the register holds its
// documented default after a JTAG reset.  The structure (shadow shift
// register beside a parallel working register) follows the design; LSB-first
// shifting is the usual JTAG convention.
module jtag_dr #(
  parameter int unsigned        WIDTH       = 16,
  parameter logic [WIDTH-1:0]   RESET_VALUE = '0,
  parameter bit                 WRITABLE    = 1'b1
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             sel,
  input  logic             capture_dr,
  input  logic             shift_dr,
  input  logic             update_dr,
  input  logic             tdi,
  output logic             tdo,
  input  logic [WIDTH-1:0] data_in_i,
  output logic [WIDTH-1:0] data_out_o
);
  logic [WIDTH-1:0] shift_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      shift_q <= RESET_VALUE;
    end else if (sel && capture_dr) begin
      shift_q <= WRITABLE ? data_out_o : data_in_i;
    end else if (sel && shift_dr) begin
      shift_q <= (shift_q >> 1) | (WIDTH'(tdi) << (WIDTH - 1));
    end
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                              data_out_o <= RESET_VALUE;
    else if (WRITABLE && sel && update_dr)    data_out_o <= shift_q;
  end

  assign tdo = shift_q[0];
endmodule
