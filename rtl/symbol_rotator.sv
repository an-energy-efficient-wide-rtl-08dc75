// symbol_rotator: frequency-offset emulation for the channel emulator.
//
// Multiplies each complex 8-bit sample (4.4 two's complement) by
// exp(j*2*pi*df*Tc*k).  frequency_offset is df*Tc in units of 1/4096 cycle;
// a 12-bit phase accumulator adds it once per chip (adv) and its top four
// bits address a 16-entry sin/cos table (4.4 fixed point):
//   out_re = in_re*cos - in_im*sin,  out_im = in_re*sin + in_im*cos,
// each product shifted right by 4 and saturated to 8 bits, registered.
// With en low the sample passes unchanged (one register) and the phase is
// held at zero.  Latency is one clk cycle.  The table, the 12-bit offset and
// the 4.4 formats follow the design; the accumulator scaling is this
// design's reading of it.
module symbol_rotator
  import mote_pkg::*;
#(
  parameter int unsigned PHASE_W     = 12,
  parameter int unsigned LUT_ENTRIES = 16
) (
  input  logic                clk,
  input  logic                reset_n,
  input  logic                en,
  input  logic                adv,
  input  logic [PHASE_W-1:0]  frequency_offset,
  input  logic signed [7:0]   in_re,
  input  logic signed [7:0]   in_im,
  output logic signed [7:0]   out_re,
  output logic signed [7:0]   out_im
);
  localparam int unsigned IW = $clog2(LUT_ENTRIES);
  logic [PHASE_W-1:0] phase;
  logic [3:0]         idx;
  logic signed [7:0]  s, c;
  logic signed [23:0] re_full, im_full;

  assign idx = 4'(phase[PHASE_W-1 -: IW]);
  assign s   = signed'(rot_sin(idx));
  assign c   = signed'(rot_cos(idx));

  always_comb begin
    re_full = (24'(in_re) * 24'(c) - 24'(in_im) * 24'(s)) >>> 4;
    im_full = (24'(in_re) * 24'(s) + 24'(in_im) * 24'(c)) >>> 4;
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      phase  <= '0;
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      if (adv) phase <= phase + frequency_offset;
      out_re <= sat8(re_full);
      out_im <= sat8(im_full);
    end else begin
      phase  <= '0;
      out_re <= in_re;
      out_im <= in_im;
    end
  end
endmodule
