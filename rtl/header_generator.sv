// header_generator: preamble and PLH shift register of the TX unit.
//
// On load (given at the ce_bit that ends the bit period before a packet)
// the register takes {plh, preamble}; bit_out then shows preamble bit 0
// during the first bit period, and each further ce_bit with en high shifts
// the register one place, so the 40 preamble bits and then the 64 PLH bits
// leave LSB first, one per bit period.  The preamble's first (LSB) bit is
// the differential reference.  Load and shift happen on clk at the bit-rate
// enable.  Length and content follow the design; LSB-first order is this
// design's reading of it.
module header_generator #(
  parameter int unsigned PREAMBLE_BITS = 40,
  parameter int unsigned PLH_BITS      = 64
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     ce_bit,
  input  logic                     load,
  input  logic                     en,
  input  logic [PREAMBLE_BITS-1:0] preamble,
  input  logic [PLH_BITS-1:0]      plh,
  output logic                     bit_out
);
  localparam int unsigned N = PREAMBLE_BITS + PLH_BITS;
  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)          sr <= '0;
    else if (load)         sr <= {plh, preamble};
    else if (ce_bit && en) sr <= {1'b0, sr[N-1:1]};
  end

  assign bit_out = sr[0];
endmodule
