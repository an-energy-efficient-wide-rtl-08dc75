// mote_pkg: constants and types shared by the mote transmitter and receiver.
//
// Holds the filter length, the reset defaults of the JTAG data
// registers of both the TX chip and the RX design, the mux_sel bit
// positions, and the 16-entry sin/cos table of the symbol rotator.
// The numbers are those of the design's register tables; the register index
// assignment (row order of the tables) is this design's choice.
package mote_pkg;

  // ---------------- filter geometry ----------------
  // (16 chips per bit, 40 preamble bits, 64 PLH bits and 512 payload
  // chips are the defaults of the module parameters that carry them)
  localparam int unsigned FIR_TAPS      = 12;

  // ---------------- TX JTAG register defaults ----------------
  localparam logic [39:0]  TX_PREAMBLE_DEF   = 40'h2481F1539C;
  localparam logic [15:0]  TX_SPREAD_DEF     = 16'h066B;
  localparam logic [63:0]  TX_PLH_DEF        = 64'h00FF00F0000F0000;
  localparam logic [15:0]  TX_SPACING_DEF    = 16'h0000;
  localparam logic [31:0]  TX_NPKT_DEF       = 32'h00F00000;
  // {coeff_12, ..., coeff_1}
  localparam logic [95:0]  FIR_COEFF_DEF     = {8'h00, 8'hFF, 8'h04, 8'hF9,
                                                8'hF6, 8'h34, 8'h66, 8'h34,
                                                8'hF6, 8'hF9, 8'h04, 8'hFF};
  localparam logic [511:0] TX_PAYLOAD_DEF    = {8{64'h222222DDDD22DD22}};
  localparam logic [3:0]   TX_MUX_SEL_DEF    = 4'hC;

  // TX mux_sel bits
  localparam int unsigned MUX_CONSTANT_PLH = 0;
  localparam int unsigned MUX_SILENT_LEVEL = 1;
  localparam int unsigned MUX_TXFILTER_EN  = 2;
  localparam int unsigned MUX_PAYLOAD_EN   = 3;

  // TX data register indices (instruction register values)
  typedef enum logic [3:0] {
    TXDR_PREAMBLE   = 4'd0,
    TXDR_SPREAD     = 4'd1,
    TXDR_PLH        = 4'd2,
    TXDR_SPACING    = 4'd3,
    TXDR_NPKT       = 4'd4,
    TXDR_FIR        = 4'd5,
    TXDR_PAYLOAD    = 4'd6,
    TXDR_MUX_SEL    = 4'd7,
    TXDR_PLH_CNT    = 4'd8,
    TXDR_EN_STATUS  = 4'd9,
    TXDR_BYPASS     = 4'hF
  } tx_dr_e;

  // ---------------- RX JTAG register defaults ----------------
  localparam logic [7:0]  RX_THRESHOLD_DEF  = 8'h28;
  localparam logic [11:0] RX_FREQ_OFF_DEF   = 12'h000;
  localparam logic [2:0]  RX_MUX_SEL_DEF    = 3'h0;

  // RX mux_sel bits
  localparam int unsigned MUX_RXFILTER_EN = 0;
  localparam int unsigned MUX_AWGN_EN     = 1;
  localparam int unsigned MUX_FREQOFF_EN  = 2;

  typedef enum logic [3:0] {
    RXDR_PREAMBLE   = 4'd0,
    RXDR_SPREAD     = 4'd1,
    RXDR_THRESHOLD  = 4'd2,
    RXDR_FREQ_OFF   = 4'd3,
    RXDR_FIR        = 4'd4,
    RXDR_MUX_SEL    = 4'd5,
    RXDR_FALSE_CNT  = 4'd6,
    RXDR_MISS_CNT   = 4'd7,
    RXDR_BYPASS     = 4'hF
  } rx_dr_e;

  // ---------------- TAP controller states (IEEE 1149.1) ----------------
  typedef enum logic [3:0] {
    TAP_RESET      = 4'd0,
    TAP_IDLE       = 4'd1,
    TAP_SELECT_DR  = 4'd2,
    TAP_CAPTURE_DR = 4'd3,
    TAP_SHIFT_DR   = 4'd4,
    TAP_EXIT1_DR   = 4'd5,
    TAP_PAUSE_DR   = 4'd6,
    TAP_EXIT2_DR   = 4'd7,
    TAP_UPDATE_DR  = 4'd8,
    TAP_SELECT_IR  = 4'd9,
    TAP_CAPTURE_IR = 4'd10,
    TAP_SHIFT_IR   = 4'd11,
    TAP_EXIT1_IR   = 4'd12,
    TAP_PAUSE_IR   = 4'd13,
    TAP_EXIT2_IR   = 4'd14,
    TAP_UPDATE_IR  = 4'd15
  } tap_state_e;

  // ---------------- TX control unit states ----------------
  typedef enum logic [2:0] {
    CU_IDLE    = 3'd0,
    CU_HEADER  = 3'd1,
    CU_PAYLOAD = 3'd2,
    CU_GAP     = 3'd3,
    CU_DONE    = 3'd4
  } cu_state_e;

  // ---------------- symbol rotator sin/cos table (4.4 fixed point) ------
  // entry i holds sin and cos of 2*pi*i/16 rounded to 1/16
  function automatic logic [7:0] rot_sin(input logic [3:0] idx);
    logic [7:0] t [16];
    t = '{8'h00, 8'h06, 8'h0B, 8'h0F, 8'h10, 8'h0F, 8'h0B, 8'h06,
          8'h00, 8'hFA, 8'hF5, 8'hF1, 8'hF0, 8'hF1, 8'hF5, 8'hFA};
    return t[idx];
  endfunction

  function automatic logic [7:0] rot_cos(input logic [3:0] idx);
    return rot_sin(idx + 4'd4);
  endfunction

  // Saturate a wider signed value to 8 bits.
  function automatic logic signed [7:0] sat8(input logic signed [23:0] v);
    if (v > 24'sd127)       return 8'sd127;
    else if (v < -24'sd128) return -8'sd128;
    else                    return v[7:0];
  endfunction

endpackage
