// tx_control_unit: test sequencer of the mote TX chip.
//
// On test_start it copies the JTAG configuration into local registers (so
// later JTAG writes do not disturb a running test), clears the packet and
// PLH counters and test_done, and waits for the next bit-period boundary.
// It then sends total_packet_number packets.  Each packet is
//   HEADER  : PREAMBLE_BITS preamble bits, then PLH_BITS PLH bits;
//   PAYLOAD : PAYLOAD_CHIPS chips (PAYLOAD_CHIPS/LB bit periods), only when
//             mux_sel[3] (payload_sr_en) is set;
// followed, unless it is the last, by inter_packet_spacing silent periods of
// HEADER length each (GAP).  After the last packet it enters DONE and holds
// test_done until reset_n or the next test_start.  The PLH is the
// plh_sequence register when mux_sel[0] (constant_plh) is set, otherwise the
// 16-bit packet counter in a rate-4 repetition code (counter bit i fills PLH
// bits 4i..4i+3); the counter starts at 0 and wraps.
// Timing (clk_2x_chip domain, ce_bit ends a bit period): hdr_load and
// enc_clear pulse with the ce_bit before the first header bit, payload_load
// with the ce_bit that ends the last PLH bit, pkt_sent_ack with the ce_bit
// that ends the packet's last bit period.  preamble_sr_en, plh_sr_en and
// payload_sr_en are high during the bit periods of their packet field.
// The test procedure, registers and enables follow the design; the exact
// state chart, the counter clearing and the timing are this design's.
module tx_control_unit
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
  input  logic                      test_start,
  // JTAG configuration
  input  logic [PREAMBLE_BITS-1:0]  cfg_preamble,
  input  logic [LB-1:0]             cfg_spread,
  input  logic [PLH_BITS-1:0]       cfg_plh,
  input  logic [15:0]               cfg_spacing,
  input  logic [31:0]               cfg_npkt,
  input  logic [95:0]               cfg_coeff,
  input  logic [PAYLOAD_CHIPS-1:0]  cfg_payload,
  input  logic [3:0]                cfg_mux_sel,
  // local copies for the TX unit
  output logic [LB-1:0]             spread_seq,
  output logic [95:0]               filter_coeff,
  output logic [PAYLOAD_CHIPS-1:0]  payload_seq,
  output logic                      silent_level,
  output logic                      txfilter_en,
  output logic [PREAMBLE_BITS+PLH_BITS-1:0] header_word,
  // sequencing
  output logic                      hdr_load,
  output logic                      enc_clear,
  output logic                      payload_load,
  output logic                      preamble_sr_en,
  output logic                      plh_sr_en,
  output logic                      payload_sr_en,
  output logic                      pkt_sent_ack,
  output logic                      test_done,
  output logic [15:0]               plh_counter,
  output cu_state_e                 state
);
  localparam int unsigned HDR_BITS = PREAMBLE_BITS + PLH_BITS;
  localparam int unsigned PL_BITS  = PAYLOAD_CHIPS / LB;

  logic [PREAMBLE_BITS-1:0] preamble_q;
  logic [PLH_BITS-1:0]      plh_q;
  logic [15:0]              spacing_q;
  logic [31:0]              npkt_q, pkt_cnt;
  logic [3:0]               mux_q;
  logic [7:0]               bit_idx;
  logic [31:0]              gap_left;
  logic [PLH_BITS-1:0]      plh_word;
  logic                     last_bit, pkt_end, start_pkt;
  logic [15:0]              hdr_count;

  // counter value for a header loaded now (a back-to-back packet is loaded
  // in the same cycle in which the counter steps)
  assign hdr_count = pkt_end ? plh_counter + 1'b1 : plh_counter;

  // rate-4 repetition code of the counter
  always_comb begin
    plh_word = plh_q;
    if (!mux_q[MUX_CONSTANT_PLH])
      for (int i = 0; i < PLH_BITS; i++)
        plh_word[i] = hdr_count[(i/4) % 16];
  end
  assign header_word = {plh_word, preamble_q};

  assign silent_level = mux_q[MUX_SILENT_LEVEL];
  assign txfilter_en  = mux_q[MUX_TXFILTER_EN];

  assign last_bit  = (state == CU_HEADER)  ? (bit_idx == 8'(HDR_BITS - 1)) :
                     (state == CU_PAYLOAD) ? (bit_idx == 8'(PL_BITS - 1)) : 1'b0;
  assign pkt_end   = ce_bit && last_bit &&
                     ((state == CU_PAYLOAD) || !mux_q[MUX_PAYLOAD_EN]);
  // start of a packet: at the end of a gap, or straight after a packet when
  // there is no spacing and packets remain
  assign start_pkt = ce_bit && (
                       ((state == CU_GAP) && (gap_left == '0)) ||
                       (pkt_end && (spacing_q == '0) && (pkt_cnt + 1 != npkt_q)));

  assign hdr_load     = start_pkt;
  assign enc_clear    = start_pkt;
  assign payload_load = ce_bit && (state == CU_HEADER) && last_bit && mux_q[MUX_PAYLOAD_EN];
  assign pkt_sent_ack = pkt_end;

  assign preamble_sr_en = (state == CU_HEADER) && (bit_idx <  8'(PREAMBLE_BITS));
  assign plh_sr_en      = (state == CU_HEADER) && (bit_idx >= 8'(PREAMBLE_BITS));
  assign payload_sr_en  = (state == CU_PAYLOAD);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state        <= CU_IDLE;
      preamble_q   <= TX_PREAMBLE_DEF[PREAMBLE_BITS-1:0];
      spread_seq   <= TX_SPREAD_DEF[LB-1:0];
      plh_q        <= TX_PLH_DEF[PLH_BITS-1:0];
      spacing_q    <= '0;
      npkt_q       <= '0;
      filter_coeff <= FIR_COEFF_DEF;
      payload_seq  <= '0;
      mux_q        <= TX_MUX_SEL_DEF;
      pkt_cnt      <= '0;
      plh_counter  <= '0;
      bit_idx      <= '0;
      gap_left     <= '0;
      test_done    <= 1'b0;
    end else if (test_start) begin
      preamble_q   <= cfg_preamble;
      spread_seq   <= cfg_spread;
      plh_q        <= cfg_plh;
      spacing_q    <= cfg_spacing;
      npkt_q       <= cfg_npkt;
      filter_coeff <= cfg_coeff;
      payload_seq  <= cfg_payload;
      mux_q        <= cfg_mux_sel;
      pkt_cnt      <= '0;
      plh_counter  <= '0;
      bit_idx      <= '0;
      gap_left     <= '0;
      test_done    <= (cfg_npkt == '0);
      state        <= (cfg_npkt == '0) ? CU_DONE : CU_GAP;
    end else if (ce_bit) begin
      unique case (state)
        CU_IDLE, CU_DONE: ;
        CU_GAP: begin
          if (gap_left == '0) begin
            state   <= CU_HEADER;
            bit_idx <= '0;
          end else begin
            gap_left <= gap_left - 1'b1;
          end
        end
        CU_HEADER, CU_PAYLOAD: begin
          if (!last_bit) begin
            bit_idx <= bit_idx + 1'b1;
          end else if (state == CU_HEADER && mux_q[MUX_PAYLOAD_EN]) begin
            state   <= CU_PAYLOAD;
            bit_idx <= '0;
          end else begin
            // packet complete
            pkt_cnt     <= pkt_cnt + 1'b1;
            plh_counter <= plh_counter + 1'b1;
            bit_idx     <= '0;
            if (pkt_cnt + 1 == npkt_q) begin
              state     <= CU_DONE;
              test_done <= 1'b1;
            end else if (spacing_q == '0) begin
              state     <= CU_HEADER;
            end else begin
              state     <= CU_GAP;
              gap_left  <= 32'(spacing_q) * 32'(HDR_BITS) - 1;
            end
          end
        end
        default: state <= CU_IDLE;
      endcase
    end
  end

  // a packet may only start when the previous one has ended or a gap expired
  assert property (@(posedge clk) disable iff (!reset_n)
                   hdr_load |-> (state == CU_GAP || state == CU_HEADER || state == CU_PAYLOAD));
endmodule
