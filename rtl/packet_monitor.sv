// packet_monitor: miss and false-alarm counters of the receiver.
//
// The transmitter's test PLH is a 16-bit packet counter in a rate-4
// repetition code (counter bit i repeated in PLH bits 4i..4i+3).  For every
// extracted PLH (plh_received):
//   * if any nibble is not 4'h0 or 4'hF the header is not a codeword: the
//     detection did not start at a real preamble, and false_alarm_counter
//     increments;
//   * otherwise its counter value id is decoded and the packets skipped
//     since the last good one, id - last_id - 1 (mod 2^16), are added to
//     miss_alarm_counter; last_id starts at 16'hFFFF so that 0 is expected
//     first.
// good_packets counts accepted headers and last_id shows the latest one.
// Counters saturate at 16'hFFFF.  Using the PLH counter to measure misses
// and false alarms follows the design; these exact rules are this design's.
module packet_monitor #(
  parameter int unsigned PLH_BITS = 64
) (
  input  logic                clk,
  input  logic                reset_n,
  input  logic                plh_received,
  input  logic [PLH_BITS-1:0] plh,
  output logic [15:0]         false_alarm_counter,
  output logic [15:0]         miss_alarm_counter,
  output logic [15:0]         good_packets,
  output logic [15:0]         last_id
);
  logic        codeword;
  logic [15:0] id, gap;
  logic [16:0] miss_sum;

  always_comb begin
    codeword = 1'b1;
    id       = '0;
    for (int i = 0; i < PLH_BITS / 4; i++) begin
      if (plh[4*i +: 4] != 4'h0 && plh[4*i +: 4] != 4'hF) codeword = 1'b0;
      if (i < 16) id[i] = plh[4*i];
    end
  end

  assign gap      = id - last_id - 16'd1;
  assign miss_sum = 17'(miss_alarm_counter) + 17'(gap);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      false_alarm_counter <= '0;
      miss_alarm_counter  <= '0;
      good_packets        <= '0;
      last_id             <= 16'hFFFF;
    end else if (plh_received) begin
      if (!codeword) begin
        if (false_alarm_counter != 16'hFFFF)
          false_alarm_counter <= false_alarm_counter + 1'b1;
      end else begin
        miss_alarm_counter <= miss_sum[16] ? 16'hFFFF : miss_sum[15:0];
        if (good_packets != 16'hFFFF) good_packets <= good_packets + 1'b1;
        last_id <= id;
      end
    end
  end
endmodule
