// tb_packet_monitor: feeds decoded PLH words and checks the false-alarm
// and miss counters, good_packets and last_id.
//
// Sequence: ids 0,1,2 (no misses), then 5 (2 missed), a non-codeword (false
// alarm), 6, a large jump, then random codeword/non-codeword headers
// against a reference model, and the saturation of the miss counter.
`include "tb_check.svh"
module tb_packet_monitor;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, rcv = 0;
  logic [63:0] plh;
  logic [15:0] fa, miss, good, last;
  int efa = 0, emiss = 0, egood = 0, elast = 16'hFFFF;
  always #5 clk = ~clk;
  packet_monitor #(.PLH_BITS(64)) dut (.clk, .reset_n, .plh_received(rcv), .plh,
    .false_alarm_counter(fa), .miss_alarm_counter(miss), .good_packets(good), .last_id(last));
  task automatic send_id(int id);
    plh = rep4(16'(id));
    emiss += (id - elast - 1 + 65536) % 65536; if (emiss > 65535) emiss = 65535;
    egood++; elast = id;
    @(negedge clk) rcv = 1; @(negedge clk) rcv = 0;
    check_all();
  endtask
  task automatic send_bad();
    plh = rep4(16'($urandom));
    plh[4*$urandom_range(0, 15) + $urandom_range(0, 3)] ^= 1'b1;
    efa++;
    @(negedge clk) rcv = 1; @(negedge clk) rcv = 0;
    check_all();
  endtask
  task automatic check_all();
    `CHECK_EQ(int'(fa), efa, "false_alarm_counter")
    `CHECK_EQ(int'(miss), emiss, "miss_alarm_counter")
    `CHECK_EQ(int'(good), egood, "good_packets")
    `CHECK_EQ(int'(last), elast, "last_id")
  endtask
  initial begin #1000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    check_all();
    send_id(0); send_id(1); send_id(2); send_id(5); send_bad(); send_id(6);
    for (int i = 0; i < 50; i++)
      if ($urandom_range(0, 3) == 0) send_bad(); else send_id((elast + $urandom_range(1, 3)) % 65536);
    send_id((elast + 30000) % 65536); send_id((elast + 30000) % 65536); send_id((elast + 30000) % 65536);
    `CHECK_EQ(miss, 16'hFFFF, "miss counter saturates")
    `TB_FINISH
  end
endmodule
