// tb_plh_buffer: loads random PLH words and reads them out nibble by
// nibble with read_en pulses at random spacing.  Checks: each read gives
// the next 4-bit slice (lowest first) in the following cycle with
// plh_out_valid; plh_ready rises at load and falls after the 16th read; a
// new load in the middle of a read-out rewinds to the first nibble.
`include "tb_check.svh"
module tb_plh_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, load = 0, read_en = 0;
  logic [63:0] plh_in;
  logic [3:0] plh_out; logic ov, rdy;
  always #5 clk = ~clk;
  plh_buffer #(.PLH_BITS(64), .OUT_W(4)) dut (.clk, .reset_n, .load, .plh_in, .read_en,
    .plh_out, .plh_out_valid(ov), .plh_ready(rdy));
  task automatic do_load(logic [63:0] v);
    @(negedge clk) plh_in = v; load = 1; @(negedge clk) load = 0;
    `CHECK_EQ(rdy, 1'b1, "plh_ready after load")
  endtask
  task automatic rd(int i, logic [63:0] v);
    repeat ($urandom_range(0, 3)) begin @(negedge clk); `CHECK_EQ(ov, 1'b0, "no valid without read") end
    @(negedge clk) read_en = 1; @(negedge clk) read_en = 0;
    `CHECK_EQ(ov, 1'b1, "plh_out_valid")
    `CHECK_EQ(plh_out, v[4*i +: 4], $sformatf("nibble %0d", i))
  endtask
  initial begin #1000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    logic [63:0] v;
    #1 reset_n = 0; #12 reset_n = 1;
    `CHECK_EQ(rdy, 1'b0, "not ready after reset")
    for (int p = 0; p < 3; p++) begin
      v = {32'($urandom), 32'($urandom)};
      do_load(v);
      for (int i = 0; i < 16; i++) begin
        rd(i, v);
        `CHECK_EQ(rdy, 1'(i != 15), "plh_ready during read-out")
      end
    end
    v = {32'($urandom), 32'($urandom)};
    do_load(v); rd(0, v); rd(1, v); rd(2, v);
    v = ~v; do_load(v); rd(0, v); rd(1, v);
    `TB_FINISH
  end
endmodule
