// tb_header_generator: loads random preamble/PLH words and checks that the
// 104 header bits come out preamble first, LSB first, one per ce_bit with
// en high, and that the register holds while ce_bit or en is low.
// Inputs change after the falling edge; bit_out is compared before each
// shifting edge with the reference header bit.
`include "tb_check.svh"
module tb_header_generator;
  import mote_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, ce_bit = 0, load = 0, en = 0, bit_out;
  logic [39:0] pre; logic [63:0] plh;
  always #5 clk = ~clk;
  header_generator #(.PREAMBLE_BITS(40), .PLH_BITS(64)) dut (.clk, .reset_n, .ce_bit,
    .load, .en, .preamble(pre), .plh, .bit_out);
  initial begin #2000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    for (int p = 0; p < 4; p++) begin
      automatic int i = 0;
      pre = (p == 0) ? 40'h2481F1539C : {8'($urandom), 32'($urandom)};
      plh = {32'($urandom), 32'($urandom)};
      @(negedge clk) load = 1; @(negedge clk) load = 0;
      while (i < 104) begin
        ce_bit = 1'($urandom_range(0, 2) == 0); en = 1'($urandom_range(0, 3) != 0);
        #1 `CHECK_EQ(bit_out, 1'(ref_hdr_bit(pre, plh, i)), $sformatf("header bit %0d", i))
        @(negedge clk);
        if (ce_bit && en) i++;
      end
      ce_bit = 0; en = 0;
    end
    `TB_FINISH
  end
endmodule
