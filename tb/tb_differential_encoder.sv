// tb_differential_encoder: random stimulus against a reference model of
// the DBPSK encoder a_i = b_i XOR a_(i-1).
//
// Inputs change after the falling clock edge.  At each rising edge with
// ce_bit and en high the model updates its stored symbol; clear resets it
// to 0 (+1).  enc_bit (combinational: bit_in XOR stored symbol) is compared
// before every edge.  Enables are random so holding is also checked.
`include "tb_check.svh"
module tb_differential_encoder;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, ce_bit = 0, clear = 0, en = 0, bit_in = 0, enc_bit;
  bit a_prev = 0;
  int n_upd = 0;
  always #5 clk = ~clk;
  differential_encoder dut (.clk, .reset_n, .ce_bit, .clear, .en, .bit_in, .enc_bit);
  initial begin #1000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      ce_bit = 1'($urandom_range(0, 3) != 0); en = 1'($urandom_range(0, 4) != 0);
      clear = 1'($urandom_range(0, 60) == 0); bit_in = 1'($urandom);
      #1 `CHECK_EQ(enc_bit, bit_in ^ a_prev, "enc_bit")
      @(posedge clk);
      if (clear) a_prev = 0;
      else if (ce_bit && en) begin a_prev = bit_in ^ a_prev; n_upd++; end
    end
    `CHECK(n_upd > 500, "enough symbol updates")
    `TB_FINISH
  end
endmodule
