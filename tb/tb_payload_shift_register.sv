// tb_payload_shift_register: loads random 512-chip payloads and checks the
// chips come out LSB first, one per ce_chip with en high, holding otherwise.
// Inputs change after the falling edge; chip_out is compared before each
// shifting edge.
`include "tb_check.svh"
module tb_payload_shift_register;
  int checks = 0, failures = 0;
  logic clk = 0, reset_n = 1, ce_chip = 0, load = 0, en = 0, chip_out;
  logic [511:0] pay;
  always #5 clk = ~clk;
  payload_shift_register #(.PAYLOAD_CHIPS(512)) dut (.clk, .reset_n, .ce_chip, .load, .en,
    .payload(pay), .chip_out);
  initial begin #5000000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    #1 reset_n = 0; #12 reset_n = 1;
    for (int p = 0; p < 3; p++) begin
      automatic int i = 0;
      if (p == 0) pay = {8{64'h222222DDDD22DD22}};
      else for (int k = 0; k < 16; k++) pay[32*k +: 32] = $urandom;
      @(negedge clk) load = 1; @(negedge clk) load = 0;
      while (i < 512) begin
        ce_chip = 1'($urandom_range(0, 1)); en = 1'($urandom_range(0, 5) != 0);
        #1 `CHECK_EQ(chip_out, pay[i], $sformatf("payload chip %0d", i))
        @(negedge clk);
        if (ce_chip && en) i++;
      end
      ce_chip = 0; en = 0;
    end
    `TB_FINISH
  end
endmodule
