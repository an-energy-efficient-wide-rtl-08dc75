// tb_spreader: checks that the spreader output is the DBPSK symbol bit XOR
// the spreading-sequence chip selected by chip_idx (chip 0 = seq[0]), for
// the default sequence 066B and for random sequences, both symbol values
// and every chip index.  Purely combinational; the tb waits 1 ns per vector.
`include "tb_check.svh"
module tb_spreader;
  int checks = 0, failures = 0;
  logic [15:0] seq; logic [3:0] idx; logic b, chip;
  spreader #(.LB(16)) dut (.seq, .chip_idx(idx), .bit_in(b), .chip);
  initial begin #100000; failures++; $display("FAIL watchdog"); `TB_FINISH end
  initial begin
    for (int s = 0; s < 6; s++) begin
      seq = (s == 0) ? 16'h066B : 16'($urandom);
      for (int i = 0; i < 32; i++) begin
        idx = 4'(i % 16); b = 1'(i / 16); #1;
        `CHECK_EQ(chip, b ^ seq[i % 16], $sformatf("chip seq=%h idx=%0d bit=%0d", seq, i % 16, b))
      end
    end
    `TB_FINISH
  end
endmodule
