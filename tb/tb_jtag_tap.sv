// tb_jtag_tap: drives the TAP with the JTAG driver; checks IR capture value,
// IR update, DR addressing, capture/shift/update strobes, BYPASS and
// Test-Logic-Reset through tms.
`include "tb_check.svh"
module tb_jtag_tap;
  import mote_pkg::*;
  int checks = 0, failures = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic [3:0] ir;
  logic [3:0] dr_sel;
  logic cap, sh, upd;
  logic [3:0] dr_tdo;
  logic [7:0] sr [4];
  int n_cap, n_upd;

  jtag_bfm bfm (.tck, .tms, .tdi, .trst_n, .tdo);
  jtag_tap #(.IR_WIDTH(4), .NUM_DR(4)) dut (
    .tck, .trst_n, .tms, .tdi, .tdo, .ir, .dr_sel, .capture_dr(cap),
    .shift_dr(sh), .update_dr(upd), .dr_tdo);

  // four 8-bit test registers: capture 8'hA0+i, shift LSB first
  for (genvar i = 0; i < 4; i++) begin : g_dr
    always_ff @(posedge tck) begin
      if (dr_sel[i] && cap) sr[i] <= 8'hA0 + 8'(i);
      else if (dr_sel[i] && sh) sr[i] <= {tdi, sr[i][7:1]};
    end
    assign dr_tdo[i] = sr[i][0];
  end
  always_ff @(posedge tck) begin
    if (cap) n_cap <= n_cap + 1;
    if (upd) n_upd <= n_upd + 1;
  end

  initial begin
    #2000000; failures++; $display("FAIL watchdog"); `TB_FINISH
  end

  initial begin
    logic [1023:0] o;
    n_cap = 0; n_upd = 0;
    bfm.reset();
    `CHECK_EQ(ir, 4'hF, "IR is BYPASS after reset")
    bfm.scan_ir(1024'(2), 4, o);
    `CHECK_EQ(o[3:0], 4'b0001, "IR capture value")
    `CHECK_EQ(ir, 4'd2, "IR updated")
    `CHECK_EQ(dr_sel, 4'b0100, "one-hot DR select")
    bfm.scan_dr(1024'(8'h5E), 8, o);
    `CHECK_EQ(o[7:0], 8'hA2, "addressed DR captured and shifted out")
    `CHECK_EQ(sr[2], 8'h5E, "tdi shifted into addressed DR")
    `CHECK_EQ(n_cap, 1, "one capture strobe")
    `CHECK_EQ(n_upd, 1, "one update strobe")
    bfm.scan_ir(1024'(0), 4, o);
    `CHECK_EQ(o[3:0], 4'b0001, "IR capture value again")
    bfm.scan_dr(1024'(8'h00), 8, o);
    `CHECK_EQ(o[7:0], 8'hA0, "DR 0 addressed")
    // BYPASS: one-bit delay
    bfm.scan_ir(1024'(4'hF), 4, o);
    bfm.scan_dr(1024'(8'b1011_0110), 8, o);
    `CHECK_EQ(o[7:0], 8'b0110_1100, "BYPASS is a one-bit register")
    // Test-Logic-Reset by five tms=1 clocks
    bfm.scan_ir(1024'(1), 4, o);
    `CHECK_EQ(ir, 4'd1, "IR = 1")
    begin
      logic d;
      for (int i = 0; i < 5; i++) bfm.clk1(1'b1, 1'b0, d);
      bfm.clk1(1'b0, 1'b0, d);
    end
    `CHECK_EQ(ir, 4'hF, "tms reset returns IR to BYPASS")
    `TB_FINISH
  end
endmodule
