// tb_jtag_dr: checks reset value, capture, LSB-first shifting and update of
// a writable and of a read-only JTAG data register.
`include "tb_check.svh"
module tb_jtag_dr;
  int checks = 0, failures = 0;
  logic tck = 0, trst_n = 1, sel = 0, cap = 0, sh = 0, upd = 0, tdi = 0;
  logic tdo_w, tdo_r;
  logic [11:0] din = 12'hA5C, dout_w, dout_r;

  jtag_dr #(.WIDTH(12), .RESET_VALUE(12'h3C1), .WRITABLE(1'b1)) dut_w (
    .tck, .trst_n, .sel, .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(tdo_w), .data_in_i(din), .data_out_o(dout_w));
  jtag_dr #(.WIDTH(12), .RESET_VALUE(12'h000), .WRITABLE(1'b0)) dut_r (
    .tck, .trst_n, .sel, .capture_dr(cap), .shift_dr(sh), .update_dr(upd),
    .tdi, .tdo(tdo_r), .data_in_i(din), .data_out_o(dout_r));

  task automatic tick();
    #5 tck = 1; #5 tck = 0;
  endtask

  initial begin
    #20000; failures++; $display("FAIL watchdog"); `TB_FINISH
  end

  initial begin
    logic [11:0] got_w, got_r, newv;
    #1 trst_n = 0;
    #11 trst_n = 1;
    `CHECK_EQ(dout_w, 12'h3C1, "writable reset value")
    `CHECK_EQ(dout_r, 12'h000, "read-only reset value")
    sel = 1; cap = 1; tick(); cap = 0;
    newv = 12'h6B9;
    sh = 1;
    for (int i = 0; i < 12; i++) begin
      got_w[i] = tdo_w; got_r[i] = tdo_r; tdi = newv[i]; tick();
    end
    sh = 0;
    `CHECK_EQ(got_w, 12'h3C1, "writable captures its working register")
    `CHECK_EQ(got_r, 12'hA5C, "read-only captures data_in_i")
    `CHECK_EQ(dout_w, 12'h3C1, "working register undisturbed by shifting")
    upd = 1; tick(); upd = 0;
    `CHECK_EQ(dout_w, newv, "update loads shifted value")
    `CHECK_EQ(dout_r, 12'h000, "read-only register never updates")
    // not selected: no effect
    sel = 0; cap = 1; tick(); cap = 0; upd = 1; tick(); upd = 0;
    `CHECK_EQ(dout_w, newv, "deselected register ignores strobes")
    trst_n = 0; #1;
    `CHECK_EQ(dout_w, 12'h3C1, "trst_n restores default")
    `TB_FINISH
  end
endmodule
