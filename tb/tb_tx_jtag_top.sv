// tb_tx_jtag_top: reads every TX data register's default through JTAG,
// writes new values and checks the parallel outputs, and reads the two
// read-only monitor registers.
`include "tb_check.svh"
module tb_tx_jtag_top;
  int checks = 0, failures = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic [39:0] pre; logic [15:0] spr, spc; logic [63:0] plh; logic [31:0] npk;
  logic [95:0] cof; logic [511:0] pay; logic [3:0] mux;
  logic [15:0] plh_cnt = 16'hBEEF; logic [2:0] en_st = 3'b101;
  int widths [10] = '{40, 16, 64, 16, 32, 96, 512, 4, 16, 3};
  logic [1023:0] defs [10];

  jtag_bfm bfm (.tck, .tms, .tdi, .trst_n, .tdo);
  tx_jtag_top dut (.tck, .trst_n, .tms, .tdi, .tdo, .preamble_sequence(pre),
    .preamble_spreading_sequence(spr), .plh_sequence(plh), .inter_packet_spacing(spc),
    .total_packet_number(npk), .tx_filter_coeff(cof), .payload_chip_sequence(pay),
    .mux_sel(mux), .plh_sequence_counter(plh_cnt), .enable_status(en_st));

  initial begin
    #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH
  end

  initial begin
    logic [1023:0] o, v;
    defs[0] = 1024'(40'h2481F1539C); defs[1] = 1024'(16'h066B);
    defs[2] = 1024'(64'h00FF00F0000F0000); defs[3] = 1024'(16'h0);
    defs[4] = 1024'(32'h00F00000);
    defs[5] = 1024'({8'h00,8'hFF,8'h04,8'hF9,8'hF6,8'h34,8'h66,8'h34,8'hF6,8'hF9,8'h04,8'hFF});
    defs[6] = 1024'({8{64'h222222DDDD22DD22}}); defs[7] = 1024'(4'hC);
    defs[8] = 1024'(16'hBEEF); defs[9] = 1024'(3'b101);
    bfm.reset();
    `CHECK_EQ(pre, 40'h2481F1539C, "preamble default on output")
    `CHECK_EQ(mux, 4'hC, "mux_sel default on output")
    for (int r = 0; r < 10; r++) begin
      bfm.scan_ir(1024'(r), 4, o);
      v = '0;
      for (int i = 0; i < widths[r]; i++) v[i] = $urandom_range(0, 1);
      bfm.scan_dr(v, widths[r], o);
      for (int i = widths[r]; i < 1024; i++) o[i] = 1'b0;
      `CHECK_EQ(o, defs[r], $sformatf("default of DR %0d", r))
      bfm.scan_dr(v, widths[r], o);
      for (int i = widths[r]; i < 1024; i++) o[i] = 1'b0;
      if (r < 8) begin
        `CHECK_EQ(o, v, $sformatf("written value read back from DR %0d", r))
      end else begin
        `CHECK_EQ(o, defs[r], $sformatf("read-only DR %0d not written", r))
      end
      case (r)
        0: `CHECK_EQ(pre, v[39:0], "preamble output")
        1: `CHECK_EQ(spr, v[15:0], "spreading output")
        2: `CHECK_EQ(plh, v[63:0], "plh output")
        3: `CHECK_EQ(spc, v[15:0], "spacing output")
        4: `CHECK_EQ(npk, v[31:0], "packet number output")
        5: `CHECK_EQ(cof, v[95:0], "filter coefficient output")
        6: `CHECK_EQ(pay, v[511:0], "payload output")
        7: `CHECK_EQ(mux, v[3:0], "mux_sel output")
        default: ;
      endcase
    end
    bfm.reset();
    `CHECK_EQ(pay, {8{64'h222222DDDD22DD22}}, "trst_n restores payload default")
    `TB_FINISH
  end
endmodule
