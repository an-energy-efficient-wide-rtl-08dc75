// tb_rx_jtag_top: reads every RX data register's default through JTAG,
// writes new values and checks the parallel outputs, and reads the two
// read-only counter registers.
`include "tb_check.svh"
module tb_rx_jtag_top;
  int checks = 0, failures = 0;
  logic tck, tms, tdi, trst_n, tdo;
  logic [39:0] pre; logic [15:0] spr; logic [7:0] thr; logic [11:0] fo;
  logic [95:0] cof; logic [2:0] mux;
  logic [15:0] fa = 16'h1234, miss = 16'h0FED;
  int widths [8] = '{40, 16, 8, 12, 96, 3, 16, 16};
  logic [1023:0] defs [8];

  jtag_bfm bfm (.tck, .tms, .tdi, .trst_n, .tdo);
  rx_jtag_top dut (.tck, .trst_n, .tms, .tdi, .tdo, .preamble_sequence(pre),
    .preamble_spreading_sequence(spr), .correlator_threshold(thr),
    .frequency_offset(fo), .rx_filter_coeff(cof), .mux_sel(mux),
    .false_alarm_counter(fa), .miss_alarm_counter(miss));

  initial begin
    #20000000; failures++; $display("FAIL watchdog"); `TB_FINISH
  end

  initial begin
    logic [1023:0] o, v;
    defs[0] = 1024'(40'h2481F1539C); defs[1] = 1024'(16'h066B);
    defs[2] = 1024'(8'h28); defs[3] = 1024'(12'h000);
    defs[4] = 1024'({8'h00,8'hFF,8'h04,8'hF9,8'hF6,8'h34,8'h66,8'h34,8'hF6,8'hF9,8'h04,8'hFF});
    defs[5] = 1024'(3'h0); defs[6] = 1024'(16'h1234); defs[7] = 1024'(16'h0FED);
    bfm.reset();
    `CHECK_EQ(thr, 8'h28, "threshold default on output")
    for (int r = 0; r < 8; r++) begin
      bfm.scan_ir(1024'(r), 4, o);
      v = '0;
      for (int i = 0; i < widths[r]; i++) v[i] = $urandom_range(0, 1);
      bfm.scan_dr(v, widths[r], o);
      for (int i = widths[r]; i < 1024; i++) o[i] = 1'b0;
      `CHECK_EQ(o, defs[r], $sformatf("default of DR %0d", r))
      bfm.scan_dr(v, widths[r], o);
      for (int i = widths[r]; i < 1024; i++) o[i] = 1'b0;
      if (r < 6) begin
        `CHECK_EQ(o, v, $sformatf("written value read back from DR %0d", r))
      end else begin
        `CHECK_EQ(o, defs[r], $sformatf("read-only DR %0d not written", r))
      end
      case (r)
        0: `CHECK_EQ(pre, v[39:0], "preamble output")
        1: `CHECK_EQ(spr, v[15:0], "spreading output")
        2: `CHECK_EQ(thr, v[7:0], "threshold output")
        3: `CHECK_EQ(fo, v[11:0], "frequency offset output")
        4: `CHECK_EQ(cof, v[95:0], "filter coefficient output")
        5: `CHECK_EQ(mux, v[2:0], "mux_sel output")
        default: ;
      endcase
    end
    `TB_FINISH
  end
endmodule
