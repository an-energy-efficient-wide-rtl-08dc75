// jtag_bfm: JTAG bus driver for the testbenches.
//
// Generates tck (TCK_HALF ns half period) and drives tms/tdi/trst_n from
// tasks; tdo is sampled just before each rising tck edge.  Tasks:
//   reset()                    pulse trst_n and go to Run-Test/Idle
//   scan_ir(value, n, out)     Idle -> shift n IR bits LSB first -> Idle
//   scan_dr(value, n, out)     Idle -> shift n DR bits LSB first -> Idle
// The bits shifted out are returned in out.
module jtag_bfm #(
  parameter int TCK_HALF = 50
) (
  output logic tck,
  output logic tms,
  output logic tdi,
  output logic trst_n,
  input  logic tdo
);
  initial begin
    tck = 1'b0; tms = 1'b1; tdi = 1'b0; trst_n = 1'b1;
  end

  task automatic clk1(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    #(TCK_HALF);
    tdo_v = tdo;
    tck = 1'b1;
    #(TCK_HALF);
    tck = 1'b0;
  endtask

  task automatic reset();
    logic d;
    trst_n = 1'b1;
    #1 trst_n = 1'b0;
    #(4 * TCK_HALF);
    trst_n = 1'b1;
    for (int i = 0; i < 5; i++) clk1(1'b1, 1'b0, d);
    clk1(1'b0, 1'b0, d);           // Run-Test/Idle
  endtask

  task automatic scan(input bit is_ir, input logic [1023:0] value, input int n,
                      output logic [1023:0] out);
    logic d;
    out = '0;
    clk1(1'b1, 1'b0, d);           // Select-DR
    if (is_ir) clk1(1'b1, 1'b0, d); // Select-IR
    clk1(1'b0, 1'b0, d);           // Capture
    clk1(1'b0, 1'b0, d);           // Shift
    for (int i = 0; i < n; i++) begin
      clk1(i == n - 1, value[i], d);
      out[i] = d;
    end
    clk1(1'b1, 1'b0, d);           // Update
    clk1(1'b0, 1'b0, d);           // Idle
  endtask

  task automatic scan_ir(input logic [1023:0] value, input int n, output logic [1023:0] out);
    scan(1'b1, value, n, out);
  endtask

  task automatic scan_dr(input logic [1023:0] value, input int n, output logic [1023:0] out);
    scan(1'b0, value, n, out);
  endtask
endmodule
