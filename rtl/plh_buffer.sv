// plh_buffer: holds the last extracted PLH for read-out.
//
// load (the extractor's plh_received) stores the PLH_BITS-bit header and
// rewinds the read pointer; each read_en pulse then puts the next OUT_W-bit
// slice on plh_out in the following cycle, lowest slice first, with
// plh_out_valid high for that cycle.  plh_ready is high from a load until
// the last slice has been read.  The 64-bit buffer and the 4-bit read-out
// per read_en follow the design; slice order and the ready flag are this
// design's.
module plh_buffer #(
  parameter int unsigned PLH_BITS = 64,
  parameter int unsigned OUT_W    = 4
) (
  input  logic                clk,
  input  logic                reset_n,
  input  logic                load,
  input  logic [PLH_BITS-1:0] plh_in,
  input  logic                read_en,
  output logic [OUT_W-1:0]    plh_out,
  output logic                plh_out_valid,
  output logic                plh_ready
);
  localparam int unsigned NS = PLH_BITS / OUT_W;
  logic [PLH_BITS-1:0]     buf_q;
  logic [$clog2(NS)-1:0]   rd_ptr;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      buf_q         <= '0;
      rd_ptr        <= '0;
      plh_out       <= '0;
      plh_out_valid <= 1'b0;
      plh_ready     <= 1'b0;
    end else begin
      plh_out_valid <= 1'b0;
      if (load) begin
        buf_q     <= plh_in;
        rd_ptr    <= '0;
        plh_ready <= 1'b1;
      end else if (read_en) begin
        plh_out       <= buf_q[rd_ptr*OUT_W +: OUT_W];
        plh_out_valid <= 1'b1;
        rd_ptr        <= rd_ptr + 1'b1;
        if (rd_ptr == ($clog2(NS))'(NS - 1)) plh_ready <= 1'b0;
      end
    end
  end
endmodule
