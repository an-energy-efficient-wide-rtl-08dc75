// plh_extractor: recovers the 64-bit physical layer header after a preamble.
//
// It despreads both sample paths (even and odd) with its own despreaders,
// fed with the chip streams delayed so that, in the cycle in which start
// pulses (the detector's decision), the despreader of the detecting path
// holds the last preamble symbol.  That symbol is kept as the reference;
// every LB chips later the new symbol d is differentially decoded against
// it, Re(d * conj(ref)) = d_re*ref_re + d_im*ref_im, the sign gives the PLH
// bit (negative -> 1), and d becomes the next reference.  Bits fill plh
// LSB first; after PLH_BITS bits plh_received pulses for one cycle and plh
// holds the header.  busy is high from start to plh_received; start is
// ignored while busy.  ev is the chip-rate evaluation strobe: the cycle
// after the chip enable, in which the despreaders show the new window.
// Despreading, differential decoding and sign decision follow the design;
// the shared reference handling and timing are this design's.
module plh_extractor #(
  parameter int unsigned LB       = 16,
  parameter int unsigned PLH_BITS = 64
) (
  input  logic                clk,
  input  logic                reset_n,
  input  logic                en,
  input  logic                ev,
  input  logic                start,
  input  logic                path,
  input  logic [1:0]          chip_re,   // [0] even path, [1] odd path
  input  logic [1:0]          chip_im,
  input  logic [LB-1:0]       seq,
  output logic                busy,
  output logic                plh_received,
  output logic [PLH_BITS-1:0] plh
);
  localparam int unsigned FW = $clog2(LB) + 2;
  logic signed [FW-1:0] d_re [2];
  logic signed [FW-1:0] d_im [2];
  logic signed [FW-1:0] ref_re, ref_im, cur_re, cur_im;
  logic signed [2*FW:0] dot;
  logic                 path_q;
  logic [$clog2(LB)-1:0] chip_cnt;
  logic [$clog2(PLH_BITS):0] bit_cnt;

  for (genvar p = 0; p < 2; p++) begin : g_path
    despreader #(.LB(LB)) u_desp (
      .clk, .reset_n, .en, .chip_re(chip_re[p]), .chip_im(chip_im[p]), .seq,
      .d_re(d_re[p]), .d_im(d_im[p]));
  end

  assign cur_re = path_q ? d_re[1] : d_re[0];
  assign cur_im = path_q ? d_im[1] : d_im[0];
  assign dot    = (2*FW+1)'(cur_re) * (2*FW+1)'(ref_re)
                + (2*FW+1)'(cur_im) * (2*FW+1)'(ref_im);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      busy         <= 1'b0;
      path_q       <= 1'b0;
      ref_re       <= '0;
      ref_im       <= '0;
      chip_cnt     <= '0;
      bit_cnt      <= '0;
      plh          <= '0;
      plh_received <= 1'b0;
    end else begin
      plh_received <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          path_q   <= path;
          ref_re   <= path ? d_re[1] : d_re[0];
          ref_im   <= path ? d_im[1] : d_im[0];
          chip_cnt <= '0;
          bit_cnt  <= '0;
        end
      end else if (ev) begin
        chip_cnt <= chip_cnt + 1'b1;
        if (chip_cnt == ($clog2(LB))'(LB - 1)) begin
          plh[bit_cnt[$clog2(PLH_BITS)-1:0]] <= dot[2*FW];
          ref_re  <= cur_re;
          ref_im  <= cur_im;
          bit_cnt <= bit_cnt + 1'b1;
          if (bit_cnt == ($clog2(PLH_BITS)+1)'(PLH_BITS - 1)) begin
            busy         <= 1'b0;
            plh_received <= 1'b1;
          end
        end
      end
    end
  end
endmodule
