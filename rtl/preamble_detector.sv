// preamble_detector: asynchronous differential-correlation preamble detector.
//
// Every chip (en) it treats the newest chip as the possible end of a
// preamble:
//  1. despread the last LB chips (despreader) into a complex symbol estimate
//     a(k), truncate it by an arithmetic shift of TRUNC bits and push it into
//     a history of (W-1)*LB+1 entries, so that symbols a_1..a_W of a
//     candidate preamble sit LB entries apart;
//  2. differentially decode: p_m = Re(a_m * conj(a_(m-1)))
//     = re_m*re_(m-1) + im_m*im_(m-1), for m = 2..W (registered);
//  3. correlate with the preamble: eta = sum_m c_m * p_m, with c_m = +1 for
//     preamble bit (m-1) = 0 and -1 for 1 (registered);
//  4. detected pulses for one cycle when eta > threshold.
// Chip k enters at en number k; eta for the window ending at chip k is
// registered at en number k+3 and detected is raised in the following cycle
// (DET_LAT = 3 chips).  TRUNC = 3 is the area-optimised (truncated)
// detector; TRUNC = 0 keeps full precision.  The algorithm and the parallel
// even/odd use follow the design; the truncation amount, widths and pipeline
// cut are this design's, since the width figure is not given numerically.
module preamble_detector #(
  parameter int unsigned LB    = 16,
  parameter int unsigned W     = 40,
  parameter int unsigned TRUNC = 3
) (
  input  logic                 clk,
  input  logic                 reset_n,
  input  logic                 en,
  input  logic                 chip_re,
  input  logic                 chip_im,
  input  logic [LB-1:0]        seq,
  input  logic [W-1:0]         preamble,
  input  logic [7:0]           threshold,
  output logic signed [23:0]   eta,
  output logic                 detected
);
  localparam int unsigned FW    = $clog2(LB) + 2;     // full despread width
  localparam int unsigned DW    = FW - TRUNC;         // stored width
  localparam int unsigned DEPTH = (W - 1) * LB + 1;

  logic signed [FW-1:0] d_re, d_im;
  logic signed [DW-1:0] h_re [DEPTH];
  logic signed [DW-1:0] h_im [DEPTH];
  logic signed [2*DW:0] p_q [W];
  logic signed [23:0]   eta_sum;
  logic                 en_d;

  despreader #(.LB(LB)) u_desp (
    .clk, .reset_n, .en, .chip_re, .chip_im, .seq, .d_re, .d_im);

  // 1. truncated symbol history
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        h_re[i] <= '0;
        h_im[i] <= '0;
      end
    end else if (en) begin
      h_re[0] <= DW'(d_re >>> TRUNC);
      h_im[0] <= DW'(d_im >>> TRUNC);
      for (int i = 1; i < DEPTH; i++) begin
        h_re[i] <= h_re[i-1];
        h_im[i] <= h_im[i-1];
      end
    end
  end

  // 2. differential decoding; a_m is h[(W-m)*LB]
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int m = 0; m < W; m++) p_q[m] <= '0;
    end else if (en) begin
      p_q[0] <= '0;
      for (int m = 2; m <= W; m++)
        p_q[m-1] <= (2*DW+1)'(h_re[(W-m)*LB]) * (2*DW+1)'(h_re[(W-m+1)*LB])
                  + (2*DW+1)'(h_im[(W-m)*LB]) * (2*DW+1)'(h_im[(W-m+1)*LB]);
    end
  end

  // 3. correlation with the preamble
  always_comb begin
    eta_sum = '0;
    for (int m = 2; m <= W; m++)
      eta_sum += preamble[m-1] ? -24'(p_q[m-1]) : 24'(p_q[m-1]);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      eta  <= '0;
      en_d <= 1'b0;
    end else begin
      en_d <= en;
      if (en) eta <= eta_sum;
    end
  end

  // 4. threshold decision, one pulse per chip
  assign detected = en_d && (eta > signed'(24'(threshold)));
endmodule
