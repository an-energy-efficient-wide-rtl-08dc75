// rx_unit: preamble detection and PLH extraction on two sample phases.
//
// The matched-filter outputs for the even and odd sample of each chip are
// reduced to their signs (+1 for >= 0, -1 for < 0), giving two chip-rate
// complex streams.  Each feeds its own preamble_detector; the first path to
// detect (even wins a tie) starts the plh_extractor on that path.  The
// extractor receives both streams delayed by DET_LAT chips, matching the
// detectors' latency, so it starts from the last preamble symbol.
// Detections while a PLH is being extracted are ignored.  en is the
// chip-rate strobe (one cycle per chip, when a new even/odd pair is
// present).  preamble_detected pulses for one cycle per accepted detection
// with detect_path telling which path; plh_received/plh come from the
// extractor.  Two detectors, the sign reduction and the routing of the
// detecting path to the extractor follow the design; tie-breaking and
// busy handling are this design's.
module rx_unit #(
  parameter int unsigned LB       = 16,
  parameter int unsigned W        = 40,
  parameter int unsigned PLH_BITS = 64,
  parameter int unsigned TRUNC    = 3,
  parameter int unsigned IN_W     = 20
) (
  input  logic                   clk,
  input  logic                   reset_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] even_re,
  input  logic signed [IN_W-1:0] even_im,
  input  logic signed [IN_W-1:0] odd_re,
  input  logic signed [IN_W-1:0] odd_im,
  input  logic [LB-1:0]          seq,
  input  logic [W-1:0]           preamble,
  input  logic [7:0]             threshold,
  output logic                   preamble_detected,
  output logic                   detect_path,
  output logic [1:0]             path_detect,
  output logic signed [23:0]     eta_even,
  output logic signed [23:0]     eta_odd,
  output logic                   plh_received,
  output logic [PLH_BITS-1:0]    plh
);
  localparam int unsigned DET_LAT = 3;

  logic [1:0] c_re, c_im;
  logic [1:0] det;
  logic [1:0] dl_re [DET_LAT];
  logic [1:0] dl_im [DET_LAT];
  logic       ev, busy;

  assign c_re = {odd_re[IN_W-1], even_re[IN_W-1]};
  assign c_im = {odd_im[IN_W-1], even_im[IN_W-1]};

  preamble_detector #(.LB(LB), .W(W), .TRUNC(TRUNC)) u_det_even (
    .clk, .reset_n, .en, .chip_re(c_re[0]), .chip_im(c_im[0]), .seq, .preamble,
    .threshold, .eta(eta_even), .detected(det[0]));

  preamble_detector #(.LB(LB), .W(W), .TRUNC(TRUNC)) u_det_odd (
    .clk, .reset_n, .en, .chip_re(c_re[1]), .chip_im(c_im[1]), .seq, .preamble,
    .threshold, .eta(eta_odd), .detected(det[1]));

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      ev <= 1'b0;
      for (int i = 0; i < DET_LAT; i++) begin
        dl_re[i] <= '0;
        dl_im[i] <= '0;
      end
    end else begin
      ev <= en;
      if (en) begin
        dl_re[0] <= c_re;
        dl_im[0] <= c_im;
        for (int i = 1; i < DET_LAT; i++) begin
          dl_re[i] <= dl_re[i-1];
          dl_im[i] <= dl_im[i-1];
        end
      end
    end
  end

  assign path_detect       = det;
  assign preamble_detected = (|det) && !busy;
  assign detect_path       = !det[0];

  plh_extractor #(.LB(LB), .PLH_BITS(PLH_BITS)) u_plh (
    .clk, .reset_n, .en, .ev, .start(preamble_detected), .path(detect_path),
    .chip_re(dl_re[DET_LAT-1]), .chip_im(dl_im[DET_LAT-1]), .seq,
    .busy, .plh_received, .plh);
endmodule
