// cfar_threshold: adaptive threshold and detection decision of one CA-CFAR.
//
// Forms the threshold Hd = TA * r from the noise estimate r and the scalar
// factor TA, and declares a detection when Hd <= x_z, x_z being the test cell.
// TA is unsigned fixed point with TA_FRAC fraction bits, so the product is
// kept at full width (b_c = b_TA + b_r bits) and the test cell is shifted
// left by TA_FRAC bits before the comparison: no rounding is involved.
//
// Timing: two register stages. Stage 1 registers the product and the test
// cell, stage 2 the decision; det/out_valid appear two clocks after the
// inputs, and thresh (the threshold, for observation) one clock before det.
// The product and the comparison rule follow the CA-CFAR definition; the
// fixed-point format of TA and the pipeline are this design's own choices.
// Reset (active low, synchronous) clears the valid bits.
module cfar_threshold #(
  parameter int unsigned DATA_W  = cfar_pkg::DATA_W,
  parameter int unsigned SUM_W   = cfar_pkg::sum_width(cfar_pkg::N_LEARN, cfar_pkg::DATA_W),
  parameter int unsigned TA_W    = cfar_pkg::TA_W,
  parameter int unsigned TA_FRAC = cfar_pkg::TA_FRAC,
  localparam int unsigned PROD_W = TA_W + SUM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [SUM_W-1:0]  sum,
  input  logic [DATA_W-1:0] cut,
  input  logic [TA_W-1:0]   ta,
  output logic              out_valid,
  output logic              det,
  output logic [PROD_W-1:0] thresh
);

  logic              v1;
  logic [DATA_W-1:0] cut1;
  logic [PROD_W-1:0] cut_scaled;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
    if (in_valid) begin
      thresh <= PROD_W'(sum) * PROD_W'(ta);
      cut1   <= cut;
    end
    if (v1) det <= (thresh <= cut_scaled);
  end

  always_comb cut_scaled = PROD_W'(cut1) << TA_FRAC;

endmodule
