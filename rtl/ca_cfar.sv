// ca_cfar: one cell-averaging CFAR unit.
//
// Takes one complete window of N+1 cells: N learning cells and the test cell
// x_z at index TEST_POS (cells below TEST_POS are older than the test cell,
// cells above it newer). The learning cells are summed (cfar_noise_sum), the
// sum is scaled by the factor TA into the adaptive threshold Hd = TA * r, and
// the unit reports det = 1 when Hd <= x_z (cfar_threshold).
//
// Interface: win[] is the window, in_valid qualifies it, ta is the factor
// (unsigned, TA_FRAC fraction bits). Timing: fully pipelined, one window per
// clock, det/out_valid three clocks after in_valid. The structure is the
// standard CA-CFAR scheme; where the test cell sits in the window, the TA
// format and the three pipeline stages are this design's own choices.
module ca_cfar #(
  parameter int unsigned DATA_W   = cfar_pkg::DATA_W,
  parameter int unsigned N        = cfar_pkg::N_LEARN,
  parameter int unsigned TEST_POS = cfar_pkg::TEST_POS,
  parameter int unsigned TA_W     = cfar_pkg::TA_W,
  parameter int unsigned TA_FRAC  = cfar_pkg::TA_FRAC,
  localparam int unsigned SUM_W   = cfar_pkg::sum_width(N, DATA_W),
  localparam int unsigned PROD_W  = TA_W + SUM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] win [N+1],
  input  logic [TA_W-1:0]   ta,
  output logic              out_valid,
  output logic              det,
  output logic [PROD_W-1:0] thresh
);

  logic [DATA_W-1:0] learn [N];
  logic [DATA_W-1:0] cut;
  logic              sum_valid;
  logic [SUM_W-1:0]  sum;
  logic [DATA_W-1:0] cut_q;

  // split the window into learning cells and the test cell
  always_comb begin
    cut = win[TEST_POS];
    for (int i = 0; i < int'(N); i++)
      learn[i] = (i < int'(TEST_POS)) ? win[i] : win[i+1];
  end

  cfar_noise_sum #(.DATA_W(DATA_W), .N(N)) u_sum (
    .clk, .rst_n, .in_valid, .learn, .cut,
    .out_valid(sum_valid), .sum, .cut_q
  );

  cfar_threshold #(.DATA_W(DATA_W), .SUM_W(SUM_W), .TA_W(TA_W), .TA_FRAC(TA_FRAC)) u_thr (
    .clk, .rst_n, .in_valid(sum_valid), .sum, .cut(cut_q), .ta,
    .out_valid, .det, .thresh
  );

endmodule
