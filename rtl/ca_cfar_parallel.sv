// ca_cfar_parallel: k-parallel cell-averaging CFAR detector.
//
// K identical CA-CFAR units slide over the input sequence side by side: unit
// j always tests the sample one position after unit j-1, so one clock yields
// K decisions and the stream is processed K samples per clock. The units do
// not keep their own sample stores; they all read their windows from one
// shared line (cfar_window_buffer) of W + K - 1 samples, W = N + 1.
//
// Interface: each clock with in_valid high delivers K consecutive 16-bit
// samples in_data[0..K-1] (in_data[0] the oldest). ta is the CFAR factor TA,
// shared by all units, unsigned with TA_FRAC fraction bits. det[j] is the
// decision for the test cell of unit j, qualified by out_valid.
// Timing: det/out_valid follow the input beat by four clocks (one in the
// line, three in the units). For the beat that brings the line to its b-th
// state (b counting accepted beats from 1), det[j] belongs to input sample
// b*K - (W+K-1) + j + TEST_POS. No decision is produced until the line holds
// W+K-1 real samples. Reset is active low and synchronous.
// The parallel arrangement and shared window follow the k-parallel scheme;
// the pipeline, fill rule and test-cell position are this design's choices.
module ca_cfar_parallel #(
  parameter int unsigned DATA_W   = cfar_pkg::DATA_W,
  parameter int unsigned N        = cfar_pkg::N_LEARN,
  parameter int unsigned TEST_POS = cfar_pkg::TEST_POS,
  parameter int unsigned K        = cfar_pkg::K_PAR,
  parameter int unsigned TA_W     = cfar_pkg::TA_W,
  parameter int unsigned TA_FRAC  = cfar_pkg::TA_FRAC,
  localparam int unsigned W       = N + 1,
  localparam int unsigned L       = W + K - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TA_W-1:0]   ta,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data [K],
  output logic              out_valid,
  output logic [K-1:0]      det
);

  logic              line_valid;
  logic [DATA_W-1:0] line [L];
  logic [K-1:0]      unit_valid;

  cfar_window_buffer #(.DATA_W(DATA_W), .W(W), .K(K)) u_line (
    .clk, .rst_n, .in_valid, .in_data, .line_valid, .line
  );

  for (genvar j = 0; j < int'(K); j++) begin : g_unit
    logic [DATA_W-1:0] win [W];
    always_comb
      for (int c = 0; c < int'(W); c++) win[c] = line[j+c];

    ca_cfar #(.DATA_W(DATA_W), .N(N), .TEST_POS(TEST_POS), .TA_W(TA_W), .TA_FRAC(TA_FRAC)) u_cfar (
      .clk, .rst_n, .in_valid(line_valid), .win, .ta,
      .out_valid(unit_valid[j]), .det(det[j]), .thresh()
    );
  end

  assign out_valid = unit_valid[0];

  // all units run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) unit_valid == '0 || unit_valid == '1);

endmodule
