// cfar_window_buffer: shared sample line for K synchronized sliding windows.
//
// Holds the last L = W + K - 1 samples of the input stream, W being the
// window length (learning cells plus test cell). Each accepted input beat
// carries K consecutive samples (in_data[0] the oldest); the line shifts by K
// and the new samples enter at the top. Window j (j = 0..K-1) is cells
// j..j+W-1 of the line, so the K windows sit on K consecutive positions and
// share W-1 of their cells with their neighbour: every sample is stored once
// and read by up to W windows.
//
// Interface: in_valid/in_data[K] input beat (no back-pressure: the line takes
// a beat every clock if offered one); line[L] the stored samples, index 0 the
// oldest; line_valid is high for one clock after each beat once the line has
// been filled with real samples. Timing: line/line_valid update one clock
// after the beat. Until ceil(L/K) beats have arrived, line_valid stays low,
// so windows that would reach back before the first sample are never
// reported. The sharing of samples between the K windows follows the
// parallel scheme it is built for; the fill rule is this design's own choice.
// Reset (active low, synchronous) empties the line.
module cfar_window_buffer #(
  parameter int unsigned DATA_W = cfar_pkg::DATA_W,
  parameter int unsigned W      = cfar_pkg::N_LEARN + 1,
  parameter int unsigned K      = cfar_pkg::K_PAR,
  localparam int unsigned L     = W + K - 1,
  localparam int unsigned FILL  = (L + K - 1) / K,
  localparam int unsigned CNT_W = $clog2(FILL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data [K],
  output logic              line_valid,
  output logic [DATA_W-1:0] line [L]
);

  logic [CNT_W-1:0] beats;   // beats received, saturating at FILL

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beats      <= '0;
      line_valid <= 1'b0;
    end else begin
      line_valid <= in_valid && (32'(beats) + 1 >= FILL);
      if (in_valid && 32'(beats) < FILL) beats <= beats + 1'b1;
    end
    if (in_valid) begin
      for (int i = 0; i < int'(L - K); i++) line[i] <= line[i+K];
      for (int j = 0; j < int'(K); j++)     line[L-K+j] <= in_data[j];
    end
  end

  // the beat counter saturates and never passes the fill mark
  a_fill_bound: assert property (@(posedge clk) disable iff (!rst_n) 32'(beats) <= FILL);

endmodule
