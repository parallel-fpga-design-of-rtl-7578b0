// cfar_noise_sum: noise and interference estimate of one CA-CFAR window.
//
// Adds the N learning cells of a window, r = x_1 + ... + x_N, and registers
// the result together with the window's test cell, so the test cell stays
// aligned with its estimate in the next stage. The sum is written as one
// combinational reduction; synthesis builds the adder tree. Its width is
// b_r = DATA_W + ceil(log2 N), enough for N full-scale samples, so the sum
// never overflows.
//
// Interface: learn[] holds the N learning cells, cut the test cell, in_valid
// qualifies them. Timing: one register stage; sum/cut_q/out_valid appear one
// clock after the inputs. Reset (active low, synchronous) clears out_valid.
// The sum itself follows the CA-CFAR definition; the register placement is
// this design's own choice.
module cfar_noise_sum #(
  parameter int unsigned DATA_W = cfar_pkg::DATA_W,
  parameter int unsigned N      = cfar_pkg::N_LEARN,
  localparam int unsigned SUM_W = cfar_pkg::sum_width(N, DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] learn [N],
  input  logic [DATA_W-1:0] cut,
  output logic              out_valid,
  output logic [SUM_W-1:0]  sum,
  output logic [DATA_W-1:0] cut_q
);

  logic [SUM_W-1:0] sum_d;

  always_comb begin
    sum_d = '0;
    for (int i = 0; i < int'(N); i++) sum_d += SUM_W'(learn[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) begin
      sum   <= sum_d;
      cut_q <= cut;
    end
  end

endmodule
