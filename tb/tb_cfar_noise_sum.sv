// tb_cfar_noise_sum: checks the learning-window adder against a direct sum.
// Drives random windows (including all-ones, the widest possible sum) one per
// clock with gaps, and checks sum and the carried test cell one clock later.
module tb_cfar_noise_sum;
  localparam int unsigned DW = 16, N = 16, SW = cfar_pkg::sum_width(N, DW);
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] learn [N];
  logic [DW-1:0] cut;
  logic out_valid;
  logic [SW-1:0] sum;
  logic [DW-1:0] cut_q;
  int checks = 0, failures = 0;

  cfar_noise_sum #(.DATA_W(DW), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp_sum;
    logic [DW-1:0] exp_cut;
    for (int i = 0; i < int'(N); i++) learn[i] = '0;
    cut = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    if (out_valid !== 1'b0) failures++;
    checks++;
    for (int t = 0; t < 400; t++) begin
      exp_sum = 0;
      for (int i = 0; i < int'(N); i++) begin
        learn[i] = (t == 0) ? '1 : DW'($urandom);
        exp_sum += 64'(learn[i]);
      end
      cut = DW'($urandom);
      exp_cut = cut;
      in_valid = (t % 7 != 3);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++; $display("valid mismatch t=%0d", t);
      end
      if (in_valid) begin
        checks++;
        if (sum !== SW'(exp_sum) || cut_q !== exp_cut) begin
          failures++; $display("t=%0d sum %0d exp %0d", t, sum, exp_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
