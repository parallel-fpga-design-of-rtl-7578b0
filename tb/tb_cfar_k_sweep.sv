// tb_cfar_k_sweep: the k-parallel detector at every degree of parallelism in
// the evaluation (k = 1, 2, 4, 8, 10, 12, 16, 18, 32), each with 16 learning
// cells and 16-bit samples, run side by side on independent generated
// streams. Every decision of every instance is checked against the reference
// rule with its four-clock latency, and each instance must deliver k
// decisions per clock while its input is kept busy (back-to-back outputs).
module tb_cfar_k_sweep;
  localparam int NK = 9;
  localparam int unsigned KS [NK] = '{1, 2, 4, 8, 10, 12, 16, 18, 32};
  logic clk = 0, rst_n = 0;
  int checks [NK], failures [NK], n_b2b [NK], n_det [NK], n_reject [NK];
  logic [NK-1:0] done;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NK; g++) begin : g_k
    localparam int unsigned K = KS[g];
    logic [15:0] ta;
    logic in_valid, out_valid;
    logic [15:0] in_data [K];
    logic [K-1:0] det;
    int n_stall, n_fill, n_nodet;

    ca_cfar_parallel #(.K(K)) dut (.clk, .rst_n, .ta, .in_valid, .in_data, .out_valid, .det);

    cfar_par_harness #(.K(K), .NBEATS(300)) u_h (
      .clk, .rst_n, .ta, .in_valid, .in_data, .out_valid, .det, .done(done[g]),
      .checks(checks[g]), .failures(failures[g]), .n_stall, .n_fill, .n_det(n_det[g]),
      .n_nodet, .n_reject(n_reject[g]), .n_b2b(n_b2b[g])
    );
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    automatic int c = 0, f = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    for (int g = 0; g < NK; g++) begin
      $display("k=%0d checks=%0d failures=%0d detections=%0d rejected pulses=%0d back-to-back=%0d",
               KS[g], checks[g], failures[g], n_det[g], n_reject[g], n_b2b[g]);
      c += checks[g] + 1;
      f += failures[g];
      if (n_b2b[g] == 0 || n_det[g] == 0) f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
