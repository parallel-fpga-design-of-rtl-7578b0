// tb_ca_cfar_parallel: end-to-end test of the k-parallel CFAR detector at its
// default size (32 units, 16 learning cells, 16-bit samples). 400 beats of 32
// generated samples are streamed with idle clocks between some beats; every
// one of the 32 decisions per beat is checked against the reference CA-CFAR
// rule, with the four-clock latency. Each mechanism of the design must be
// seen at least once: an idle input clock, beats absorbed while the window
// line fills, detections and non-detections, a pulse above a fixed threshold
// that the adaptive threshold rejects, and back-to-back output beats.
module tb_ca_cfar_parallel;
  localparam int unsigned K = cfar_pkg::K_PAR;
  logic clk = 0, rst_n = 0;
  logic [15:0] ta;
  logic in_valid, out_valid, done;
  logic [15:0] in_data [K];
  logic [K-1:0] det;
  int checks, failures, n_stall, n_fill, n_det, n_nodet, n_reject, n_b2b;

  ca_cfar_parallel dut (.clk, .rst_n, .ta, .in_valid, .in_data, .out_valid, .det);

  cfar_par_harness #(.K(K)) u_h (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    f = failures;
    if (n_stall == 0)  begin f++; $display("no idle input clock"); end
    if (n_fill == 0)   begin f++; $display("no fill beat"); end
    if (n_det == 0)    begin f++; $display("no detection"); end
    if (n_nodet == 0)  begin f++; $display("no non-detection"); end
    if (n_reject == 0) begin f++; $display("no rejected pulse"); end
    if (n_b2b == 0)    begin f++; $display("no back-to-back outputs"); end
    $display("idle=%0d fill=%0d det=%0d nodet=%0d rejected=%0d back-to-back=%0d",
             n_stall, n_fill, n_det, n_nodet, n_reject, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 6, f);
    $finish;
  end
endmodule
