// tb_cfar_window_buffer: the shared window line with K = 5 and W = 17, a
// case where K does not divide W+K-1, so the fill rule matters. Beats of K
// consecutive samples are fed with random idle clocks; after every beat the
// whole line must hold the last W+K-1 samples in order, and line_valid must
// rise exactly on the beat that completes ceil((W+K-1)/K) beats.
module tb_cfar_window_buffer;
  localparam int unsigned DW = 16, W = 17, K = 5, L = W + K - 1, FILL = (L + K - 1) / K;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] in_data [K];
  logic line_valid;
  logic [DW-1:0] line [L];
  int checks = 0, failures = 0, beats = 0, n_idle = 0;
  int unsigned s[$];

  cfar_window_buffer #(.DATA_W(DW), .W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < int'(K); j++) in_data[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      if (in_valid) begin
        for (int j = 0; j < int'(K); j++) begin
          in_data[j] = DW'($urandom);
          s.push_back(in_data[j]);
        end
        beats++;
      end else n_idle++;
      @(negedge clk);
      // expected state one clock after the beat
      checks++;
      if (line_valid !== (in_valid && beats >= int'(FILL))) begin
        failures++; $display("t=%0d beats=%0d line_valid=%0b", t, beats, line_valid);
      end
      in_valid = 0;
      if (beats >= int'(FILL)) begin
        for (int i = 0; i < int'(L); i++) begin
          checks++;
          if (line[i] !== DW'(s[s.size() - L + i])) begin
            failures++; $display("t=%0d line[%0d]=%0h exp %0h", t, i, line[i], s[s.size()-L+i]);
          end
        end
      end
    end
    checks++;
    if (n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
