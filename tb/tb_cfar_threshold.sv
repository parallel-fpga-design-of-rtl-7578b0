// tb_cfar_threshold: checks Hd = TA*r and the decision Hd <= x_z.
// Random sums, factors and test cells, plus cases placed exactly on the
// threshold (equality must detect) and one step below it. The two-clock
// latency of the decision is checked on every input.
module tb_cfar_threshold;
  localparam int unsigned DW = 16, SW = 20, TW = 16, TF = 12, PW = TW + SW;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [SW-1:0] sum;
  logic [DW-1:0] cut;
  logic [TW-1:0] ta;
  logic out_valid, det;
  logic [PW-1:0] thresh;
  int checks = 0, failures = 0, n_det = 0, n_edge = 0;

  cfar_threshold #(.DATA_W(DW), .SUM_W(SW), .TA_W(TW), .TA_FRAC(TF)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_q[$];
  longint unsigned thr_q[$];

  // scoreboard: every input comes out two clocks later
  logic v_d1, v_d2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d1 <= 1'b0;
      v_d2 <= 1'b0;
    end else begin
      v_d1 <= in_valid;
      v_d2 <= v_d1;
    end
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== v_d2) begin failures++; $display("latency mismatch"); end
    if (out_valid) begin
      bit e;
      e = exp_q.pop_front();
      checks++;
      if (det !== e) begin failures++; $display("det %0b exp %0b", det, e); end
      if (det) n_det++;
    end
  end
  always @(negedge clk) if (rst_n && v_d1) begin
    longint unsigned t;
    t = thr_q.pop_front();
    checks++;
    if (thresh !== PW'(t)) begin failures++; $display("thresh %0d exp %0d", thresh, t); end
  end

  initial begin
    longint unsigned hd;
    sum = '0; cut = '0; ta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = (t % 5 != 2);
      sum = SW'($urandom);
      ta  = TW'($urandom % 4096);
      cut = DW'($urandom);
      if (t % 4 == 1) begin
        // place the test cell on the threshold or one below it
        ta  = TW'(1 << TF);                      // TA = 1.0
        sum = SW'($urandom % 65536);
        cut = (t % 8 == 1) ? DW'(sum) : DW'(sum - 1);
        if (in_valid) n_edge++;
      end else if (t % 4 == 3) begin
        sum = SW'($urandom % 65536);
        ta  = TW'(256 + $urandom % 512);
      end
      hd = longint'(sum) * longint'(ta);
      if (in_valid) begin
        exp_q.push_back(hd <= (longint'(cut) << TF));
        thr_q.push_back(hd);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_det == 0 || n_edge == 0 || exp_q.size() != 0) failures++;
    $display("detections=%0d edge cases=%0d", n_det, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
