// tb_ca_cfar: one CA-CFAR unit slid over a generated noise/interference/
// target stream. Each clock (with occasional idle clocks) the window at the
// next position is applied; the decision must equal the reference CA-CFAR
// rule and arrive exactly three clocks later; the threshold TA*r must be
// exact two clocks after the window. Detections and non-detections
// must both occur.
module tb_ca_cfar;
  import cfar_tb_pkg::*;
  localparam int unsigned DW = 16, N = 16, TP = 8, TW = 16, TF = 12;
  localparam int unsigned PW = TW + cfar_pkg::sum_width(N, DW);
  localparam int unsigned NS = 1200;
  localparam longint unsigned TA = 600;   // about 0.146: threshold ~2.3x the cell mean

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [DW-1:0] win [N+1];
  logic [TW-1:0] ta = TW'(TA);
  logic out_valid, det;
  logic [PW-1:0] thresh;
  int checks = 0, failures = 0, n_det = 0, n_nodet = 0;
  int unsigned s[$];
  bit exp_q[$];
  int cyc = 0, issue_q[$];
  longint unsigned thr_q[$];
  int thr_t_q[$];

  ca_cfar #(.DATA_W(DW), .N(N), .TEST_POS(TP), .TA_W(TW), .TA_FRAC(TF)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    bit e;
    int t0;
    e  = exp_q.pop_front();
    t0 = issue_q.pop_front();
    checks += 2;
    if (det !== e) begin failures++; $display("cyc %0d det %0b exp %0b", cyc, det, e); end
    if (cyc - t0 != 3) begin failures++; $display("latency %0d", cyc - t0); end
    if (det) n_det++; else n_nodet++;
  end

  // the threshold Hd is visible two clocks after the window
  always @(negedge clk) if (rst_n && thr_t_q.size() != 0 && cyc - thr_t_q[0] == 2) begin
    longint unsigned e;
    void'(thr_t_q.pop_front());
    e = thr_q.pop_front();
    checks++;
    if (thresh !== PW'(e)) begin failures++; $display("cyc %0d thresh %0d exp %0d", cyc, thresh, e); end
  end

  initial begin
    for (int i = 0; i < int'(NS); i++) s.push_back(gen_sample());
    for (int c = 0; c <= int'(N); c++) win[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = TP; p < int'(NS) - int'(N - TP); p++) begin
      @(negedge clk);
      if (p % 11 == 5) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      for (int c = 0; c <= int'(N); c++) win[c] = DW'(s[p - TP + c]);
      exp_q.push_back(ref_det(s, p, N, TP, TA, TF));
      issue_q.push_back(cyc);
      thr_q.push_back(ref_sum(s, p, N, TP) * TA);
      thr_t_q.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || thr_q.size() != 0 || n_det == 0 || n_nodet == 0) failures++;
    $display("detections=%0d non-detections=%0d", n_det, n_nodet);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
