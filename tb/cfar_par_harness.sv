// cfar_par_harness: stimulus and scoreboard for one k-parallel CFAR detector.
//
// Connects to a ca_cfar_parallel of the same K (the parent instantiates both).
// It streams NBEATS beats of K generated samples (noise, pulse interference
// and targets), leaving an idle clock before about one beat in STALL_DIV, and
// checks every decision against the reference CA-CFAR rule evaluated on the
// stored stream: for the b-th beat (b from 1, once b >= ceil((W+K-1)/K)),
// det[j] must be the decision on sample b*K-(W+K-1)+j+TEST_POS, four clocks
// after the beat. It counts the mechanisms seen: idle clocks, beats absorbed
// while the line fills, detections, non-detections, pulses above a fixed
// threshold that the adaptive threshold rejects, and runs of back-to-back
// outputs (K decisions per clock). done rises when the stream has drained.
module cfar_par_harness #(
  parameter int unsigned K         = 32,
  parameter int unsigned NBEATS    = 400,
  parameter int unsigned STALL_DIV = 6,
  parameter int unsigned DW        = 16,
  parameter int unsigned N         = 16,
  parameter int unsigned TP        = 8,
  parameter int unsigned TW        = 16,
  parameter int unsigned TF        = 12,
  parameter longint unsigned TA    = 600
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [TW-1:0] ta,
  output logic          in_valid,
  output logic [DW-1:0] in_data [K],
  input  logic          out_valid,
  input  logic [K-1:0]  det,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            n_stall,
  output int            n_fill,
  output int            n_det,
  output int            n_nodet,
  output int            n_reject,
  output int            n_b2b
);
  import cfar_tb_pkg::*;
  localparam int unsigned W = N + 1, L = W + K - 1, FILL = (L + K - 1) / K;
  localparam int unsigned FIXED_THR = 8000;   // a fixed threshold, for comparison only

  int unsigned s[$];
  logic [K-1:0] exp_q[$];
  int issue_q[$];
  int first_q[$];
  int cyc;
  logic last_out;

  assign ta = TW'(TA);

  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  initial begin
    checks = 0; failures = 0; n_stall = 0; n_fill = 0; n_det = 0; n_nodet = 0;
    n_reject = 0; n_b2b = 0; done = 0; last_out = 0;
  end

  // scoreboard
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      logic [K-1:0] e;
      int t0, first;
      if (exp_q.size() == 0) begin
        failures++; $display("K=%0d unexpected output at %0d", K, cyc);
      end else begin
        e = exp_q.pop_front();
        t0 = issue_q.pop_front();
        first = first_q.pop_front();
        checks += int'(K) + 1;
        if (det !== e) begin
          failures++; $display("K=%0d cyc %0d det %h exp %h", K, cyc, det, e);
        end
        if (cyc - t0 != 4) begin
          failures++; $display("K=%0d latency %0d", K, cyc - t0);
        end
        for (int j = 0; j < int'(K); j++) begin
          if (e[j]) n_det++; else n_nodet++;
          if (!e[j] && s[first + j] > FIXED_THR) n_reject++;
        end
        if (last_out) n_b2b++;
      end
    end
    last_out = out_valid;
  end

  // stimulus
  initial begin
    automatic int beats = 0;
    in_valid = 0;
    for (int j = 0; j < int'(K); j++) in_data[j] = '0;
    @(posedge rst_n);
    for (int b = 0; b < int'(NBEATS); b++) begin
      @(negedge clk);
      if ($urandom % STALL_DIV == 0) begin
        in_valid = 0;
        n_stall++;
        @(negedge clk);
      end
      in_valid = 1;
      for (int j = 0; j < int'(K); j++) begin
        in_data[j] = DW'(gen_sample());
        s.push_back(32'(in_data[j]));
      end
      beats++;
      if (beats >= int'(FILL)) begin
        logic [K-1:0] e;
        int first;
        first = beats * int'(K) - int'(L) + int'(TP);
        for (int j = 0; j < int'(K); j++) e[j] = ref_det(s, first + j, N, TP, TA, TF);
        exp_q.push_back(e);
        issue_q.push_back(cyc);
        first_q.push_back(first);
      end else n_fill++;
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("K=%0d %0d outputs missing", K, exp_q.size()); end
    done = 1;
  end
endmodule
