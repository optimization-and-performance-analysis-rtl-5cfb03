// tb_svm_mahalanobis: random models and feature vectors (N_FEAT = 4). The
// score and the Mahalanobis quadratic form are recomputed in floating point
// and must agree within 0.01; class and outlier flags are checked against
// the reference where the value is not within that margin of the decision
// boundary. Also checks the fixed latency of 22 clocks from start to done,
// and that both classes and both outlier outcomes occur.
module tb_svm_mahalanobis;
  import tb_ref_pkg::*;
  localparam int NF = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, class_out, outlier;
  logic signed [31:0] feat[NF], w[NF], bias, mu[NF], s_inv[NF][NF], threshold, score, dist2;
  int checks = 0, failures = 0;
  int n_cls[2], n_out[2];

  always #5 clk = ~clk;

  svm_mahalanobis #(.N_FEAT(NF)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [31:0] rq(input real lo, input real hi);
    real v;
    v = lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
    return 32'(longint'($floor(v * 1048576.0)));
  endfunction

  initial begin
    real r_score, r_d2, dv[NF], t;
    int lat;
    start = 0;
    n_cls = '{0, 0}; n_out = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      @(negedge clk);
      for (int i = 0; i < NF; i++) begin
        feat[i] = rq(-4.0, 4.0); w[i] = rq(-2.0, 2.0); mu[i] = rq(-1.0, 1.0);
        for (int j = 0; j < NF; j++) s_inv[i][j] = rq(-0.2, 0.2);
        s_inv[i][i] = rq(0.5, 1.5);
      end
      bias = rq(-2.0, 2.0);
      threshold = rq(5.0, 40.0);
      r_score = q20_to_real(bias);
      for (int i = 0; i < NF; i++) begin
        r_score += q20_to_real(w[i]) * q20_to_real(feat[i]);
        dv[i] = q20_to_real(feat[i]) - q20_to_real(mu[i]);
      end
      r_d2 = 0.0;
      for (int i = 0; i < NF; i++) begin
        t = 0.0;
        for (int j = 0; j < NF; j++) t += q20_to_real(s_inv[i][j]) * dv[j];
        r_d2 += dv[i] * t;
      end
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != 22) begin failures++; $display("FAIL latency %0d", lat); end
      if (abs_r(q20_to_real(score) - r_score) > 0.01) begin
        failures++; $display("FAIL score %f vs %f", q20_to_real(score), r_score);
      end
      if (abs_r(q20_to_real(dist2) - r_d2) > 0.01) begin
        failures++; $display("FAIL dist2 %f vs %f", q20_to_real(dist2), r_d2);
      end
      if (abs_r(r_score) > 0.01) begin
        checks++;
        if (class_out != (r_score >= 0.0)) begin failures++; $display("FAIL class"); end
      end
      if (abs_r(r_d2 - q20_to_real(threshold)) > 0.01) begin
        checks++;
        if (outlier != (r_d2 > q20_to_real(threshold))) begin failures++; $display("FAIL outlier"); end
      end
      n_cls[class_out]++;
      n_out[outlier]++;
    end
    checks++;
    if (n_cls[0] == 0 || n_cls[1] == 0 || n_out[0] == 0 || n_out[1] == 0) begin
      failures++; $display("FAIL coverage cls %0d/%0d out %0d/%0d", n_cls[0], n_cls[1], n_out[0], n_out[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
