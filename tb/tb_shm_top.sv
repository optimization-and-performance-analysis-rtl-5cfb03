// tb_shm_top: end-to-end test of the monitoring front end at its default
// size (2048 samples per channel, four channels, 100 MHz clock, 1 MS/s
// converters, 15 kHz burst).
//
// Two acquisitions are run. For each, the four ADC channels deliver one
// sample every 100 clocks, each channel with its own phase, carrying a
// delayed, windowed 15 kHz echo plus noise around mid-scale. After `done`
// every raw word of every channel is read back and compared with what was
// sent, and every filtered word is compared with a floating-point
// three-level db4 approximation of the same samples (offset removed, scaled
// by 16, within one LSB). The DAC must deliver the 233-sample burst, and
// `done` must follow the last ADC sample within 20 clocks. The classifier is
// then run on feature vectors chosen to give both classes and both outlier
// outcomes. Mechanisms counted (each must occur): burst, complete
// acquisition, raw readout, filtered readout, classification into each class,
// outlier rejection, inlier.
module tb_shm_top;
  import tb_ref_pkg::*;
  localparam int N = 2048, NC = 4, NK = 250, NF = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic adc_valid[NC];
  logic [15:0] adc_data[NC];
  logic dac_valid;
  logic [11:0] dac_data;
  logic rd_filtered;
  logic [1:0] rd_ch;
  logic [10:0] rd_addr;
  logic [15:0] rd_data;
  logic svm_start, svm_busy, svm_done, svm_class, svm_outlier;
  logic signed [31:0] feat[NF], svm_w[NF], svm_bias, maha_mu[NF], maha_sinv[NF][NF], maha_threshold;
  logic signed [31:0] svm_score, maha_dist2;

  int checks = 0, failures = 0;
  int n_burst = 0, n_acq = 0, n_raw_rd = 0, n_filt_rd = 0, n_cls0 = 0, n_cls1 = 0, n_out = 0, n_in = 0;
  int dac_count;
  int codes[NC][N];
  longint cyc = 0, t_last_adc, t_done;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  shm_top dut (.*);

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dac_valid) dac_count++;
  always @(posedge clk) if (rst_n && done) t_done = cyc;

  task automatic make_codes(input int acq);
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N; i++) begin
        real t, v, env;
        t = real'(i - 200 - 150 * c - 40 * acq);
        env = (t > 0.0 && t < 600.0) ? $sin(3.14159265 * t / 600.0) : 0.0;
        v = 2048.0 + (300.0 + 50.0 * c) * env * $sin(6.2831853 * 0.015 * t)
            + real'($urandom_range(0, 40)) - 20.0;
        codes[c][i] = int'($floor(v));
      end
  endtask

  // four converters, 1 MS/s each, staggered phases
  task automatic feed_adcs();
    for (int i = 0; i < N; i++) begin
      for (int slot = 0; slot < 100; slot++) begin
        @(negedge clk);
        for (int c = 0; c < NC; c++) begin
          adc_valid[c] = (slot == 10 + 20 * c);
          adc_data[c] = adc_valid[c] ? 16'(codes[c][i]) : 16'hDEAD;
        end
      end
    end
    @(negedge clk);
    for (int c = 0; c < NC; c++) adc_valid[c] = 0;
    t_last_adc = cyc - 30;  // channel 3 took its last sample at slot 70
  endtask

  // Pipelined readout: a new (buffer, channel, address) every clock, the data
  // of the previous request checked at the same time. Raw and filtered words
  // of different channels are interleaved so the read mux switches every clock.
  task automatic check_buffers();
    real x[], a1[], d1[], a2[], d2[], a3[], d3[];
    int n1, n2;
    real ref_a3[NC][NK];
    bit p_v, p_f;
    int p_c, p_a;
    for (int c = 0; c < NC; c++) begin
      x = new[N];
      for (int i = 0; i < N; i++) x[i] = real'(codes[c][i] - 2048);
      n1 = ref_level(x, N, a1, d1);
      n2 = ref_level(a1, n1, a2, d2);
      void'(ref_level(a2, n2, a3, d3));
      for (int k = 0; k < NK; k++) ref_a3[c][k] = $floor(a3[k] * 16.0);
    end
    p_v = 0;
    for (int i = 0; i <= N * NC + NK * NC; i++) begin
      bit f;
      int c, a;
      @(negedge clk);
      // every 9th request goes to a filtered buffer until they are all read;
      // the final pass only collects the last word
      if (i == N * NC + NK * NC) begin
        f = 0; c = 0; a = 0;
      end else if (i % 9 == 8 && i / 9 < NK * NC) begin
        f = 1; c = (i / 9) % NC; a = (i / 9) / NC;
      end else begin
        int r;
        r = i - ((i / 9 < NK * NC) ? (i / 9) : NK * NC);
        f = 0; c = r % NC; a = r / NC;
      end
      // the next request is already on the port while the previous word is read
      rd_filtered = f; rd_ch = 2'(c); rd_addr = 11'(a);
      #1;
      if (p_v) begin
        checks++;
        if (p_f) begin
          n_filt_rd++;
          if (abs_r(real'($signed(rd_data)) - ref_a3[p_c][p_a]) > 1.0) begin
            failures++;
            if (failures < 10) $display("FAIL filt ch%0d[%0d]=%0d exp %f", p_c, p_a, $signed(rd_data), ref_a3[p_c][p_a]);
          end
        end else begin
          n_raw_rd++;
          if (int'(rd_data) != codes[p_c][p_a]) begin
            failures++;
            if (failures < 10) $display("FAIL raw ch%0d[%0d]=%0d exp %0d", p_c, p_a, rd_data, codes[p_c][p_a]);
          end
        end
      end
      p_v = 1; p_f = f; p_c = c; p_a = a;
    end
  endtask

  function automatic logic signed [31:0] q(input real v);
    return 32'(longint'($floor(v * 1048576.0)));
  endfunction

  task automatic classify(input real f0, input real f1, input real f2, input real f3);
    real fv[NF], score, d2;
    int lat;
    fv = '{f0, f1, f2, f3};
    @(negedge clk);
    score = -0.5;
    d2 = 0.0;
    for (int i = 0; i < NF; i++) begin
      feat[i] = q(fv[i]);
      score += real'(i + 1) * 0.25 * q20_to_real(feat[i]);
      d2 += (q20_to_real(feat[i]) - 0.5) * (q20_to_real(feat[i]) - 0.5) * 2.0;
    end
    svm_start = 1;
    @(negedge clk);
    svm_start = 0;
    lat = 1;
    while (!svm_done && lat < 100) begin @(negedge clk); lat++; end
    checks += 4;
    if (lat != 22) begin failures++; $display("FAIL classifier latency %0d", lat); end
    if (abs_r(q20_to_real(svm_score) - score) > 0.01) begin failures++; $display("FAIL score"); end
    if (abs_r(q20_to_real(maha_dist2) - d2) > 0.01) begin failures++; $display("FAIL dist2"); end
    if (svm_class != (score >= 0.0) || svm_outlier != (d2 > 9.0)) begin
      failures++; $display("FAIL decision");
    end
    if (svm_class) n_cls1++; else n_cls0++;
    if (svm_outlier) n_out++; else n_in++;
  endtask

  initial begin
    start = 0; rd_filtered = 0; rd_ch = 0; rd_addr = 0; svm_start = 0;
    for (int c = 0; c < NC; c++) begin adc_valid[c] = 0; adc_data[c] = 0; end
    for (int i = 0; i < NF; i++) begin
      feat[i] = 0;
      svm_w[i] = q(real'(i + 1) * 0.25);
      maha_mu[i] = q(0.5);
      for (int j = 0; j < NF; j++) maha_sinv[i][j] = (i == j) ? q(2.0) : 0;
    end
    svm_bias = q(-0.5);
    maha_threshold = q(9.0);
    repeat (5) @(posedge clk);
    rst_n = 1;

    for (int acq = 0; acq < 2; acq++) begin
      make_codes(acq);
      dac_count = 0;
      t_done = -1;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy after start"); end
      feed_adcs();
      while (!done && t_done < 0) @(negedge clk);
      repeat (2) @(negedge clk);
      checks += 3;
      if (t_done - t_last_adc > 20 || t_done < t_last_adc) begin
        failures++; $display("FAIL done %0d clocks after last sample", t_done - t_last_adc);
      end
      if (dac_count != 233) begin failures++; $display("FAIL burst had %0d samples", dac_count); end
      else n_burst++;
      if (busy) begin failures++; $display("FAIL still busy"); end
      n_acq++;
      check_buffers();
    end

    classify(0.5, 0.5, 0.5, 0.5);    // inside, class 1
    classify(0.1, 0.2, 0.1, 0.2);    // inside, class 0
    classify(3.0, 3.0, 3.0, 3.0);    // outlier, class 1
    classify(-2.0, -2.5, -2.0, -1.0); // outlier, class 0

    checks++;
    if (n_burst == 0 || n_acq == 0 || n_raw_rd == 0 || n_filt_rd == 0 ||
        n_cls0 == 0 || n_cls1 == 0 || n_out == 0 || n_in == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: bursts=%0d acquisitions=%0d raw_reads=%0d filtered_reads=%0d class0=%0d class1=%0d outliers=%0d inliers=%0d",
             n_burst, n_acq, n_raw_rd, n_filt_rd, n_cls0, n_cls1, n_out, n_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
