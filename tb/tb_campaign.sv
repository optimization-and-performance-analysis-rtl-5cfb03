// tb_campaign: a full test case of the monitoring system, 34 acquisitions of
// the four receivers (136 waveforms), run back to back at the default size.
// Each acquisition carries a differently delayed and scaled echo per
// receiver. After each one, all 4 x 250 filtered words are read and compared
// with a floating-point three-level db4 approximation (within one LSB), and
// 64 raw words per channel are spot-checked. Also checks the burst length,
// that each acquisition ends within 20 clocks of its last ADC sample, and
// that the filtered output of an echo-free channel stays near zero.
module tb_campaign;
  import tb_ref_pkg::*;
  localparam int N = 2048, NC = 4, NK = 250, NF = 4, N_ACQ = 34;
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
  int codes[NC][N];
  int dac_count, waveforms = 0;
  longint cyc = 0, t_done;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;
  always @(posedge clk) if (rst_n && dac_valid) dac_count++;
  always @(posedge clk) if (rst_n && done) t_done = cyc;

  shm_top dut (.*);

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_word(input bit f, input int c, input int a, output int v);
    @(negedge clk);
    rd_filtered = f; rd_ch = 2'(c); rd_addr = 11'(a);
    @(negedge clk);
    v = int'(rd_data);
  endtask

  initial begin
    real x[], a1[], d1[], a2[], d2[], a3[], d3[];
    int n1, n2, v;
    longint t_last;
    start = 0; rd_filtered = 0; rd_ch = 0; rd_addr = 0; svm_start = 0;
    svm_bias = 0; maha_threshold = 0;
    for (int i = 0; i < NF; i++) begin
      feat[i] = 0; svm_w[i] = 0; maha_mu[i] = 0;
      for (int j = 0; j < NF; j++) maha_sinv[i][j] = 0;
    end
    for (int c = 0; c < NC; c++) begin adc_valid[c] = 0; adc_data[c] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int acq = 0; acq < N_ACQ; acq++) begin
      for (int c = 0; c < NC; c++)
        for (int i = 0; i < N; i++) begin
          real t, env, amp;
          t = real'(i - 150 - 120 * c - 7 * acq);
          env = (t > 0.0 && t < 500.0) ? $sin(3.14159265 * t / 500.0) : 0.0;
          // receiver 3 sees no echo in every fifth acquisition
          amp = (c == 3 && acq % 5 == 0) ? 0.0 : 200.0 + 5.0 * acq + 40.0 * c;
          codes[c][i] = int'($floor(2048.0 + amp * env * $sin(6.2831853 * 0.015 * t)
                                    + real'($urandom_range(0, 10)) - 5.0));
        end
      dac_count = 0;
      t_done = -1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < N; i++)
        for (int slot = 0; slot < 100; slot++) begin
          @(negedge clk);
          for (int c = 0; c < NC; c++) begin
            adc_valid[c] = (slot == 5 + 25 * c);
            adc_data[c] = 16'(codes[c][i]);
          end
        end
      t_last = cyc - 25;
      @(negedge clk);
      for (int c = 0; c < NC; c++) adc_valid[c] = 0;
      while (t_done < 0) @(negedge clk);
      checks += 2;
      if (t_done - t_last > 20) begin failures++; $display("FAIL acq %0d done late", acq); end
      if (dac_count != 233) begin failures++; $display("FAIL acq %0d burst %0d", acq, dac_count); end
      for (int c = 0; c < NC; c++) begin
        real peak;
        x = new[N];
        for (int i = 0; i < N; i++) x[i] = real'(codes[c][i] - 2048);
        n1 = ref_level(x, N, a1, d1);
        n2 = ref_level(a1, n1, a2, d2);
        void'(ref_level(a2, n2, a3, d3));
        peak = 0.0;
        for (int k = 0; k < NK; k++) begin
          read_word(1, c, k, v);
          checks++;
          if (abs_r(real'($signed(16'(v))) - $floor(a3[k] * 16.0)) > 1.0) begin
            failures++;
            if (failures < 10) $display("FAIL acq %0d ch%0d A3[%0d]=%0d", acq, c, k, $signed(16'(v)));
          end
          if (abs_r(real'($signed(16'(v)))) > peak) peak = abs_r(real'($signed(16'(v))));
        end
        if (c == 3 && acq % 5 == 0) begin
          checks++;
          if (peak > 16.0 * 40.0) begin failures++; $display("FAIL quiet channel peak %f", peak); end
        end
        for (int s = 0; s < 64; s++) begin
          int a;
          a = int'($urandom_range(0, N - 1));
          read_word(0, c, a, v);
          checks++;
          if (v != codes[c][a]) begin failures++; $display("FAIL acq %0d raw ch%0d[%0d]", acq, c, a); end
        end
        waveforms++;
      end
    end
    checks++;
    if (waveforms != 136) begin failures++; $display("FAIL %0d waveforms", waveforms); end
    $display("waveforms acquired and checked: %0d", waveforms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
