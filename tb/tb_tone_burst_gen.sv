// tb_tone_burst_gen: one burst at the default rates. Checks that exactly
// 233 samples (3.5 cycles of 15 kHz at 1 MS/s) come out, one every 100
// clocks, each within 4 LSB of
//   2048 + 2047 * sin(2*pi*15e3*n/1e6) * sin^2(pi*n/233)
// computed in floating point, that busy covers the burst and that done
// pulses once; then a second burst reproduces the first.
module tb_tone_burst_gen;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, dac_valid;
  logic [11:0] dac_data;
  int checks = 0, failures = 0;
  int n = 0, dones = 0;
  longint cyc = 0, t_prev = -1;
  int first[233];
  int burst = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  tone_burst_gen dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && dac_valid) begin
      real e;
      e = 2048.0 + 2047.0 * $sin(6.283185307 * 15000.0 * n / 1.0e6)
          * $sin(3.141592654 * n / 233.0) * $sin(3.141592654 * n / 233.0);
      checks++;
      if (real'(dac_data) - e > 4.0 || e - real'(dac_data) > 4.0) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d dac=%0d exp=%f", n, dac_data, e);
      end
      if (burst == 0 && n < 233) first[n] = int'(dac_data);
      else if (n < 233) begin
        checks++;
        if (first[n] != int'(dac_data)) failures++;
      end
      if (t_prev >= 0) begin
        checks++;
        if (cyc - t_prev != 100) begin failures++; $display("FAIL spacing %0d", cyc - t_prev); end
      end
      t_prev = cyc;
      n++;
    end
    if (rst_n && done) dones++;
  end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (burst = 0; burst < 2; burst++) begin
      n = 0; dones = 0; t_prev = -1;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy not set"); end
      while (busy) @(negedge clk);
      repeat (5) @(negedge clk);
      checks += 3;
      if (n != 233) begin failures++; $display("FAIL %0d samples", n); end
      if (dones != 1) begin failures++; $display("FAIL %0d done pulses", dones); end
      if (dac_data != 12'd2048) begin failures++; $display("FAIL idle level %0d", dac_data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
