// tb_dwt_core_pipeline: one 2048-sample frame through the three-level db4
// transform at one sample per clock, then a second frame with random stalls.
// Every level-3 approximation and detail coefficient is compared with a
// floating-point three-level reference (tolerance 0.02). Checks 250 outputs
// per frame, out_last on the last one, no input stall at full rate, and the
// frame timing: the last coefficient depends on input sample 2041 and leaves
// three clocks (one register per level) after it, 2044 clocks after the first
// sample of the frame. The mean and maximum absolute error over both frames
// must stay below 0.0003 and 0.0014.
module tb_dwt_core_pipeline;
  import tb_ref_pkg::*;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic signed [31:0] in_data, out_approx, out_detail;
  int checks = 0, failures = 0;
  real x[], a1[], d1[], a2[], d2[], a3[], d3[];
  logic signed [31:0] xq[];
  int m3, got, lasts;
  longint cyc = 0, t_first = -1, t_last = -1;
  real err_sum = 0.0, err_max = 0.0;
  int err_n = 0;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  dwt_core_pipeline dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("level-3 error vs floating point: mean %f max %f", err_sum / err_n, err_max);
    // precision the fixed-point chain is specified to reach against a
    // floating-point reference: mean absolute error 0.0003, maximum 0.0014
    checks += 2;
    if (err_sum / err_n > 0.0003) begin failures++; $display("FAIL mean error"); end
    if (err_max > 0.0014) begin failures++; $display("FAIL max error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks += 2;
      if (got >= m3 ||
          abs_r(q20_to_real(out_approx) - a3[got]) > 0.02 ||
          abs_r(q20_to_real(out_detail) - d3[got]) > 0.02) begin
        failures++;
        if (failures < 10 && got < m3)
          $display("FAIL k=%0d a3=%f (%f) d3=%f (%f)", got, q20_to_real(out_approx), a3[got],
                   q20_to_real(out_detail), d3[got]);
      end
      if (got < m3) begin
        real ea, ed;
        ea = abs_r(q20_to_real(out_approx) - a3[got]);
        ed = abs_r(q20_to_real(out_detail) - d3[got]);
        err_sum += ea + ed;
        err_n += 2;
        if (ea > err_max) err_max = ea;
        if (ed > err_max) err_max = ed;
      end
      if (out_last != (got == m3 - 1)) begin failures++; $display("FAIL last at %0d", got); end
      if (out_last) begin lasts++; t_last = cyc; end
      got++;
    end
  end

  initial begin
    int n1, n2;
    in_valid = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      xq = new[N]; x = new[N];
      for (int i = 0; i < N; i++) begin
        real v;
        // 15-cycle-per-400-sample burst-like tone plus noise, below 300
        v = 200.0 * $sin(6.2831853 * i / (f ? 64.0 : 150.0)) * $sin(3.14159265 * i / N)
            + real'($urandom_range(0, 160)) - 80.0;
        xq[i] = 32'(longint'($floor(v * 1048576.0)));
        x[i] = q20_to_real(xq[i]);
      end
      n1 = ref_level(x, N, a1, d1);
      n2 = ref_level(a1, n1, a2, d2);
      m3 = ref_level(a2, n2, a3, d3);
      got = 0; lasts = 0; t_first = -1;
      @(negedge clk);
      for (int i = 0; i < N; ) begin
        in_valid = (f == 0) ? 1'b1 : ($urandom_range(0, 4) != 0);
        in_data = xq[i];
        if (f == 1) out_ready = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (t_first < 0) t_first = cyc;
          i++;
        end else if (f == 0) begin
          checks++; failures++; $display("FAIL stall at full rate");
        end
        @(negedge clk);
      end
      in_valid = 0; out_ready = 1;
      repeat (20) @(negedge clk);
      checks += 2;
      if (got != 250 || m3 != 250) begin failures++; $display("FAIL %0d outputs", got); end
      if (lasts != 1) begin failures++; $display("FAIL %0d last flags", lasts); end
      if (f == 0) begin
        checks++;
        if (t_last - t_first != 2044) begin
          failures++; $display("FAIL frame time %0d, expected 2044", t_last - t_first);
        end
      end
    end
    $display("level-3 error vs floating point: mean %f max %f", err_sum / err_n, err_max);
    // precision the fixed-point chain is specified to reach against a
    // floating-point reference: mean absolute error 0.0003, maximum 0.0014
    checks += 2;
    if (err_sum / err_n > 0.0003) begin failures++; $display("FAIL mean error"); end
    if (err_max > 0.0014) begin failures++; $display("FAIL max error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
