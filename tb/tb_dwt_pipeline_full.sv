// tb_dwt_pipeline_full: raw 12-bit ADC codes in, int16 level-3
// approximation coefficients out (the default band). The reference removes the 2048 offset, runs the
// three-level db4 transform in floating point and scales by 16; each output
// may differ from floor(reference) by at most one LSB (1/16). Checks 250
// outputs and one last flag per frame, one sample per clock without stalls,
// and the frame timing at full rate: 8 clocks of conversion, three levels and
// one output register after input sample 2041, i.e. the final coefficient is
// taken 2053 clocks after the first sample. A second frame runs with random
// gaps and backpressure.
module tb_dwt_pipeline_full;
  import tb_ref_pkg::*;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic [15:0] in_data;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;
  real x[], a1[], d1[], a2[], d2[], a3[], d3[];
  int codes[];
  int m3, got, lasts;
  longint cyc = 0, t_first = -1, t_last = -1;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  dwt_pipeline_full dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      real e;
      checks++;
      e = (got < m3) ? $floor(a3[got] * 16.0) : 1.0e9;
      if (abs_r(real'(out_data) - e) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d out=%0d ref=%f", got, out_data, e);
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
      codes = new[N]; x = new[N];
      for (int i = 0; i < N; i++) begin
        real v;
        v = 2048.0 + 300.0 * $sin(6.2831853 * i / (f ? 20.0 : 70.0)) + real'($urandom_range(0, 100));
        codes[i] = int'($floor(v));
        x[i] = real'(codes[i] - 2048);
      end
      n1 = ref_level(x, N, a1, d1);
      n2 = ref_level(a1, n1, a2, d2);
      m3 = ref_level(a2, n2, a3, d3);
      got = 0; lasts = 0; t_first = -1;
      @(negedge clk);
      for (int i = 0; i < N; ) begin
        in_valid = (f == 0) ? 1'b1 : ($urandom_range(0, 4) != 0);
        in_data = 16'(codes[i]);
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
      repeat (30) @(negedge clk);
      checks += 2;
      if (got != 250) begin failures++; $display("FAIL %0d outputs", got); end
      if (lasts != 1) begin failures++; $display("FAIL %0d last flags", lasts); end
      if (f == 0) begin
        checks++;
        if (t_last - t_first != 2053) begin
          failures++; $display("FAIL frame time %0d, expected 2053", t_last - t_first);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
