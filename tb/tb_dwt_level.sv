// tb_dwt_level: runs two frames of 2048 samples through one db4 level and
// compares every approximation and detail coefficient with a floating-point
// reference (tolerance 0.01). The first frame streams one sample per clock
// with no stalls and checks that the level never stalls and emits exactly
// (2048-8)/2+1 = 1021 pairs with out_last on the final one. The second frame
// adds random gaps on the input and random backpressure on the output.
module tb_dwt_level;
  import tb_ref_pkg::*;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic signed [31:0] in_data, out_approx, out_detail;
  int checks = 0, failures = 0;
  real x[], ra[], rd[];
  int m, got, lasts;
  logic signed [31:0] xq[];

  always #5 clk = ~clk;

  dwt_level #(.N_IN(N)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks += 2;
      if (got < m) begin
        if (abs_r(q20_to_real(out_approx) - ra[got]) > 0.01 ||
            abs_r(q20_to_real(out_detail) - rd[got]) > 0.01) begin
          failures++;
          if (failures < 10)
            $display("FAIL k=%0d a=%f (%f) d=%f (%f)", got, q20_to_real(out_approx), ra[got],
                     q20_to_real(out_detail), rd[got]);
        end
      end else failures++;
      if (out_last != (got == m - 1)) begin
        failures++; $display("FAIL last flag at k=%0d", got);
      end
      if (out_last) lasts++;
      got++;
    end
  end

  task automatic make_frame(input int seed_kind);
    xq = new[N];
    x = new[N];
    for (int i = 0; i < N; i++) begin
      real v;
      v = 700.0 * $sin(6.2831853 * i / (seed_kind ? 37.0 : 90.0))
          + real'($urandom_range(0, 600)) - 300.0 + real'($urandom_range(0, 1023)) / 1024.0;
      xq[i] = 32'(longint'($floor(v * 1048576.0)));
      x[i] = q20_to_real(xq[i]);
    end
    m = ref_level(x, N, ra, rd);
  endtask

  initial begin
    in_valid = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      make_frame(f);
      got = 0; lasts = 0;
      @(negedge clk);
      for (int i = 0; i < N; ) begin
        in_valid = (f == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        in_data = xq[i];
        if (f == 1) out_ready = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        if (in_valid && in_ready) i++;
        else if (f == 0) begin
          checks++; failures++; $display("FAIL level stalled a continuous stream");
        end
        @(negedge clk);
      end
      in_valid = 0; out_ready = 1;
      repeat (10) @(negedge clk);
      checks += 2;
      if (got != 1021) begin failures++; $display("FAIL frame %0d: %0d pairs", f, got); end
      if (lasts != 1) begin failures++; $display("FAIL frame %0d: %0d last flags", f, lasts); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
