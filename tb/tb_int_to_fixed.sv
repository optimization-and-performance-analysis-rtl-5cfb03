// tb_int_to_fixed: streams random ADC codes through int_to_fixed with random
// consumer stalls and checks every output against (code - 2048) * 2^20,
// clamped to the Q12.20 range. Also checks the 8-cycle latency and that a
// continuous stream is accepted at one sample per clock.
module tb_int_to_fixed;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [15:0] in_data;
  logic signed [31:0] out_data;
  int checks = 0, failures = 0;
  int unsigned codes[$];
  int sent = 0, got = 0;
  bit stall_mode = 1;
  longint cyc = 0, t_in = -1, t_out = -1;

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;

  int_to_fixed dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_q(input int unsigned c);
    int v;
    v = int'(c) - 2048;
    if (v > 2047) return 64'sd2047 * 1048576;
    return longint'(v) * 1048576;
  endfunction

  // consumer
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (longint'(out_data) != expect_q(codes[got])) begin
        failures++;
        $display("FAIL #%0d code=%0d out=%0d", got, codes[got], out_data);
      end
      if (t_out < 0) t_out = cyc;
      got++;
    end
  end

  initial begin
    in_valid = 0; in_data = 0; in_last = 0; out_ready = 0;
    for (int i = 0; i < 600; i++)
      codes.push_back((i % 50 == 7) ? 65535 - i : $urandom_range(0, 4095));
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: continuous, no stalls: latency and rate
    out_ready = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      in_valid = 1; in_data = 16'(codes[i]);
      @(posedge clk);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL stall in continuous stream"); end
      if (t_in < 0) t_in = cyc;
      sent++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (t_out - t_in != 8) begin
      failures++; $display("FAIL latency %0d, expected 8", t_out - t_in);
    end
    // phase 2: random stalls on both sides
    fork
      forever begin @(negedge clk); out_ready = ($urandom_range(0, 2) != 0); end
    join_none
    while (sent < 600) begin
      in_valid = ($urandom_range(0, 3) != 0); in_data = 16'(codes[sent]);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (got != 600) begin failures++; $display("FAIL got %0d of 600", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
