// tb_fixed_to_int: random and edge Q12.20 values through fixed_to_int with
// random backpressure. Each int16 output must equal floor(x * 16), saturated,
// and arrive in order with its last flag. One value per clock at full rate.
module tb_fixed_to_int;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic signed [31:0] in_data;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;
  logic signed [31:0] vals[$];
  int sent = 0, got = 0;

  always #5 clk = ~clk;

  fixed_to_int dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_i(input logic signed [31:0] v);
    real r;
    longint e;
    r = real'(v) / 1048576.0 * 16.0;
    e = longint'($floor(r));
    if (e > 32767) e = 32767;
    if (e < -32768) e = -32768;
    return int'(e);
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (int'(out_data) != expect_i(vals[got]) || out_last != (got % 50 == 49)) begin
        failures++;
        if (failures < 10) $display("FAIL #%0d in=%0d out=%0d exp=%0d", got, vals[got], out_data,
                                    expect_i(vals[got]));
      end
      got++;
    end
  end

  initial begin
    vals.push_back(32'sh7FFFFFFF); vals.push_back(32'sh80000000);
    vals.push_back(-32'sd1); vals.push_back(32'sd65535); vals.push_back(32'sd65536);
    for (int i = 0; i < 495; i++) vals.push_back(32'($urandom));
    in_valid = 0; in_data = 0; in_last = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (sent < vals.size()) begin
      in_valid = (sent < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      in_data = vals[sent];
      in_last = (sent % 50 == 49);
      if (sent >= 100) out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      else if (sent < 100) begin checks++; failures++; $display("FAIL stall at full rate"); end
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (got != vals.size()) begin failures++; $display("FAIL got %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
