// tb_stream_fifo: random pushes and pops against a queue model. Checks
// order, the full and empty flags, the fill count, and simultaneous
// push and pop on a full FIFO.
module tb_stream_fifo;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int full_seen = 0;

  always #5 clk = ~clk;

  stream_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, balanced
      in_valid  = ($urandom_range(0, 9) < ((cyc / 500) % 3 == 0 ? 8 : (cyc / 500) % 3 == 1 ? 2 : 5));
      out_ready = ($urandom_range(0, 9) < ((cyc / 500) % 3 == 0 ? 2 : (cyc / 500) % 3 == 1 ? 8 : 5));
      in_data   = 16'($urandom);
      #1;
      checks += 3;
      if (int'(count) != model.size()) begin failures++; $display("FAIL count %0d vs %0d", count, model.size()); end
      if (in_ready != (model.size() < 16)) begin failures++; $display("FAIL in_ready"); end
      if (out_valid != (model.size() > 0)) begin failures++; $display("FAIL out_valid"); end
      if (out_valid) begin
        checks++;
        if (out_data != model[0]) begin failures++; $display("FAIL data %h vs %h", out_data, model[0]); end
      end
      if (model.size() == 16 && in_valid && out_ready) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL full push+pop never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
