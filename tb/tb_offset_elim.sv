// tb_offset_elim: checks the mid-scale offset removal on edge codes and
// random codes against signed(raw) - 2048.
module tb_offset_elim;
  logic [15:0]        raw;
  logic signed [16:0] centred;
  int checks = 0, failures = 0;

  offset_elim dut (.raw_i(raw), .centred_o(centred));

  task automatic check(input int code);
    int expected;
    raw = 16'(code);
    #1;
    expected = code - 2048;
    checks++;
    if (int'(centred) != expected) begin
      failures++;
      $display("FAIL raw=%0d centred=%0d expected=%0d", code, centred, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(2048); check(4095); check(2047); check(65535);
    for (int i = 0; i < 200; i++) check(int'($urandom_range(0, 4095)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
