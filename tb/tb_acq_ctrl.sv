// tb_acq_ctrl: drives the control FSM with a small model of the datapath
// (N_SAMPLES = 64, N_COEF = 8, two channels). Checks that the burst start
// and the capture gates open in the same clock after start, that each gate
// admits exactly N_SAMPLES samples, that raw and DWT write addresses count
// up from zero, that a start while busy is ignored, and that done pulses
// only after every channel's raw buffer is full, every DWT frame has ended
// and the burst is over.
module tb_acq_ctrl;
  localparam int NC = 2, NS = 64, NK = 8;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, burst_start, burst_busy;
  logic [NC-1:0] capture_en, adc_take, raw_take, dwt_take, dwt_last;
  logic [NC-1:0][5:0] raw_addr;
  logic [NC-1:0][2:0] dwt_addr;
  int checks = 0, failures = 0;
  int admitted[NC], stored[NC], coefs[NC], pending[NC], owed[NC];
  int burst_left;
  bit gate_seen;

  always #5 clk = ~clk;

  acq_ctrl #(.N_CH(NC), .N_SAMPLES(NS), .N_COEF(NK)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath model: ADC offers a sample with some probability, FIFO passes
  // it on a few clocks later, every 8th stored sample yields a coefficient
  // some random time later
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) begin
      adc_take[c] = capture_en[c] && ($urandom_range(0, 2) == 0);
      raw_take[c] = (pending[c] > 0) && ($urandom_range(0, 1) == 0);
      dwt_take[c] = (owed[c] > 0) && ($urandom_range(0, 9) == 0);
      dwt_last[c] = dwt_take[c] && (coefs[c] == NK - 1);
    end
    burst_busy = (burst_left > 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NC; c++) begin
        if (raw_take[c]) begin
          checks++;
          if (int'(raw_addr[c]) != stored[c]) begin failures++; $display("FAIL raw addr"); end
          if (stored[c] % 8 == 7) owed[c]++;
          stored[c]++; pending[c]--;
        end
        if (dwt_take[c]) begin
          checks++;
          if (int'(dwt_addr[c]) != coefs[c]) begin failures++; $display("FAIL dwt addr"); end
          coefs[c]++; owed[c]--;
        end
        if (adc_take[c]) begin admitted[c]++; pending[c]++; end
      end
      if (burst_start) begin
        checks++;
        if (capture_en == '0) begin failures++; $display("FAIL gates not open with burst"); end
        burst_left = 50;
        gate_seen = 1;
      end else if (burst_left > 0) burst_left--;
      if (done) begin
        checks++;
        for (int c = 0; c < NC; c++)
          if (stored[c] != NS || coefs[c] != NK) begin failures++; $display("FAIL done early"); end
        if (burst_left > 0) begin failures++; $display("FAIL done during burst"); end
      end
    end
  end

  initial begin
    start = 0; burst_left = 0;
    for (int c = 0; c < NC; c++) begin admitted[c] = 0; stored[c] = 0; coefs[c] = 0; pending[c] = 0; owed[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      for (int c = 0; c < NC; c++) begin admitted[c] = 0; stored[c] = 0; coefs[c] = 0; pending[c] = 0; owed[c] = 0; end
      gate_seen = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      repeat (20) @(negedge clk);
      checks++;
      if (!busy || !gate_seen) begin failures++; $display("FAIL not started"); end
      start = 1; @(negedge clk); start = 0;     // ignored while busy
      while (!done) @(negedge clk);
      @(negedge clk);
      checks += 2 + NC;
      if (busy) begin failures++; $display("FAIL busy after done"); end
      if (capture_en != '0) begin failures++; $display("FAIL gate open after done"); end
      for (int c = 0; c < NC; c++)
        if (admitted[c] != NS) begin failures++; $display("FAIL ch%0d admitted %0d", c, admitted[c]); end
      repeat (5) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL restarted by ignored start"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
