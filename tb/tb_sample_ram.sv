// tb_sample_ram: writes random words to random addresses while reading
// random addresses, and checks every read one clock later against a model
// array, including read-during-write of the same address (old data).
module tb_sample_ram;
  logic clk = 0;
  logic we;
  logic [10:0] waddr, raddr;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [2048];
  bit valid [2048];
  logic [15:0] exp_q;
  bit exp_v;

  always #5 clk = ~clk;

  sample_ram #(.WIDTH(16), .DEPTH(2048)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0; exp_v = 0;
    for (int i = 0; i < 2048; i++) valid[i] = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata != exp_q) begin failures++; if (failures < 10) $display("FAIL rd %h exp %h", rdata, exp_q); end
      end
      we = ($urandom_range(0, 1) == 1);
      waddr = 11'($urandom);
      wdata = 16'($urandom);
      raddr = (cyc % 7 == 0) ? waddr : 11'($urandom);
      exp_v = valid[raddr];
      exp_q = model[raddr];
      @(posedge clk);
      if (we) begin model[waddr] = wdata; valid[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
