// sample_ram: block-RAM buffer for one channel's waveform.
//
// Simple dual-port memory of DEPTH words of WIDTH bits: one synchronous
// write port filled by the acquisition path and one synchronous read port
// used by the processor side. The read data appear on the clock after the
// address (one cycle latency), the usual block-RAM behaviour; a read of the
// address being written returns the old word. The memory is not cleared by
// reset. Keeping the waveforms in block RAM for the processor to read
// follows the system description; the port arrangement is this design's.
module sample_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
