// tone_burst_gen: excitation tone burst for the transmitting PZT.
//
// Produces a Hann-windowed sine burst of TONE_HZ (15 kHz) lasting
// HALF_CYCLES/2 periods (3.5 cycles), as DAC codes at DAC_HZ:
//   s[n] = MID + AMPL * sin(2*pi*TONE_HZ*n/DAC_HZ) * sin^2(pi*n/BURST_LEN),
//   n = 0 .. BURST_LEN-1,  BURST_LEN = HALF_CYCLES*DAC_HZ/(2*TONE_HZ) = 233.
// Two phase accumulators (carrier and window half-angle) feed one shared
// CORDIC; the two sines of a sample are computed one after the other, which
// takes about 40 clocks, well inside the DAC_HZ sample period. Frequency and
// cycle count follow the system description; the window, the DAC rate and
// the 12-bit offset-binary code are this design's choices.
// Interface: `start` (pulse) begins a burst; dac_valid pulses once per
// sample period with dac_data; `busy` is high for the whole burst and `done`
// pulses after the last sample. dac_data rests at mid-scale when idle.
module tone_burst_gen #(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned DAC_HZ      = 1_000_000,
  parameter int unsigned TONE_HZ     = 15_000,
  parameter int unsigned HALF_CYCLES = 7,
  parameter int unsigned DAC_W       = 12,
  parameter int unsigned AMPL        = 2047
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             dac_valid,
  output logic [DAC_W-1:0] dac_data
);
  localparam int unsigned DIV       = CLK_HZ / DAC_HZ;
  localparam int unsigned BURST_LEN = HALF_CYCLES * DAC_HZ / (2 * TONE_HZ);
  localparam logic [31:0] PINC      = 32'((64'd1 << 32) * TONE_HZ / DAC_HZ);
  localparam logic [31:0] WINC      = 32'((64'd1 << 31) / BURST_LEN);
  localparam int unsigned MID       = 1 << (DAC_W - 1);

  typedef enum logic [2:0] {S_IDLE, S_CAR, S_WIN, S_OUT, S_WAIT} state_t;
  state_t state;

  logic [31:0]        ph_car, ph_win;
  logic [$clog2(BURST_LEN+1)-1:0] n;
  logic [$clog2(DIV+1)-1:0]       tick;
  logic               c_start, c_done;
  logic [31:0]        c_phase;
  logic signed [17:0] c_sin, s_car;
  logic signed [63:0] prod;
  logic signed [31:0] code;

  cordic_sin u_cordic (.clk, .rst_n, .start(c_start), .phase(c_phase), .done(c_done), .sin_o(c_sin));

  assign c_phase = (state == S_WIN) ? ph_win : ph_car;

  // carrier * window^2 * AMPL, sines in Q1.16
  always_comb begin
    prod = 64'(s_car) * 64'(c_sin) * 64'(c_sin);
    prod = (prod * signed'(64'(AMPL))) >>> 48;
    code = 32'(prod) + signed'(32'(MID));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ph_car <= '0; ph_win <= '0; n <= '0; tick <= '0;
      c_start <= 1'b0; s_car <= '0; busy <= 1'b0; done <= 1'b0;
      dac_valid <= 1'b0; dac_data <= DAC_W'(MID);
    end else begin
      c_start   <= 1'b0;
      done      <= 1'b0;
      dac_valid <= 1'b0;
      if (state != S_IDLE) tick <= (tick == ($clog2(DIV+1))'(DIV - 1)) ? '0 : tick + 1'b1;
      case (state)
        S_IDLE: if (start) begin
          state <= S_CAR; busy <= 1'b1; ph_car <= '0; ph_win <= '0; n <= '0; tick <= '0;
          c_start <= 1'b1;
        end
        S_CAR: if (c_done) begin
          s_car <= c_sin; state <= S_WIN; c_start <= 1'b1;
        end
        S_WIN: if (c_done) state <= S_OUT;
        S_OUT: if (tick == ($clog2(DIV+1))'(DIV - 1)) begin
          dac_valid <= 1'b1;
          dac_data  <= (code < 0) ? '0 : (code > signed'(32'((1 << DAC_W) - 1))) ? '1 : DAC_W'(code);
          ph_car    <= ph_car + PINC;
          ph_win    <= ph_win + WINC;
          if (n == ($clog2(BURST_LEN+1))'(BURST_LEN - 1)) begin
            state <= S_WAIT;
          end else begin
            n <= n + 1'b1;
            state <= S_CAR;
            c_start <= 1'b1;
          end
        end
        S_WAIT: begin
          dac_data <= DAC_W'(MID);
          busy <= 1'b0; done <= 1'b1; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
