// cordic_sin: iterative CORDIC sine, helper of tone_burst_gen.
//
// The phase is a 32-bit fraction of a full turn (2^32 = 2*pi). It is folded
// into [-pi/2, pi/2] (sin(pi - a) = sin(a)) and rotated in 16 micro-rotations,
// one per clock, starting from (K * 2^16, 0) so the result needs no gain
// correction. The arctangent table holds round(atan(2^-i) * 2^32 / (2*pi)).
// Interface: a start pulse loads `phase`; `done` pulses 17 clocks later with
// `sin_o` = sin(phase) * 2^16 (within a few LSB), held until the next start.
module cordic_sin (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        phase,
  output logic               done,
  output logic signed [17:0] sin_o
);
  localparam int ITER = 16;

  function automatic logic signed [31:0] atan_tab(input int i);
    case (i)
      0: return 32'sd536870912;  1: return 32'sd316933406;  2: return 32'sd167458907;
      3: return 32'sd85004756;   4: return 32'sd42667331;   5: return 32'sd21354465;
      6: return 32'sd10679838;   7: return 32'sd5340245;    8: return 32'sd2670163;
      9: return 32'sd1335087;   10: return 32'sd667544;    11: return 32'sd333772;
     12: return 32'sd166886;    13: return 32'sd83443;     14: return 32'sd41722;
      default: return 32'sd20861;
    endcase
  endfunction

  logic signed [19:0] x, y;
  logic signed [31:0] z;
  logic [4:0]         it;
  logic               run;
  logic signed [31:0] a_in, a_fold;

  always_comb begin
    a_in = signed'(phase);
    if (a_in > 32'sh4000_0000)       a_fold = 32'sh8000_0000 - a_in;  // pi - a
    else if (a_in < -32'sh4000_0000) a_fold = 32'sh8000_0000 - a_in;  // -pi - a (mod 2pi)
    else                             a_fold = a_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0; run <= 1'b0; done <= 1'b0; sin_o <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x   <= 20'sd39797;
        y   <= '0;
        z   <= a_fold;
        it  <= '0;
        run <= 1'b1;
      end else if (run) begin
        if (z >= 0) begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_tab(int'(it));
        end else begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_tab(int'(it));
        end
        if (it == 5'(ITER - 1)) begin
          run <= 1'b0;
        end
        it <= it + 1'b1;
      end else if (it == 5'(ITER)) begin
        sin_o <= y[17:0];
        done  <= 1'b1;
        it    <= '0;
      end
    end
  end
endmodule
