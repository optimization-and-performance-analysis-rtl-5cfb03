// int_to_fixed: first stage of the DWT block.
//
// Takes raw uint16 ADC samples, removes the 1.25 V mid-scale offset (through
// offset_elim, 2048 codes) and converts the centred integer to Q12.20. The
// centred value is clamped to the Q12.20 integer range [-2048, 2047] before
// the shift, so an out-of-range code cannot wrap.
//
// The conversion runs in a register pipeline of LATENCY stages (default 8,
// the latency the block is specified with). The whole pipeline advances
// when its last stage is empty or the consumer takes the output, so it
// accepts one sample per clock with no bubbles. Handshake on both sides is
// valid/ready: a beat moves when valid and ready are high at a rising edge;
// `last` marks the final sample of an acquisition frame and is carried along.
module int_to_fixed
  import shm_pkg::*;
#(
  parameter int unsigned LATENCY = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  adc_word_t in_data,
  input  logic      in_last,
  output logic      out_valid,
  input  logic      out_ready,
  output fix_t      out_data,
  output logic      out_last
);
  logic signed [16:0] centred;
  fix_t               conv;

  offset_elim u_offset (.raw_i(in_data), .centred_o(centred));

  always_comb begin
    if (centred > 17'sd2047)       conv = FIX_MAX & ~fix_t'((1 << FIX_FRAC) - 1);
    else if (centred < -17'sd2048) conv = FIX_MIN;
    else                           conv = fix_t'(centred) <<< FIX_FRAC;
  end

  logic [LATENCY-1:0] vld;
  logic [LATENCY-1:0] lst;
  fix_t               dat [LATENCY];
  logic               adv;

  assign adv      = !vld[LATENCY-1] || out_ready;
  assign in_ready = adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      lst <= '0;
      for (int i = 0; i < int'(LATENCY); i++) dat[i] <= '0;
    end else if (adv) begin
      vld[0] <= in_valid;
      lst[0] <= in_last;
      dat[0] <= conv;
      for (int i = 1; i < int'(LATENCY); i++) begin
        vld[i] <= vld[i-1];
        lst[i] <= lst[i-1];
        dat[i] <= dat[i-1];
      end
    end
  end

  assign out_valid = vld[LATENCY-1];
  assign out_data  = dat[LATENCY-1];
  assign out_last  = lst[LATENCY-1];
endmodule
