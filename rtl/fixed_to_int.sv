// fixed_to_int: last stage of the DWT block.
//
// Converts Q12.20 coefficients to int16 for export over the AXI side of the
// system. The value is scaled by 2^SCALE_SHIFT first, i.e. the result keeps
// SCALE_SHIFT fractional bits: y = floor(x * 2^SCALE_SHIFT), saturated to
// [-32768, 32767]. With the default of 4 the full Q12.20 range +-2048 just
// fits, so saturation only guards against a smaller shift being configured
// wrongly. The scale factor is this design's choice; the chain is only
// specified to scale and convert to int16.
//
// One register stage with valid/ready on both sides; one coefficient per
// clock, `last` carried along.
module fixed_to_int
  import shm_pkg::*;
#(
  parameter int unsigned SCALE_SHIFT = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  fix_t      in_data,
  input  logic      in_last,
  output logic      out_valid,
  input  logic      out_ready,
  output out_word_t out_data,
  output logic      out_last
);
  fix_t      scaled;
  out_word_t conv;

  always_comb begin
    scaled = in_data >>> (FIX_FRAC - int'(SCALE_SHIFT));
    if (scaled > 32'sd32767)       conv = 16'sh7FFF;
    else if (scaled < -32'sd32768) conv = 16'sh8000;
    else                           conv = out_word_t'(scaled);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      out_data  <= conv;
      out_last  <= in_last;
    end
  end
endmodule
