// dwt_pipeline_full: the embedded DWT block of one receiver channel.
//
// Raw uint16 ADC samples go through int_to_fixed (offset removal, 2048 codes,
// and conversion to Q12.20), then the three-level db4 transform
// (dwt_core_pipeline), then fixed_to_int, which exports the level-3
// coefficients as int16. OUT_DETAIL selects which level-3 band leaves the
// block: 0 (default) the approximation coefficients, the low-pass band that
// keeps the 15 kHz excitation and drops high-frequency noise; 1 the level-3
// detail coefficients.
// The three stages stream into each other with valid/ready, so the block
// takes one sample per clock; a frame is N_SAMPLES samples and gives
// (((N-8)/2+1 - 8)/2+1 - 8)/2+1 coefficients (250 for N = 2048), out_last on
// the final one. The structure follows the three-stage chain the system is
// specified with; the frame length and the band choice are parameters of
// this design.
module dwt_pipeline_full
  import shm_pkg::*;
#(
  parameter int unsigned N_SAMPLES   = 2048,
  parameter int unsigned CONV_LAT    = 8,
  parameter int unsigned SCALE_SHIFT = 4,
  parameter bit          OUT_DETAIL  = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  adc_word_t in_data,
  output logic      out_valid,
  input  logic      out_ready,
  output out_word_t out_data,
  output logic      out_last
);
  logic fx_valid, fx_ready, cv_valid, cv_ready, cv_last, fx_last;
  fix_t fx_data, cv_approx, cv_detail;

  int_to_fixed #(.LATENCY(CONV_LAT)) u_i2f (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last(1'b0),
    .out_valid(fx_valid), .out_ready(fx_ready), .out_data(fx_data), .out_last(fx_last)
  );

  dwt_core_pipeline #(.N_SAMPLES(N_SAMPLES)) u_core (
    .clk, .rst_n,
    .in_valid(fx_valid), .in_ready(fx_ready), .in_data(fx_data),
    .out_valid(cv_valid), .out_ready(cv_ready),
    .out_approx(cv_approx), .out_detail(cv_detail), .out_last(cv_last)
  );

  fixed_to_int #(.SCALE_SHIFT(SCALE_SHIFT)) u_f2i (
    .clk, .rst_n,
    .in_valid(cv_valid), .in_ready(cv_ready),
    .in_data(OUT_DETAIL ? cv_detail : cv_approx), .in_last(cv_last),
    .out_valid, .out_ready, .out_data, .out_last
  );
endmodule
