// dwt_core_pipeline: three-level db4 discrete wavelet transform.
//
// Three dwt_level instances (D1, D2, D3) are chained on the approximation
// coefficients: each level filters and halves the low-pass output of the
// one before. With N_SAMPLES input samples per frame the levels produce
// L1 = (N-8)/2+1, L2 = (L1-8)/2+1 and L3 = (L2-8)/2+1 coefficient pairs
// (1021, 507 and 250 for N = 2048). The level-3 approximation and detail
// coefficients leave together on one valid/ready port, out_last on the final
// pair of a frame. The detail coefficients of levels 1 and 2 are not used.
//
// Every level accepts one sample per clock, so the chain streams at the
// input rate; a coefficient leaves one clock per level after the input
// sample that completes it. The chain of three db4 levels follows the system
// description; the streaming overlap of the levels is this design's.
module dwt_core_pipeline
  import shm_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  fix_t in_data,
  output logic out_valid,
  input  logic out_ready,
  output fix_t out_approx,
  output fix_t out_detail,
  output logic out_last
);
  localparam int unsigned L1 = unsigned'(dwt_out_len(int'(N_SAMPLES)));
  localparam int unsigned L2 = unsigned'(dwt_out_len(int'(L1)));

  logic v1, r1, v2, r2;
  fix_t a1, d1, a2, d2;
  logic last1, last2;

  dwt_level #(.N_IN(N_SAMPLES)) u_d1 (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(v1), .out_ready(r1), .out_approx(a1), .out_detail(d1), .out_last(last1)
  );

  dwt_level #(.N_IN(L1)) u_d2 (
    .clk, .rst_n,
    .in_valid(v1), .in_ready(r1), .in_data(a1),
    .out_valid(v2), .out_ready(r2), .out_approx(a2), .out_detail(d2), .out_last(last2)
  );

  dwt_level #(.N_IN(L2)) u_d3 (
    .clk, .rst_n,
    .in_valid(v2), .in_ready(r2), .in_data(a2),
    .out_valid, .out_ready, .out_approx, .out_detail, .out_last
  );
endmodule
