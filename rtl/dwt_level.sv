// dwt_level: one level of the db4 discrete wavelet transform (D1, D2 or D3).
//
// Each input sample is shifted into an 8-sample window. After every second
// sample, once the window is full, the window is filtered with the db4
// low-pass and high-pass analysis filters, which gives one approximation and
// one detail coefficient: filtering followed by downsampling by two. Only
// windows that lie completely inside the frame produce output, so a frame of
// N_IN samples gives (N_IN - 8) / 2 + 1 coefficient pairs, each emitted on
// the clock after the sample that completes its window.
//
//   approx[k] = sum_j lo[j] * x[2k + 7 - j]     detail[k] = sum_j hi[j] * x[2k + 7 - j]
//
// Products are full precision; the sum is truncated back to Q12.20 and
// saturated. The frame length is a parameter: the sample counter wraps
// after N_IN samples and out_last is raised on the final pair of a frame.
// Both ports use valid/ready. The input is taken whenever the output
// register is empty or being read, so the level keeps up with one sample
// per clock. The approximation feeds the next level; the detail is the
// band-pass output of this level. The db4 wavelet and the filter-and-
// downsample structure follow the system description; the boundary rule
// (valid windows only) and the fully parallel datapath are this design's.
module dwt_level
  import shm_pkg::*;
#(
  parameter int unsigned N_IN = 2048
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
  localparam int unsigned N_OUT = unsigned'(dwt_out_len(int'(N_IN)));
  localparam int unsigned CW    = $clog2(N_IN + 1);

  fix_t          win [DB4_TAPS-1];   // previous 7 samples, win[0] newest
  logic [CW-1:0] in_cnt;             // index of the next input sample
  logic [CW-1:0] out_cnt;            // index of the next output pair
  logic          take;
  logic          produce;

  fix_t                tap [DB4_TAPS];  // tap[j] = x[n - j], n = current sample
  logic signed [71:0]  acc_lo, acc_hi;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;
  // sample n completes window k = (n - 7) / 2 when n >= 7 and n is odd
  assign produce  = (in_cnt >= CW'(DB4_TAPS - 1)) && in_cnt[0];

  always_comb begin
    tap[0] = in_data;
    for (int j = 1; j < DB4_TAPS; j++) tap[j] = win[j-1];
    acc_lo = '0;
    acc_hi = '0;
    for (int j = 0; j < DB4_TAPS; j++) begin
      acc_lo += 72'(tap[j]) * 72'(db4_lo(j));
      acc_hi += 72'(tap[j]) * 72'(db4_hi(j));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < DB4_TAPS - 1; j++) win[j] <= '0;
      in_cnt     <= '0;
      out_cnt    <= '0;
      out_valid  <= 1'b0;
      out_approx <= '0;
      out_detail <= '0;
      out_last   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        win[0] <= in_data;
        for (int j = 1; j < DB4_TAPS - 1; j++) win[j] <= win[j-1];
        in_cnt <= (in_cnt == CW'(N_IN - 1)) ? '0 : in_cnt + 1'b1;
        if (produce && out_cnt < CW'(N_OUT)) begin
          out_valid  <= 1'b1;
          out_approx <= sat_fix(acc_lo >>> FIX_FRAC);
          out_detail <= sat_fix(acc_hi >>> FIX_FRAC);
          out_last   <= (out_cnt == CW'(N_OUT - 1));
          out_cnt    <= (out_cnt == CW'(N_OUT - 1)) ? '0 : out_cnt + 1'b1;
        end
      end
    end
  end
endmodule
