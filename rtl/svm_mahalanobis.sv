// svm_mahalanobis: fixed-point linear SVM with Mahalanobis outlier rejection.
//
// For a feature vector x of N_FEAT Q12.20 values (the reduced PCA features)
// the block computes
//   score = b + sum_i w_i * x_i                          (linear SVM)
//   dist2 = (x - mu)^T * S * (x - mu)                    (S = inverse covariance)
// and decides class = (score >= 0); the sample is flagged as an outlier,
// and its class is not to be trusted, when dist2 > threshold. The model
// (w, b, mu, S, threshold) is loaded from the processor side and held on the
// input ports during a run.
//
// One multiply-accumulate per clock, so the latency is fixed:
// N_FEAT clocks for the score, N_FEAT*N_FEAT clocks for the quadratic form,
// then one clock to register the results: `done` pulses 1 + N_FEAT +
// N_FEAT^2 + 1 clocks after `start` (22 for N_FEAT = 4). Every product is
// truncated back to Q12.20 and every sum saturates. The feature count, the
// number format and the MAC schedule are this design's choices; only the
// decision rule is given by the system description.
module svm_mahalanobis
  import shm_pkg::*;
#(
  parameter int unsigned N_FEAT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t feat   [N_FEAT],
  input  fix_t w      [N_FEAT],
  input  fix_t bias,
  input  fix_t mu     [N_FEAT],
  input  fix_t s_inv  [N_FEAT][N_FEAT],
  input  fix_t threshold,
  output logic busy,
  output logic done,
  output logic class_out,
  output logic outlier,
  output fix_t score,
  output fix_t dist2
);
  localparam int IW = $clog2(N_FEAT + 1);

  typedef enum logic [1:0] {S_IDLE, S_SVM, S_MAH, S_END} state_t;
  state_t state;

  logic [IW-1:0] i, j;
  fix_t acc, row, quad;
  fix_t d_i, d_j, mac_a, mac_b, mac_in, mac_out;

  function automatic fix_t fmul(input fix_t a, input fix_t b);
    logic signed [71:0] p;
    p = (72'(a) * 72'(b)) >>> FIX_FRAC;
    return sat_fix(p);
  endfunction

  function automatic fix_t fadd(input fix_t a, input fix_t b);
    return sat_fix(72'(a) + 72'(b));
  endfunction

  always_comb begin
    d_i = fadd(feat[int'(i)], -mu[int'(i)]);
    d_j = fadd(feat[int'(j)], -mu[int'(j)]);
    mac_a = '0;
    mac_b = '0;
    mac_in = '0;
    if (state == S_SVM) begin
      mac_a = w[int'(i)];  mac_b = feat[int'(i)];  mac_in = acc;
    end else if (state == S_MAH) begin
      mac_a = s_inv[int'(i)][int'(j)];  mac_b = d_j;  mac_in = row;
    end
    mac_out = fadd(mac_in, fmul(mac_a, mac_b));
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; i <= '0; j <= '0; acc <= '0; row <= '0; quad <= '0;
      done <= 1'b0; class_out <= 1'b0; outlier <= 1'b0; score <= '0; dist2 <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_SVM; i <= '0; j <= '0; acc <= bias; row <= '0; quad <= '0;
        end
        S_SVM: begin
          acc <= mac_out;
          if (i == IW'(N_FEAT - 1)) begin
            i <= '0; state <= S_MAH;
          end else i <= i + 1'b1;
        end
        S_MAH: begin
          if (j == IW'(N_FEAT - 1)) begin
            // row i of S*d is complete: add d_i * (S*d)_i to the quadratic form
            quad <= fadd(quad, fmul(d_i, mac_out));
            row  <= '0;
            j    <= '0;
            if (i == IW'(N_FEAT - 1)) state <= S_END;
            else i <= i + 1'b1;
          end else begin
            row <= mac_out;
            j   <= j + 1'b1;
          end
        end
        S_END: begin
          score     <= acc;
          dist2     <= quad;
          class_out <= !acc[FIX_W-1];
          outlier   <= (quad > threshold);
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
