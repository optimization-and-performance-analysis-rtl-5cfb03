// shm_pkg: types and constants shared by the structural-health-monitoring
// acquisition and DWT datapath.
//
// All signal processing runs in a signed 32-bit fixed-point format with 12
// integer bits and 20 fractional bits (Q12.20), the same split as the
// ap_fixed<32,12> type the processing chain is specified in. Products are
// truncated towards minus infinity; overflow saturates (a choice of this
// design: the reference type wraps, saturation is the safer behaviour in
// hardware and is identical whenever nothing overflows).
//
// The wavelet is Daubechies db4 (8 taps, 4 vanishing moments). The
// decomposition filters are stored as Q12.20 integers, round(h * 2^20), of
// the standard db4 analysis filters:
//   low-pass  h = [-0.0105974018, 0.0328830117, 0.0308413818, -0.1870348117,
//                  -0.0279837694, 0.6308807679, 0.7148465706, 0.2303778133]
//   high-pass g[k] = (-1)^(k+1) * h[7-k]
package shm_pkg;

  localparam int FIX_W    = 32;
  localparam int FIX_FRAC = 20;
  localparam int FIX_INT  = FIX_W - FIX_FRAC;   // 12

  typedef logic signed [FIX_W-1:0] fix_t;
  typedef logic        [15:0]      adc_word_t;  // raw ADC sample, uint16
  typedef logic signed [15:0]      out_word_t;  // exported coefficient, int16

  localparam int N_CH        = 4;     // receivers (Rx1..Rx4)
  localparam int ADC_OFFSET  = 2048;  // mid-scale code = 1.25 V
  localparam int DB4_TAPS    = 8;

  localparam fix_t FIX_MAX = {1'b0, {(FIX_W-1){1'b1}}};
  localparam fix_t FIX_MIN = {1'b1, {(FIX_W-1){1'b0}}};

  // db4 analysis low-pass tap k in Q12.20.
  function automatic fix_t db4_lo(input int k);
    case (k)
      0:       return -32'sd11112;
      1:       return  32'sd34480;
      2:       return  32'sd32340;
      3:       return -32'sd196120;
      4:       return -32'sd29343;
      5:       return  32'sd661526;
      6:       return  32'sd749571;
      default: return  32'sd241569;
    endcase
  endfunction

  // db4 analysis high-pass tap k: quadrature mirror of the low-pass filter.
  function automatic fix_t db4_hi(input int k);
    fix_t h;
    h = db4_lo(DB4_TAPS - 1 - k);
    return (k % 2 == 0) ? -h : h;
  endfunction

  // Output count of one analysis level without boundary extension: only
  // windows that lie completely inside the frame produce a coefficient.
  function automatic int dwt_out_len(input int n_in);
    return (n_in - DB4_TAPS) / 2 + 1;
  endfunction

  // Saturate a wide signed value that is already aligned to Q12.20.
  function automatic fix_t sat_fix(input logic signed [71:0] v);
    if (v > 72'(signed'(FIX_MAX)))      return FIX_MAX;
    else if (v < 72'(signed'(FIX_MIN))) return FIX_MIN;
    else                                return fix_t'(v);
  endfunction

endpackage
