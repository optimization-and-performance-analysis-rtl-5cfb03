// tb_ref_pkg: floating-point reference models used by the testbenches.
//
// The db4 analysis filters are given here as double-precision reals, so the
// reference never shares the fixed-point coefficient table of the RTL. The
// reference DWT level mirrors the textbook definition: convolution with the
// analysis filter, keep every second output, valid part only.
package tb_ref_pkg;

  function automatic real db4_lo_r(input int k);
    case (k)
      0: return -0.010597401784997;
      1: return  0.032883011666983;
      2: return  0.030841381835987;
      3: return -0.187034811718881;
      4: return -0.027983769416984;
      5: return  0.630880767929590;
      6: return  0.714846570552542;
      default: return 0.230377813308855;
    endcase
  endfunction

  function automatic real db4_hi_r(input int k);
    real h;
    h = db4_lo_r(7 - k);
    return (k % 2 == 0) ? -h : h;
  endfunction

  function automatic real clamp_q(input real v);
    if (v > 2047.999999) return 2047.999999;
    if (v < -2048.0) return -2048.0;
    return v;
  endfunction

  // One analysis level on x[0..n-1]; returns the output count.
  function automatic int ref_level(input real x[], input int n,
                                   output real a[], output real d[]);
    int m;
    m = (n - 8) / 2 + 1;
    a = new[m];
    d = new[m];
    for (int k = 0; k < m; k++) begin
      real sa, sd;
      sa = 0.0;
      sd = 0.0;
      for (int j = 0; j < 8; j++) begin
        sa += db4_lo_r(j) * x[2*k + 7 - j];
        sd += db4_hi_r(j) * x[2*k + 7 - j];
      end
      a[k] = clamp_q(sa);
      d[k] = clamp_q(sd);
    end
    return m;
  endfunction

  function automatic real abs_r(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real q20_to_real(input logic signed [31:0] v);
    return real'(v) / 1048576.0;
  endfunction

endpackage
