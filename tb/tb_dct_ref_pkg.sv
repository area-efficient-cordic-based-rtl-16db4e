// tb_dct_ref_pkg: floating-point reference transforms for the testbenches.
//
// dct_ref(N, x, k)  = s_k * sum_n x[n] * cos((2n+1)*k*pi/(2N)),
//                     s_0 = 1, s_k = sqrt(2): sqrt(N) times the orthonormal
//                     DCT-II, the scale of dct4_cordic and dct8_cordic.
// idct_ref(y, n)    = (1/8) * sum_k s_k * y[k] * cos((2n+1)*k*pi/16), the
//                     exact inverse of the 8-point forward scale.
// These are computed straight from the definitions with $cos, independently
// of the flow graph the RTL uses.
package tb_dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real dct_ref(input int n_pts, input real x [8], input int k);
    real acc = 0.0;
    for (int n = 0; n < n_pts; n++)
      acc += x[n] * $cos((2.0 * n + 1.0) * k * PI / (2.0 * n_pts));
    return (k == 0) ? acc : acc * $sqrt(2.0);
  endfunction

  function automatic real idct_ref(input real y [8], input int n);
    real acc = 0.0;
    for (int k = 0; k < 8; k++)
      acc += ((k == 0) ? 1.0 : $sqrt(2.0)) * y[k] * $cos((2.0 * n + 1.0) * k * PI / 16.0);
    return acc / 8.0;
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
