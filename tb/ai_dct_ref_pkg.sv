// ai_dct_ref_pkg - floating-point reference for the testbenches of the AI DCT.
//
// Computes the Arai-scaled DCT directly from the cosine definition, with no
// use of the algebraic-integer algorithm:
//   1D: y_k = s_k * sum_n x[n]*cos((2n+1)k*pi/16), s_0 = 1, s_k = 2cos(k*pi/16)
//   2D: Y[u][v] = s_u*s_v * sum_n sum_j A[n][j]*cos((2n+1)u*pi/16)*cos((2j+1)v*pi/16)
// and gives the real decode weights of an algebraic-integer tuple (a, b, c, d):
//   a*1 + b*(c2+c6)/2 + c*(c2-c6)/2 + d*c4.
package ai_dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real ck(input int k);
    return $cos(k * PI / 16.0);
  endfunction

  function automatic real arai_scale(input int k);
    return (k == 0) ? 1.0 : 2.0 * ck(k);
  endfunction

  function automatic real weight(input int comp);
    case (comp)
      0: return 1.0;
      1: return (ck(2) + ck(6)) / 2.0;
      2: return (ck(2) - ck(6)) / 2.0;
      default: return ck(4);
    endcase
  endfunction

  function automatic real dct1d_ref(input int x [8], input int k);
    real s = 0.0;
    for (int n = 0; n < 8; n++) s += x[n] * $cos((2 * n + 1) * k * PI / 16.0);
    return arai_scale(k) * s;
  endfunction

  // a[n][j]: row n, column j
  function automatic real dct2d_ref(input int a [8][8], input int u, input int v);
    real s = 0.0;
    for (int n = 0; n < 8; n++)
      for (int j = 0; j < 8; j++)
        s += a[n][j] * $cos((2 * n + 1) * u * PI / 16.0) * $cos((2 * j + 1) * v * PI / 16.0);
    return arai_scale(u) * arai_scale(v) * s;
  endfunction

endpackage
