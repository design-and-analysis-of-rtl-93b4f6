// rwf_tb_pkg: reference model shared by the wavelet filter testbenches.
//
// The expected outputs are computed straight from the filter coefficient
// tables (direct 9-tap convolution), not from the shift-and-add
// decompositions the RTL uses.  Coefficients are held in units of 1/64, so
// with FRAC_W = 6 an RTL output word equals sum_k coef[k] * w_k exactly,
// where w_0 = x(i) and w_k = x(i-k) + x(i+k).
package rwf_tb_pkg;

  // filter selector of the model
  typedef enum int {REF_A = 0, REF_B = 1, REF_C = 2, REF_53 = 3} ref_e;

  // low pass h0(+-k), k = 0..4, in 1/64
  function automatic int low_coef(ref_e f, int k);
    int t [4][5] = '{
      '{38, 18, -4, -2, 2},   // alpha = -1.67: 19/32, 9/32, -1/16, -1/32, 1/32
      '{40, 16, -6,  0, 2},   // alpha = -1.8 : 5/8, 1/4, -3/32, 0, 1/32
      '{46, 16, -8,  0, 1},   // alpha = -2   : 23/32, 1/4, -1/8, 0, 1/64
      '{48, 16, -8,  0, 0}    // Le Gall 5/3  : 6/8, 2/8, -1/8
    };
    return t[int'(f)][k];
  endfunction

  // high pass h1(+-k), k = 0..4, in 1/64.  alpha = -2 is half of its
  // coefficient table (1, -9/16, 0, 1/16), as the hardware computes it.
  function automatic int high_coef(ref_e f, int k);
    int t [4][5] = '{
      '{72, -36, -4, 4, 0},   // alpha = -1.67: 9/8, -9/16, -1/16, 1/16
      '{72, -36, -4, 4, 0},   // alpha = -1.8 : same as -1.67
      '{32, -18,  0, 2, 0},   // alpha = -2   : 1/2, -9/32, 0, 1/32
      '{64, -32,  0, 0, 0}    // Le Gall 5/3  : 1, -1/2
    };
    return t[int'(f)][k];
  endfunction

  // win[0] = x(i+4) newest ... win[8] = x(i-4) oldest
  function automatic longint ref_out(ref_e f, bit high, longint win [9]);
    longint acc = 0;
    for (int j = 0; j < 9; j++) begin
      int k = (j < 4) ? 4 - j : j - 4;
      acc += longint'(high ? high_coef(f, k) : low_coef(f, k)) * win[j];
    end
    return acc;
  endfunction

endpackage
