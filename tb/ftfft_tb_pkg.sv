// ftfft_tb_pkg: reference models shared by the testbenches.
//
// ref_fft evaluates the 4-point DFT directly from its definition,
// X_k = sum_n x_n * (-j)^(k*n mod 4), with integer arithmetic, and returns
// the six words {X0, X1.re, X1.im, X2, X3.re, X3.im}.  It shares no code
// with the butterfly structure of the RTL.  energy() is the plain sum of
// squares used to predict the Parseval check.
package ftfft_tb_pkg;

  typedef int samples_t [4];
  typedef int words_t   [6];

  function automatic words_t ref_fft(samples_t x);
    int re [4];
    int im [4];
    words_t y;
    for (int k = 0; k < 4; k++) begin
      re[k] = 0;
      im[k] = 0;
      for (int n = 0; n < 4; n++) begin
        case ((k * n) % 4)
          0: re[k] += x[n];
          1: im[k] -= x[n];
          2: re[k] -= x[n];
          default: im[k] += x[n];
        endcase
      end
    end
    y[0] = re[0];
    y[1] = re[1];
    y[2] = im[1];
    y[3] = re[2];
    y[4] = re[3];
    y[5] = im[3];
    return y;
  endfunction

  // Sign-extend the low 'bits' bits of v.
  function automatic int sext(int v, int bits);
    int s;
    s = 32 - bits;
    return (v <<< s) >>> s;
  endfunction

  function automatic int energy_in(samples_t x);
    int e = 0;
    for (int n = 0; n < 4; n++) e += x[n] * x[n];
    return 4 * e;
  endfunction

  function automatic int energy_out(words_t y);
    int e = 0;
    for (int k = 0; k < 6; k++) e += y[k] * y[k];
    return e;
  endfunction

  // Random sample in the signed range of 'bits' bits.
  function automatic int rand_sample(int bits);
    return sext(int'($urandom), bits);
  endfunction

endpackage
