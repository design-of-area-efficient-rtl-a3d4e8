// ftfft_pkg: constants and types shared by the fault-tolerant parallel FFT.
//
// The protected system is four independent 4-point FFTs working side by
// side (the "original" modules) plus three redundant FFTs whose inputs are
// sums of three original inputs each.  Every FFT here takes four real
// samples and produces six output words, ordered
//   {X0, X1.re, X1.im, X2, X3.re, X3.im}
// (X0 and X2 of a real input are real; X1 and X3 are complex).
// Sample width, FFT count and the word order follow the document; the
// growth of two bits per adder tree is this design's own choice so that
// every result is exact and the sum-of-squares check holds.
package ftfft_pkg;

  localparam int unsigned N_POINTS = 4;  // points per FFT
  localparam int unsigned N_ORIG   = 4;  // original (protected) FFTs
  localparam int unsigned N_RED    = 3;  // redundant FFTs
  localparam int unsigned N_WORDS  = 6;  // output words of one real-input 4-point FFT
  localparam int unsigned DATA_W   = 5;  // input sample width (two's complement)

  // Position of each output word in the word arrays.
  localparam int unsigned W_X0   = 0;
  localparam int unsigned W_X1RE = 1;
  localparam int unsigned W_X1IM = 2;
  localparam int unsigned W_X2   = 3;
  localparam int unsigned W_X3RE = 4;
  localparam int unsigned W_X3IM = 5;

  // Which per-FFT checker guards the original FFTs.
  typedef enum logic {
    CHK_PARTIAL_SUM = 1'b0,  // partial summation: adders only
    CHK_PARSEVAL    = 1'b1   // parallel correction: sum-of-squares check
  } check_mode_e;

endpackage
