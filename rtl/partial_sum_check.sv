// partial_sum_check: adder-only concurrent check of one 4-point FFT.
//
// It sums the first-stage butterfly nodes on the input side of the FFT,
//   a = x0+x2,  b = x0-x2,  c = x1+x3,  d = x1-x3,
// and the matching pairs of output words on the output side, with the
// twiddle factors of the second stage folded in.  For a correct FFT
//   X0+X2 = 2a,   X0-X2 = 2c,
//   X1.re+X3.re = 2b,   X1.re-X3.re = 0,
//   X1.im+X3.im = 0,    X3.im-X1.im = 2d.
// The six relations are independent, so any corrupted set of output
// words breaks at least one of them: 'err' is raised for every error
// seen at the FFT outputs, and no multiplier is needed.
//
// The document says only that the block sums the node values of the
// 4-point FFT together with its twiddle factors; which sums are formed
// and compared is this design's choice.
//
// Interface: x (FFT input samples), y (FFT output words), err.
// Combinational; err is valid in the same cycle as x and y.
module partial_sum_check #(
  parameter int unsigned IW = ftfft_pkg::DATA_W,  // input sample width
  parameter int unsigned OW = IW + 2              // FFT output word width
) (
  input  logic signed [IW-1:0] x [ftfft_pkg::N_POINTS],
  input  logic signed [OW-1:0] y [ftfft_pkg::N_WORDS],
  output logic                 err
);
  import ftfft_pkg::*;

  localparam int unsigned CW = OW + 2;  // room for a sum of two words doubled

  logic signed [CW-1:0] a, b, c, d;        // input-side node sums
  logic signed [CW-1:0] s02p, s02m;        // output-side sums of X0, X2
  logic signed [CW-1:0] s13rp, s13rm;      // ... of X1.re, X3.re
  logic signed [CW-1:0] s13ip, s13im;      // ... of X1.im, X3.im

  always_comb begin
    a = CW'(x[0]) + CW'(x[2]);
    b = CW'(x[0]) - CW'(x[2]);
    c = CW'(x[1]) + CW'(x[3]);
    d = CW'(x[1]) - CW'(x[3]);
    s02p  = CW'(y[W_X0])   + CW'(y[W_X2]);
    s02m  = CW'(y[W_X0])   - CW'(y[W_X2]);
    s13rp = CW'(y[W_X1RE]) + CW'(y[W_X3RE]);
    s13rm = CW'(y[W_X1RE]) - CW'(y[W_X3RE]);
    s13ip = CW'(y[W_X1IM]) + CW'(y[W_X3IM]);
    s13im = CW'(y[W_X3IM]) - CW'(y[W_X1IM]);
    err = (s02p  != (a <<< 1)) ||
          (s02m  != (c <<< 1)) ||
          (s13rp != (b <<< 1)) ||
          (s13rm != '0)        ||
          (s13ip != '0)        ||
          (s13im != (d <<< 1));
  end

endmodule
