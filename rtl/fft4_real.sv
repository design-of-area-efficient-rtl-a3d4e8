// fft4_real: 4-point radix-2 FFT of four real samples, adders only.
//
// The first stage forms the butterfly nodes a = x0+x2, b = x0-x2,
// c = x1+x3, d = x1-x3; the second stage applies the twiddles of a
// 4-point transform (+1, -j) and gives
//   X0 = a+c,  X1 = b - j*d,  X2 = a-c,  X3 = b + j*d.
// The outputs come out as the six words {X0, X1.re, X1.im, X2, X3.re,
// X3.im}, the order the document's simulation prints them in.  Every
// output is two bits wider than the input so that no sum wraps; with the
// samples 1,2,3,4 the outputs are 10, -2+2j, -2, -2-2j.
//
// Interface: x[0..3] in, y[0..5] out, purely combinational (zero latency).
// The transform is the document's; the real-input form and the output
// widths are this design's choices.
module fft4_real #(
  parameter int unsigned IW = ftfft_pkg::DATA_W,  // input sample width
  parameter int unsigned OW = IW + 2              // output word width
) (
  input  logic signed [IW-1:0] x [ftfft_pkg::N_POINTS],
  output logic signed [OW-1:0] y [ftfft_pkg::N_WORDS]
);
  import ftfft_pkg::*;

  logic signed [OW-1:0] a, b, c, d;

  always_comb begin
    a = OW'(x[0]) + OW'(x[2]);
    b = OW'(x[0]) - OW'(x[2]);
    c = OW'(x[1]) + OW'(x[3]);
    d = OW'(x[1]) - OW'(x[3]);
    y[W_X0]   = a + c;
    y[W_X1RE] = b;
    y[W_X1IM] = -d;
    y[W_X2]   = a - c;
    y[W_X3RE] = b;
    y[W_X3IM] = d;
  end

endmodule
