// parseval_check: sum-of-squares (Parseval) check of one 4-point FFT.
//
// Parseval's theorem for an N-point DFT says sum|X_k|^2 = N * sum x_n^2.
// This block squares the four real input samples and the six output words
// and raises 'err' when the output energy differs from four times the input
// energy.  It is the checker of the parallel-correction variant, where it
// replaces the partial-sum check in front of the corrector.  Like any
// sum-of-squares check it misses errors that keep the energy unchanged,
// for example a sign flip of one output word.
//
// The check itself is the document's; widths are this design's choice,
// wide enough that no square or sum wraps.
//
// Interface: x (FFT input samples), y (FFT output words), err.
// Combinational; err is valid in the same cycle as x and y.
module parseval_check #(
  parameter int unsigned IW = ftfft_pkg::DATA_W,  // input sample width
  parameter int unsigned OW = IW + 2              // FFT output word width
) (
  input  logic signed [IW-1:0] x [ftfft_pkg::N_POINTS],
  input  logic signed [OW-1:0] y [ftfft_pkg::N_WORDS],
  output logic                 err
);
  import ftfft_pkg::*;

  localparam int unsigned SW = 2 * OW + 3;  // sum of six squares of OW bits

  logic [SW-1:0] e_in, e_out;

  always_comb begin
    e_in = '0;
    for (int n = 0; n < int'(N_POINTS); n++)
      e_in += SW'(unsigned'(32'(x[n]) * 32'(x[n])));
    e_in = e_in << 2;  // times N = 4
    e_out = '0;
    for (int k = 0; k < int'(N_WORDS); k++)
      e_out += SW'(unsigned'(32'(y[k]) * 32'(y[k])));
    err = (e_in != e_out);
  end

endmodule
