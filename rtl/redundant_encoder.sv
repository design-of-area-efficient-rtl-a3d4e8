// redundant_encoder: inputs of the three redundant FFTs.
//
// Sample by sample it forms the sums
//   A5 = A1 + A2 + A3,  A6 = A1 + A2 + A4,  A7 = A1 + A3 + A4
// of the four original FFT inputs.  Each redundant input leaves out a
// different one of A2, A3, A4, which is what lets the corrector rebuild
// two failed FFTs one after the other.  The equations are the document's;
// the two bits of growth (no wrap-around) are this design's choice.
//
// Interface: a[fft][sample] in, r[redundant][sample] out, combinational.
module redundant_encoder #(
  parameter int unsigned IW = ftfft_pkg::DATA_W,  // original sample width
  parameter int unsigned OW = IW + 2              // redundant sample width
) (
  input  logic signed [IW-1:0] a [ftfft_pkg::N_ORIG][ftfft_pkg::N_POINTS],
  output logic signed [OW-1:0] r [ftfft_pkg::N_RED][ftfft_pkg::N_POINTS]
);
  import ftfft_pkg::*;

  always_comb begin
    for (int n = 0; n < int'(N_POINTS); n++) begin
      r[0][n] = OW'(a[0][n]) + OW'(a[1][n]) + OW'(a[2][n]);  // A5
      r[1][n] = OW'(a[0][n]) + OW'(a[1][n]) + OW'(a[3][n]);  // A6
      r[2][n] = OW'(a[0][n]) + OW'(a[2][n]) + OW'(a[3][n]);  // A7
    end
  end

endmodule
