// error_corrector: the "error indicator and corrector" of the parallel FFTs.
//
// Inputs are the output words B1..B4 of the four original FFTs, the output
// words B5..B7 of the three redundant FFTs and one error flag per original
// FFT from its checker.  Because the FFT is linear, the redundant outputs
// obey
//   B5 = B1 + B2 + B3,   B6 = B1 + B2 + B4,   B7 = B1 + B3 + B4.
// A flagged FFT is rebuilt from one of these relations.  With two flagged
// FFTs, the first is rebuilt from the relation that leaves the second out,
// and the second from another relation using the rebuilt first, e.g. for
// FFT1 and FFT2:  B1 = B7 - B3 - B4,  then  B2 = B5 - B1 - B3.
// Every pair of original FFTs can be corrected this way.  With three or
// four flags the outputs are passed on unchanged and 'uncorrectable' is
// raised.
//
// The relations and the two-error example are the document's.  The choice
// of relation for a single error and for the other pairs, the handling of
// three or more flags and the assumption that the redundant FFTs are
// fault-free (they have no checker) are this design's.
//
// The corrected words are computed RW bits wide and their two top bits
// dropped: a rebuilt original word always fits OW bits, so lint's report
// of unused upper bits of c1..c4 is expected.
//
// Interface: combinational.  b_orig[fft][word], b_red[redundant][word],
// err[fft] in; w[fft][word], corrected[fft], uncorrectable out.
module error_corrector #(
  parameter int unsigned OW = ftfft_pkg::DATA_W + 2,  // original FFT word width
  parameter int unsigned RW = OW + 2                  // redundant FFT word width
) (
  input  logic signed [OW-1:0] b_orig [ftfft_pkg::N_ORIG][ftfft_pkg::N_WORDS],
  input  logic signed [RW-1:0] b_red  [ftfft_pkg::N_RED][ftfft_pkg::N_WORDS],
  input  logic [ftfft_pkg::N_ORIG-1:0] err,
  output logic signed [OW-1:0] w      [ftfft_pkg::N_ORIG][ftfft_pkg::N_WORDS],
  output logic [ftfft_pkg::N_ORIG-1:0] corrected,
  output logic                 uncorrectable
);
  import ftfft_pkg::*;

  logic signed [RW-1:0] b1, b2, b3, b4, b5, b6, b7;  // one word position
  logic signed [RW-1:0] c1, c2, c3, c4;              // corrected words

  always_comb begin
    uncorrectable = 1'b0;
    corrected     = '0;
    case (err)
      4'b0000: ;
      4'b0001, 4'b0010, 4'b0100, 4'b1000,
      4'b0011, 4'b0101, 4'b1001, 4'b0110, 4'b1010, 4'b1100: corrected = err;
      default: uncorrectable = 1'b1;
    endcase

    for (int k = 0; k < int'(N_WORDS); k++) begin
      b1 = RW'(b_orig[0][k]);
      b2 = RW'(b_orig[1][k]);
      b3 = RW'(b_orig[2][k]);
      b4 = RW'(b_orig[3][k]);
      b5 = b_red[0][k];
      b6 = b_red[1][k];
      b7 = b_red[2][k];
      c1 = b1;
      c2 = b2;
      c3 = b3;
      c4 = b4;
      case (err)
        4'b0001: c1 = b5 - b2 - b3;
        4'b0010: c2 = b5 - b1 - b3;
        4'b0100: c3 = b5 - b1 - b2;
        4'b1000: c4 = b6 - b1 - b2;
        4'b0011: begin c1 = b7 - b3 - b4; c2 = b5 - c1 - b3; end
        4'b0101: begin c1 = b6 - b2 - b4; c3 = b5 - c1 - b2; end
        4'b1001: begin c1 = b5 - b2 - b3; c4 = b6 - c1 - b2; end
        4'b0110: begin c3 = b7 - b1 - b4; c2 = b5 - b1 - c3; end
        4'b1010: begin c4 = b7 - b1 - b3; c2 = b5 - b1 - b3; end
        4'b1100: begin c3 = b5 - b1 - b2; c4 = b6 - b1 - b2; end
        default: ;
      endcase
      w[0][k] = OW'(c1);
      w[1][k] = OW'(c2);
      w[2][k] = OW'(c3);
      w[3][k] = OW'(c4);
    end
  end

endmodule
