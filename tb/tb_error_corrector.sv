// tb_error_corrector: builds consistent FFT outputs B1..B7 (B5..B7 as the
// sums the redundancy defines), corrupts the FFTs named by a random error
// pattern and checks the corrector's output.  Every pattern of up to two
// flagged FFTs must give back the true words; three or four flags must
// pass the words on unchanged with 'uncorrectable' set.  Every one of the
// 16 patterns is exercised.  Combinational; sampled one clock later.
module tb_error_corrector;
  import ftfft_pkg::*;
  import ftfft_tb_pkg::*;

  localparam int OW = DATA_W + 2;
  localparam int RW = OW + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [OW-1:0] b_orig [N_ORIG][N_WORDS];
  logic signed [RW-1:0] b_red  [N_RED][N_WORDS];
  logic [N_ORIG-1:0]    err;
  logic signed [OW-1:0] w      [N_ORIG][N_WORDS];
  logic [N_ORIG-1:0]    corrected;
  logic                 uncorrectable;
  int checks = 0, failures = 0;
  int seen [16];

  error_corrector dut (
    .b_orig(b_orig), .b_red(b_red), .err(err),
    .w(w), .corrected(corrected), .uncorrectable(uncorrectable)
  );

  initial begin
    int tv [4][6];
    int cv [4][6];
    int pat, nflag;
    for (int p = 0; p < 16; p++) seen[p] = 0;
    for (int t = 0; t < 3200; t++) begin
      pat = (t < 16) ? t : $urandom_range(15);
      seen[pat]++;
      nflag = $countones(pat[3:0]);
      for (int k = 0; k < 6; k++) begin
        for (int i = 0; i < 4; i++) begin
          tv[i][k] = rand_sample(OW - 1);  // true word, half range so sums fit
          cv[i][k] = pat[i] ? rand_sample(OW) : tv[i][k];
          b_orig[i][k] = OW'(cv[i][k]);
        end
        b_red[0][k] = RW'(tv[0][k] + tv[1][k] + tv[2][k]);
        b_red[1][k] = RW'(tv[0][k] + tv[1][k] + tv[3][k]);
        b_red[2][k] = RW'(tv[0][k] + tv[2][k] + tv[3][k]);
      end
      err = 4'(pat);
      @(posedge clk);
      checks++;
      if (uncorrectable !== (nflag > 2) || corrected !== ((nflag > 2) ? 4'b0 : 4'(pat))) begin
        failures++;
        $display("FAIL flags pat=%b corrected=%b unc=%b", pat[3:0], corrected, uncorrectable);
      end
      for (int i = 0; i < 4; i++)
        for (int k = 0; k < 6; k++) begin
          checks++;
          if (int'(w[i][k]) != ((nflag > 2) ? cv[i][k] : tv[i][k])) begin
            failures++;
            $display("FAIL pat=%b fft %0d word %0d got %0d", pat[3:0], i, k, w[i][k]);
          end
        end
    end
    for (int p = 0; p < 16; p++) begin
      checks++;
      if (seen[p] == 0) begin
        failures++;
        $display("FAIL pattern %b never applied", p[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
