// tb_parseval_check: the sum-of-squares check against energies computed
// in the testbench.  Correct outputs must pass.  Random corruptions must
// be flagged exactly when they change the output energy; a sign flip of a
// non-zero word is applied on purpose to show the blind spot of the check,
// and the number of such undetectable cases is reported.  Combinational;
// sampled one clock after the inputs change.
module tb_parseval_check;
  import ftfft_pkg::*;
  import ftfft_tb_pkg::*;

  localparam int IW = DATA_W;
  localparam int OW = IW + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IW-1:0] x [N_POINTS];
  logic signed [OW-1:0] y [N_WORDS];
  logic                 err;
  int checks = 0, failures = 0, blind = 0, flagged = 0;

  parseval_check dut (.x(x), .y(y), .err(err));

  initial begin
    samples_t s;
    words_t   r, c;
    logic     exp_err;
    // The document's example samples.
    s = '{1, 2, 3, 4};
    for (int t = 0; t < 3000; t++) begin
      if (t > 0)
        for (int n = 0; n < 4; n++) s[n] = rand_sample(IW);
      for (int n = 0; n < 4; n++) x[n] = IW'(s[n]);
      r = ref_fft(s);
      for (int k = 0; k < 6; k++) y[k] = OW'(r[k]);
      @(posedge clk);
      checks++;
      if (err !== 1'b0) begin
        failures++;
        $display("FAIL false alarm x=%p", s);
      end
      c = r;
      if (t % 3 == 0) begin
        int k;
        k = $urandom_range(5);
        c[k] = -c[k];  // sign flip: energy unchanged
        if (c[k] == -64) c[k] = 63;  // keep it inside the word range
      end else begin
        int k, b;
        k = $urandom_range(5);
        b = $urandom_range(OW - 1);
        c[k] = sext(c[k] ^ (1 << b), OW);
      end
      for (int k = 0; k < 6; k++) y[k] = OW'(c[k]);
      exp_err = (energy_out(c) != energy_in(s));
      if (exp_err) flagged++; else blind++;
      @(posedge clk);
      checks++;
      if (err !== exp_err) begin
        failures++;
        $display("FAIL x=%p y=%p err=%b exp=%b", s, c, err, exp_err);
      end
    end
    $display("corruptions flagged=%0d undetectable=%0d", flagged, blind);
    checks++;
    if (flagged == 0 || blind == 0) begin
      failures++;
      $display("FAIL both detected and undetectable corruptions expected");
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
