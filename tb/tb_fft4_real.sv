// tb_fft4_real: checks the 4-point FFT against a direct DFT evaluation.
// It applies the sample set 1,2,3,4 (outputs 10, -2+2j, -2, -2-2j), the
// extreme values of the 5-bit range and random samples, and compares all
// six output words.  The FFT is combinational: outputs are sampled one
// clock after the inputs change.
module tb_fft4_real;
  import ftfft_pkg::*;
  import ftfft_tb_pkg::*;

  localparam int IW = DATA_W;
  localparam int OW = IW + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IW-1:0] x [N_POINTS];
  logic signed [OW-1:0] y [N_WORDS];
  int checks = 0, failures = 0;

  fft4_real dut (.x(x), .y(y));

  task automatic apply(samples_t s);
    words_t r;
    for (int n = 0; n < 4; n++) x[n] = IW'(s[n]);
    @(posedge clk);
    r = ref_fft(s);
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (int'(y[k]) != r[k]) begin
        failures++;
        $display("FAIL x=%p word %0d got %0d exp %0d", s, k, y[k], r[k]);
      end
    end
  endtask

  initial begin
    samples_t s;
    s = '{1, 2, 3, 4};
    apply(s);
    // The document's example outputs, spelled out.
    checks++;
    if (!(y[0] == 10 && y[1] == -2 && y[2] == 2 && y[3] == -2 && y[4] == -2 && y[5] == -2)) begin
      failures++;
      $display("FAIL example 1,2,3,4");
    end
    s = '{-16, -16, -16, -16}; apply(s);
    s = '{15, 15, 15, 15};     apply(s);
    s = '{15, -16, 15, -16};   apply(s);
    s = '{-16, 15, 15, -16};   apply(s);
    repeat (500) begin
      for (int n = 0; n < 4; n++) s[n] = rand_sample(IW);
      apply(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
