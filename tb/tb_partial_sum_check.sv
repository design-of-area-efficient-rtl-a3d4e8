// tb_partial_sum_check: the partial-sum check must stay quiet for every
// correct FFT output and must flag every corrupted one.  Correct outputs
// come from a direct DFT evaluation; corruptions XOR a random non-zero
// mask into a random non-empty set of output words (from a single flipped
// bit up to all six words).  Combinational; sampled one clock later.
module tb_partial_sum_check;
  import ftfft_pkg::*;
  import ftfft_tb_pkg::*;

  localparam int IW = DATA_W;
  localparam int OW = IW + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IW-1:0] x [N_POINTS];
  logic signed [OW-1:0] y [N_WORDS];
  logic                 err;
  int checks = 0, failures = 0;

  partial_sum_check dut (.x(x), .y(y), .err(err));

  initial begin
    samples_t s;
    words_t   r;
    logic [OW-1:0] m;
    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < 4; n++) begin
        s[n] = rand_sample(IW);
        x[n] = IW'(s[n]);
      end
      r = ref_fft(s);
      for (int k = 0; k < 6; k++) y[k] = OW'(r[k]);
      @(posedge clk);
      checks++;
      if (err !== 1'b0) begin
        failures++;
        $display("FAIL false alarm x=%p", s);
      end
      // Corrupt: odd t flips one bit of one word, even t corrupts a random set.
      if (t % 2 == 1) begin
        int k, b;
        k = $urandom_range(5);
        b = $urandom_range(OW - 1);
        y[k] = y[k] ^ (OW'(1) << b);
      end else begin
        int set;
        set = $urandom_range(63, 1);
        for (int k = 0; k < 6; k++)
          if (set[k]) begin
            do m = OW'($urandom); while (m == '0);
            y[k] = y[k] ^ m;
          end
      end
      @(posedge clk);
      checks++;
      if (err !== 1'b1) begin
        failures++;
        $display("FAIL missed error x=%p", s);
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
