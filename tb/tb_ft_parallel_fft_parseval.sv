// tb_ft_parallel_fft_parseval: end-to-end test of the parallel-correction
// variant, the protected parallel FFT built with sum-of-squares checkers
// (CHECK = CHK_PARSEVAL).
//
// Each sample set carries a fault scenario on zero, one or two FFTs: a
// single flipped bit in one output word, or a sign flip of one word.  The
// testbench predicts each FFT's flag from the energies of its inputs and
// its corrupted outputs.  When the flags name exactly the corrupted FFTs,
// all four FFT outputs must come out corrected; when a corruption leaves
// the energy unchanged (the check's blind spot) only the flags are
// compared.  Latency (three cycles) is checked on every output, and clean,
// single, double and undetected cases must all occur.
module tb_ft_parallel_fft_parseval;
  import ftfft_pkg::*;
  import ftfft_tb_pkg::*;

  localparam int W  = DATA_W;
  localparam int OW = W + 2;
  localparam int LATENCY = 3;
  localparam int N_SETS = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n;
  logic                in_valid;
  logic signed [W-1:0] in_a     [N_ORIG][N_POINTS];
  logic       [OW-1:0] inj_mask [N_ORIG][N_WORDS];
  logic                out_valid;
  logic signed [OW-1:0] out_w   [N_ORIG][N_WORDS];
  logic [N_ORIG-1:0]   out_err, out_corrected;
  logic                out_uncorrectable;

  ft_parallel_fft #(.CHECK(CHK_PARSEVAL)) dut (
    .clk, .rst_n, .in_valid, .in_a, .inj_mask,
    .out_valid, .out_w, .out_err, .out_corrected, .out_uncorrectable
  );

  typedef struct {
    int      tv [4][6];
    int      pat;   // corrupted FFTs
    int      flag;  // FFTs the Parseval check should flag
    longint  cyc;
  } txn_t;

  txn_t   q[$];
  longint cycle = 0;
  int checks = 0, failures = 0, received = 0;
  int n_clean = 0, n_single = 0, n_double = 0, n_missed = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic send(samples_t s [4], int pat);
    txn_t t;
    words_t r, c;
    t.flag = 0;
    for (int i = 0; i < 4; i++) begin
      r = ref_fft(s[i]);
      c = r;
      for (int n = 0; n < 4; n++) in_a[i][n] = W'(s[i][n]);
      for (int k = 0; k < 6; k++) t.tv[i][k] = r[k];
      if (pat[i]) begin
        int k;
        k = $urandom_range(5);
        if ($urandom_range(3) == 0 && r[k] != 0 && r[k] != -64)
          c[k] = -r[k];
        else
          c[k] = sext(r[k] ^ (1 << $urandom_range(OW - 1)), OW);
      end
      for (int k = 0; k < 6; k++) inj_mask[i][k] = OW'(r[k] ^ c[k]);
      if (energy_out(c) != energy_in(s[i])) t.flag |= (1 << i);
    end
    t.pat = pat;
    in_valid = 1'b1;
    @(posedge clk);
    t.cyc = cycle;
    q.push_back(t);
    #1;
    in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      txn_t t;
      received++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        t = q.pop_front();
        checks++;
        if (cycle - t.cyc != LATENCY) begin
          failures++;
          $display("FAIL latency %0d", cycle - t.cyc);
        end
        checks++;
        if (out_err !== 4'(t.flag)) begin
          failures++;
          $display("FAIL flags got %b exp %b", out_err, 4'(t.flag));
        end
        if (t.flag == t.pat) begin
          for (int i = 0; i < 4; i++)
            for (int k = 0; k < 6; k++) begin
              checks++;
              if (int'(out_w[i][k]) != t.tv[i][k]) begin
                failures++;
                $display("FAIL pat=%b fft %0d word %0d got %0d exp %0d", 4'(t.pat), i, k,
                         out_w[i][k], t.tv[i][k]);
              end
            end
          case ($countones(4'(t.pat)))
            0: n_clean++;
            1: n_single++;
            default: n_double++;
          endcase
        end else begin
          n_missed++;
        end
      end
    end
  end

  initial begin
    samples_t s [4];
    int pat, a, b;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < 4; i++) begin
      for (int n = 0; n < 4; n++) in_a[i][n] = '0;
      for (int k = 0; k < 6; k++) inj_mask[i][k] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < N_SETS; t++) begin
      for (int i = 0; i < 4; i++)
        for (int n = 0; n < 4; n++) s[i][n] = rand_sample(W);
      case ($urandom_range(2))
        0: pat = 0;
        1: pat = 1 << $urandom_range(3);
        default: begin
          a = $urandom_range(3);
          do b = $urandom_range(3); while (b == a);
          pat = (1 << a) | (1 << b);
        end
      endcase
      send(s, pat);
    end
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (received != N_SETS || q.size() != 0) begin
      failures++;
      $display("FAIL received %0d of %0d", received, N_SETS);
    end
    $display("clean=%0d single=%0d double=%0d undetected=%0d",
             n_clean, n_single, n_double, n_missed);
    checks++;
    if (n_clean == 0 || n_single == 0 || n_double == 0 || n_missed == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
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
