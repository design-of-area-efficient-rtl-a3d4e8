// tb_ft_parallel_fft: end-to-end test of the protected parallel FFT at its
// default parameters (5-bit samples, partial-sum checkers).
//
// A stream of sample sets is fed in, mostly back to back with occasional
// idle cycles.  Each set carries a fault scenario injected through
// inj_mask: none, one FFT, two FFTs (all six pairs, including the FFT1 and
// FFT2 case of the document) or three and four FFTs, with a random set of
// output words and random non-zero XOR masks per corrupted FFT.  Expected
// results come from a direct DFT evaluation in the testbench.  For every
// output the test checks the error flags (the partial-sum check must flag
// exactly the corrupted FFTs), the corrected words for up to two errors,
// the pass-through and 'uncorrectable' flag for more, and the latency of
// three cycles.  Each mechanism must occur at least once.
module tb_ft_parallel_fft;
  import ftfft_pkg::*;
  import ftfft_tb_pkg::*;

  localparam int W  = DATA_W;
  localparam int OW = W + 2;
  localparam int LATENCY = 3;
  localparam int N_SETS = 4000;

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

  ft_parallel_fft dut (
    .clk, .rst_n, .in_valid, .in_a, .inj_mask,
    .out_valid, .out_w, .out_err, .out_corrected, .out_uncorrectable
  );

  typedef struct {
    int      tv [4][6];  // true FFT outputs
    int      cv [4][6];  // corrupted FFT outputs
    int      pat;        // corrupted FFTs
    longint  cyc;        // cycle the set was sampled
  } txn_t;

  txn_t   q[$];
  longint cycle = 0;
  int checks = 0, failures = 0, received = 0;
  // Mechanism counters.
  int n_clean = 0, n_single = 0, n_double = 0, n_uncorr = 0;
  int n_b2b = 0, n_idle = 0;
  int n_pair [16];
  int n_single_fft [4];

  always @(posedge clk) cycle <= cycle + 1;

  task automatic send(samples_t s [4], int pat);
    txn_t t;
    words_t r;
    logic [OW-1:0] m;
    for (int i = 0; i < 4; i++) begin
      r = ref_fft(s[i]);
      for (int n = 0; n < 4; n++) in_a[i][n] = W'(s[i][n]);
      for (int k = 0; k < 6; k++) begin
        t.tv[i][k] = r[k];
        inj_mask[i][k] = '0;
      end
      if (pat[i]) begin
        int set;
        set = $urandom_range(63, 1);
        for (int k = 0; k < 6; k++)
          if (set[k]) begin
            do m = OW'($urandom); while (m == '0);
            inj_mask[i][k] = m;
          end
      end
      for (int k = 0; k < 6; k++)
        t.cv[i][k] = sext(r[k] ^ int'(inj_mask[i][k]), OW);
    end
    t.pat = pat;
    in_valid = 1'b1;
    @(posedge clk);
    t.cyc = cycle;
    q.push_back(t);
    #1;
    in_valid = 1'b0;
  endtask

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      txn_t t;
      int nflag;
      received++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        t = q.pop_front();
        nflag = $countones(4'(t.pat));
        checks++;
        if (cycle - t.cyc != LATENCY) begin
          failures++;
          $display("FAIL latency %0d", cycle - t.cyc);
        end
        checks++;
        if (out_err !== 4'(t.pat)) begin
          failures++;
          $display("FAIL flags got %b exp %b", out_err, 4'(t.pat));
        end
        checks++;
        if (out_uncorrectable !== (nflag > 2) ||
            out_corrected !== ((nflag > 2) ? 4'b0 : 4'(t.pat))) begin
          failures++;
          $display("FAIL corrected=%b unc=%b pat=%b", out_corrected, out_uncorrectable, 4'(t.pat));
        end
        for (int i = 0; i < 4; i++)
          for (int k = 0; k < 6; k++) begin
            checks++;
            if (int'(out_w[i][k]) != ((nflag > 2) ? t.cv[i][k] : t.tv[i][k])) begin
              failures++;
              $display("FAIL pat=%b fft %0d word %0d got %0d exp %0d", 4'(t.pat), i, k,
                       out_w[i][k], (nflag > 2) ? t.cv[i][k] : t.tv[i][k]);
            end
          end
        case (nflag)
          0: n_clean++;
          1: begin n_single++; for (int i = 0; i < 4; i++) if (t.pat[i]) n_single_fft[i]++; end
          2: begin n_double++; n_pair[t.pat]++; end
          default: n_uncorr++;
        endcase
      end
    end
  end

  function automatic int pick_pattern();
    int r;
    r = $urandom_range(99);
    if (r < 30) return 0;
    if (r < 55) return 1 << $urandom_range(3);
    if (r < 90) begin
      int a, b;
      a = $urandom_range(3);
      do b = $urandom_range(3); while (b == a);
      return (1 << a) | (1 << b);
    end
    if (r < 97) return 4'b1111 & ~(1 << $urandom_range(3));
    return 4'b1111;
  endfunction

  initial begin
    samples_t s [4];
    bit prev_valid;
    for (int p = 0; p < 16; p++) n_pair[p] = 0;
    for (int i = 0; i < 4; i++) n_single_fft[i] = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < 4; i++) begin
      for (int n = 0; n < 4; n++) in_a[i][n] = '0;
      for (int k = 0; k < 6; k++) inj_mask[i][k] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // The document's sample set 1,2,3,4 in every FFT, first clean, then
    // with FFT1 and FFT2 corrupted at the same time.
    for (int i = 0; i < 4; i++) s[i] = '{1, 2, 3, 4};
    send(s, 0);
    send(s, 4'b0011);
    n_b2b++;
    prev_valid = 1'b1;
    for (int t = 0; t < N_SETS; t++) begin
      if ($urandom_range(9) == 0) begin
        @(posedge clk);
        #1;
        n_idle++;
        prev_valid = 1'b0;
      end
      for (int i = 0; i < 4; i++)
        for (int n = 0; n < 4; n++) s[i][n] = rand_sample(W);
      if (prev_valid) n_b2b++;
      send(s, pick_pattern());
      prev_valid = 1'b1;
    end
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (received != N_SETS + 2 || q.size() != 0) begin
      failures++;
      $display("FAIL received %0d of %0d", received, N_SETS + 2);
    end
    $display("clean=%0d single=%0d double=%0d uncorrectable=%0d back_to_back=%0d idle=%0d",
             n_clean, n_single, n_double, n_uncorr, n_b2b, n_idle);
    checks++;
    if (n_clean == 0 || n_single == 0 || n_double == 0 || n_uncorr == 0 ||
        n_b2b == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_single_fft[i] == 0) begin
        failures++;
        $display("FAIL single error in FFT%0d never corrected", i + 1);
      end
    end
    for (int p = 0; p < 16; p++)
      if ($countones(4'(p)) == 2) begin
        checks++;
        if (n_pair[p] == 0) begin
          failures++;
          $display("FAIL error pair %b never corrected", 4'(p));
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
