// ft_parallel_fft: four parallel 4-point FFTs protected against soft errors
// by partial summation and error-correcting redundancy.
//
// Four original FFTs transform four independent blocks of real samples
// A1..A4.  Three redundant FFTs transform the sums A5 = A1+A2+A3,
// A6 = A1+A2+A4 and A7 = A1+A3+A4.  A checker next to each original FFT
// compares its inputs with its outputs and flags the FFT when they
// disagree; the corrector then rebuilds up to two flagged FFTs from the
// redundant outputs, using the linearity of the FFT.  Parameter CHECK picks
// the checker:
//   CHK_PARTIAL_SUM  adder-only partial-sum check (default)
//   CHK_PARSEVAL     sum-of-squares check ("parallel correction" variant)
//
// Soft errors are modelled by the inj_mask input: a mask per original FFT
// and output word that is XORed into that word between the FFT and both
// its checker and the corrector, as an upset inside the FFT would be.
// An all-zero mask is normal operation.
//
// Timing (this design's choice): three register stages.  Edge 1 captures
// the samples and masks, edge 2 the FFT outputs and error flags, edge 3
// the corrected words.  One new set of four blocks can be accepted every
// cycle; out_valid follows in_valid three cycles later.  rst_n is an
// asynchronous active-low reset that clears every register.  Assertions at
// the end state the output rules: only flagged FFTs are rebuilt, and a set
// is uncorrectable exactly when more than two FFTs are flagged.
//
// Block structure, equations and sample width follow the document; the
// checker's exact sums, the pipeline, the fault-injection port and the
// word widths are this design's choices.
module ft_parallel_fft
  import ftfft_pkg::*;
#(
  parameter int unsigned W     = DATA_W,          // input sample width
  parameter check_mode_e CHECK = CHK_PARTIAL_SUM  // per-FFT checker
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_a     [N_ORIG][N_POINTS],
  input  logic        [W+1:0]  inj_mask [N_ORIG][N_WORDS],
  output logic                 out_valid,
  output logic signed [W+1:0]  out_w    [N_ORIG][N_WORDS],
  output logic [N_ORIG-1:0]    out_err,
  output logic [N_ORIG-1:0]    out_corrected,
  output logic                 out_uncorrectable
);

  localparam int unsigned OW = W + 2;   // original FFT word width
  localparam int unsigned RIW = W + 2;  // redundant FFT sample width
  localparam int unsigned RW = W + 4;   // redundant FFT word width

  // ---- stage 1: captured inputs
  logic                 v1;
  logic signed [W-1:0]  a_q   [N_ORIG][N_POINTS];
  logic        [OW-1:0] inj_q [N_ORIG][N_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      for (int i = 0; i < int'(N_ORIG); i++) begin
        for (int n = 0; n < int'(N_POINTS); n++) a_q[i][n] <= '0;
        for (int k = 0; k < int'(N_WORDS); k++) inj_q[i][k] <= '0;
      end
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        a_q   <= in_a;
        inj_q <= inj_mask;
      end
    end
  end

  // ---- FFTs, redundancy and checks
  logic signed [RIW-1:0] r_in   [N_RED][N_POINTS];
  logic signed [OW-1:0]  y_fft  [N_ORIG][N_WORDS];
  logic signed [OW-1:0]  y_orig [N_ORIG][N_WORDS];
  logic signed [RW-1:0]  y_red  [N_RED][N_WORDS];
  logic [N_ORIG-1:0]     err;

  redundant_encoder #(.IW(W), .OW(RIW)) u_enc (.a(a_q), .r(r_in));

  for (genvar i = 0; i < int'(N_ORIG); i++) begin : g_orig
    fft4_real #(.IW(W), .OW(OW)) u_fft (.x(a_q[i]), .y(y_fft[i]));

    always_comb
      for (int k = 0; k < int'(N_WORDS); k++)
        y_orig[i][k] = y_fft[i][k] ^ inj_q[i][k];

    if (CHECK == CHK_PARTIAL_SUM) begin : g_ps
      partial_sum_check #(.IW(W), .OW(OW)) u_chk (.x(a_q[i]), .y(y_orig[i]), .err(err[i]));
    end else begin : g_pv
      parseval_check #(.IW(W), .OW(OW)) u_chk (.x(a_q[i]), .y(y_orig[i]), .err(err[i]));
    end
  end

  for (genvar j = 0; j < int'(N_RED); j++) begin : g_red
    fft4_real #(.IW(RIW), .OW(RW)) u_fft (.x(r_in[j]), .y(y_red[j]));
  end

  // ---- stage 2: FFT outputs and flags
  logic                 v2;
  logic signed [OW-1:0] b_orig_q [N_ORIG][N_WORDS];
  logic signed [RW-1:0] b_red_q  [N_RED][N_WORDS];
  logic [N_ORIG-1:0]    err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2    <= 1'b0;
      err_q <= '0;
      for (int k = 0; k < int'(N_WORDS); k++) begin
        for (int i = 0; i < int'(N_ORIG); i++) b_orig_q[i][k] <= '0;
        for (int j = 0; j < int'(N_RED); j++)  b_red_q[j][k]  <= '0;
      end
    end else begin
      v2 <= v1;
      if (v1) begin
        b_orig_q <= y_orig;
        b_red_q  <= y_red;
        err_q    <= err;
      end
    end
  end

  // ---- correction
  logic signed [OW-1:0] w_c [N_ORIG][N_WORDS];
  logic [N_ORIG-1:0]    corr_c;
  logic                 unc_c;

  error_corrector #(.OW(OW), .RW(RW)) u_corr (
    .b_orig(b_orig_q), .b_red(b_red_q), .err(err_q),
    .w(w_c), .corrected(corr_c), .uncorrectable(unc_c)
  );

  // ---- stage 3: outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid         <= 1'b0;
      out_err           <= '0;
      out_corrected     <= '0;
      out_uncorrectable <= 1'b0;
      for (int i = 0; i < int'(N_ORIG); i++)
        for (int k = 0; k < int'(N_WORDS); k++) out_w[i][k] <= '0;
    end else begin
      out_valid <= v2;
      if (v2) begin
        out_w             <= w_c;
        out_err           <= err_q;
        out_corrected     <= corr_c;
        out_uncorrectable <= unc_c;
      end
    end
  end

  // ---- output rules
  // Only flagged FFTs are rebuilt, and nothing is rebuilt when the set is
  // declared uncorrectable.
  a_corr_flagged: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> ((out_corrected & ~out_err) == '0));
  a_corr_excl: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> !(out_uncorrectable && (out_corrected != '0)));
  a_unc_count: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (out_uncorrectable == ($countones(out_err) > 2)));

endmodule
