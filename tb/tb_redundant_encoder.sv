// tb_redundant_encoder: checks the three redundant FFT inputs
// A5 = A1+A2+A3, A6 = A1+A2+A4, A7 = A1+A3+A4 for random and extreme
// samples (no wrap-around allowed).  Combinational; outputs are sampled
// one clock after the inputs change.
module tb_redundant_encoder;
  import ftfft_pkg::*;
  import ftfft_tb_pkg::*;

  localparam int IW = DATA_W;
  localparam int OW = IW + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IW-1:0] a [N_ORIG][N_POINTS];
  logic signed [OW-1:0] r [N_RED][N_POINTS];
  int checks = 0, failures = 0;
  int v [4][4];

  redundant_encoder dut (.a(a), .r(r));

  task automatic check_all();
    int e [3];
    @(posedge clk);
    for (int n = 0; n < 4; n++) begin
      e[0] = v[0][n] + v[1][n] + v[2][n];
      e[1] = v[0][n] + v[1][n] + v[3][n];
      e[2] = v[0][n] + v[2][n] + v[3][n];
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(r[j][n]) != e[j]) begin
          failures++;
          $display("FAIL redundant %0d sample %0d got %0d exp %0d", j, n, r[j][n], e[j]);
        end
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 402; t++) begin
      for (int i = 0; i < 4; i++)
        for (int n = 0; n < 4; n++) begin
          v[i][n] = (t == 0) ? -16 : (t == 1) ? 15 : rand_sample(IW);
          a[i][n] = IW'(v[i][n]);
        end
      check_all();
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
