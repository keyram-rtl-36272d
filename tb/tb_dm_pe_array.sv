// tb_dm_pe_array: loads random signed inputs into a random PE window, feeds the wrapped
// diagonals of a random signed N x M weight matrix (row r, PE col+k: W[(r-(N-1-k)) mod M][k]),
// injects biases, and checks that output m leaves PE col after step m+N-1 equal to
// bias_m + sum_k W[m][k] x_k, so that the whole product takes N+M-1 steps.
module tb_dm_pe_array;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, x_we = 0, step = 0;
  logic [5:0] x_idx, col, col_last;
  logic signed [7:0] x_data;
  logic [63:0][7:0] w;
  logic signed [24:0] inject, exit_sum;
  int W [64][64];
  int X [64];
  int BIAS [64];

  dm_pe_array dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    w = '0; inject = '0; col = 0; col_last = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 25; rep++) begin
      int N, M, C, got;
      N = $urandom_range(1, 64); M = $urandom_range(1, 64);
      if (rep == 0) begin N = 64; M = 64; end
      if (rep == 1) begin N = 2; M = 63; end
      if (rep == 2) begin N = 64; M = 64; end
      C = $urandom_range(0, 64 - N);
      col = 6'(C); col_last = 6'(C + N - 1);
      for (int m = 0; m < M; m++) begin
        BIAS[m] = $urandom_range(0, 255) - 128;
        for (int k = 0; k < N; k++) W[m][k] = $urandom_range(0, 255) - 128;
      end
      if (rep == 2) for (int m = 0; m < M; m++) for (int k = 0; k < N; k++) W[m][k] = -128;
      for (int k = 0; k < N; k++) begin
        X[k] = $urandom_range(0, 255) - 128;
        if (rep == 2) X[k] = -128;
        @(negedge clk); x_we = 1; x_idx = 6'(C + k); x_data = 8'(X[k]);
      end
      @(negedge clk); x_we = 0;
      got = 0;
      for (int s = 0; s <= N + M - 2; s++) begin
        int r;
        r = s % M;
        w = '0;
        for (int k = 0; k < N; k++) begin
          int m;
          m = ((r - (N - 1 - k)) % M + M) % M;
          w[C + k] = 8'(W[m][k]);
        end
        inject = (s < M) ? 25'(BIAS[s]) : 25'(0);
        step = 1;
        @(negedge clk); step = 0;
        if (s >= N - 1) begin
          int m, e;
          m = s - (N - 1);
          e = BIAS[m];
          for (int k = 0; k < N; k++) e += W[m][k] * X[k];
          checks++; got++;
          if (int'(exit_sum) != e) begin failures++; $display("rep %0d N %0d M %0d out %0d: %0d exp %0d", rep, N, M, m, exit_sum, e); end
        end
      end
      checks++; if (got != M) begin failures++; $display("outputs %0d", got); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
