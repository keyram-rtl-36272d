// tb_sparse_sum_ctrl: drives random sparse input vectors and checks the phase sequence
// (phi1, then phi2, then done), that phi3_i pulses with phi2 exactly for the non-zero inputs,
// and the count of non-zero inputs.
module tb_sparse_sum_ctrl;
  localparam int N = 256;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, start = 0, phi1, phi2, done;
  logic [N-1:0][3:0] x;
  logic [N-1:0] phi3, s_exp;
  logic [8:0] nnz;
  int exp_cnt;

  sparse_sum_ctrl #(.N(N), .BX(4)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 40; rep++) begin
      exp_cnt = 0;
      for (int i = 0; i < N; i++) begin
        // 50-70 % zeros, as after ReLU
        x[i] = ($urandom_range(0, 99) < 60) ? 4'd0 : 4'($urandom_range(1, 15));
        if (rep == 0) x[i] = 4'd0;
        s_exp[i] = (x[i] != 0);
        exp_cnt += int'(s_exp[i]);
      end
      @(negedge clk); start = 1;
      checks++; if (phi3 != '0 || phi1 || phi2) begin failures++; $display("phases idle wrong"); end
      @(negedge clk); start = 0;
      checks++; if (!phi1 || phi2 || phi3 != '0) begin failures++; $display("phi1 step wrong"); end
      checks++; if (int'(nnz) != exp_cnt) begin failures++; $display("nnz %0d exp %0d", nnz, exp_cnt); end
      @(negedge clk);
      checks++; if (phi1 || !phi2 || phi3 != s_exp) begin failures++; $display("phi2/phi3 wrong"); end
      @(negedge clk);
      checks++; if (!done || phi2 || phi3 != '0) begin failures++; $display("done wrong"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
