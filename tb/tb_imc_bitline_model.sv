// tb_imc_bitline_model: drives the analog model with word-line pulses of widths 8, 4, 2, 1
// cycles, random weights and sparse inputs, and checks the two rail voltages against an
// independent computation: vy_p = 256 * sum(x_i * (4 b1 + 2 b2 + b3)) / nnz and
// vy_n = 256 * sum(x_i * 8 b0) / nnz over the columns with x_i != 0 (b0 is the sign row).
module tb_imc_bitline_model;
  localparam int C = 256;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic clr = 0, phi1 = 0;
  logic [3:0] wl = 0;
  logic [3:0][C-1:0] bits;
  logic [C-1:0][3:0] x;
  logic [C-1:0] phi3 = 0;
  logic [15:0] vy_p, vy_n;

  imc_bitline_model #(.COLS(C)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int rep = 0; rep < 30; rep++) begin
      longint sp, sn, cnt;
      logic [C-1:0] s;
      for (int k = 0; k < 4; k++) for (int i = 0; i < C; i += 32) bits[k][i +: 32] = $urandom;
      sp = 0; sn = 0; cnt = 0;
      for (int i = 0; i < C; i++) begin
        x[i] = ($urandom_range(0, 9) < 6) ? 4'd0 : 4'($urandom_range(1, 15));
        if (rep == 1) x[i] = 4'd15;
        if (rep == 2) x[i] = (i == 7) ? 4'd3 : 4'd0;
        s[i] = (x[i] != 0);
        if (s[i]) begin
          sp += longint'(x[i]) * (4*bits[1][i] + 2*bits[2][i] + bits[3][i]);
          sn += longint'(x[i]) * 8 * bits[0][i];
          cnt++;
        end
      end
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      for (int c = 0; c < 8; c++) begin
        for (int k = 0; k < 4; k++) wl[k] = (c < (8 >> k));
        @(negedge clk);
      end
      wl = 0;
      @(negedge clk); phi1 = 1;
      @(negedge clk); phi1 = 0; phi3 = s;
      @(negedge clk); phi3 = 0;
      checks++;
      if (vy_p != 16'((sp * 256) / cnt) || vy_n != 16'((sn * 256) / cnt)) begin
        failures++; $display("rep %0d vy %0d/%0d exp %0d/%0d", rep, vy_p, vy_n, (sp*256)/cnt, (sn*256)/cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
