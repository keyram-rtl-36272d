// tb_imc_block: loads random 4-bit two's complement weight vectors into an IMC bank through
// its 64-bit port, applies sparse 4-bit inputs, runs dot products and checks the rail
// voltages, the non-zero count, that the signed difference times nnz equals the exact dot
// product (up to truncation), and the latency from start to done (T_MAX + 5 = 13 cycles).
module tb_imc_block;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, wr_en = 0, rd_en = 0, start = 0, busy, done;
  logic [8:0] row; logic [1:0] cgrp; logic [63:0] wdata, rdata;
  logic [6:0] grp;
  logic [255:0][3:0] x;
  logic [15:0] vy_p, vy_n;
  logic [8:0] nnz;
  logic [255:0] cells [512];

  imc_block dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 512; r++) for (int g = 0; g < 4; g++) begin
      @(negedge clk); wr_en = 1; row = 9'(r); cgrp = 2'(g); wdata = {$urandom, $urandom};
      for (int j = 0; j < 64; j++) cells[r][4*j+g] = wdata[j];
    end
    @(negedge clk); wr_en = 0;
    for (int rep = 0; rep < 40; rep++) begin
      longint sp, sn, cnt, dot;
      int lat;
      grp = 7'($urandom_range(0, 127));
      sp = 0; sn = 0; cnt = 0; dot = 0;
      for (int i = 0; i < 256; i++) begin
        int w;
        x[i] = ($urandom_range(0, 9) < 6) ? 4'd0 : 4'($urandom_range(1, 15));
        w = 4*cells[4*grp+1][i] + 2*cells[4*grp+2][i] + cells[4*grp+3][i] - 8*cells[4*grp][i];
        if (x[i] != 0) begin
          cnt++;
          sp += longint'(x[i]) * (4*cells[4*grp+1][i] + 2*cells[4*grp+2][i] + cells[4*grp+3][i]);
          sn += longint'(x[i]) * 8 * cells[4*grp][i];
          dot += longint'(x[i]) * w;
        end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++; if (lat != 13) begin failures++; $display("latency %0d", lat); end
      checks++; if (int'(nnz) != cnt) begin failures++; $display("nnz %0d exp %0d", nnz, cnt); end
      checks++;
      if (vy_p != 16'((sp*256)/cnt) || vy_n != 16'((sn*256)/cnt)) begin
        failures++; $display("vy %0d %0d exp %0d %0d", vy_p, vy_n, (sp*256)/cnt, (sn*256)/cnt);
      end
      checks++;
      begin
        longint est;
        est = ((longint'(vy_p) - longint'(vy_n)) * cnt) / 256;
        if (est - dot > 2 || dot - est > 2) begin failures++; $display("dot est %0d exact %0d", est, dot); end
      end
    end
    // normal read after compute
    @(negedge clk); rd_en = 1; row = 9'd300; cgrp = 2'd1;
    @(negedge clk); rd_en = 0;
    begin
      logic [63:0] e;
      for (int j = 0; j < 64; j++) e[j] = cells[300][4*j+1];
      checks++; if (rdata != e) begin failures++; $display("read mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
