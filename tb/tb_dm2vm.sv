// tb_dm2vm: loads random 8-bit weights and biases of fc1, fc2, fc5 and fc6 into the DM2VM
// SRAM using the example map of keyram_tb_pkg, runs the 10 passes of fc1/fc2 and the 4 passes
// of fc5/fc6, and compares every output (4-bit fc3 inputs, 8-bit class scores, hard-tanh
// location) with a direct integer evaluation of each layer. It also checks that each pass
// takes N+M+3 cycles (N+M streaming cycles as published, plus setup and write-back).
module tb_dm2vm;
  import keyram_pkg::*;
  import keyram_tb_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic rst_n = 0;
  logic io_we = 0, hw_en = 0, sw_en = 0, tw_en = 0, start = 0, busy, done, ib_we;
  logic [7:0] io_addr = 0, io_wdata = 0, io_rdata, hw_addr = 0, hw_data = 0;
  logic [6:0] sw_row = 0, ib_addr;
  logic [2:0] sw_word = 0;
  logic [63:0] sw_data = 0;
  logic [3:0] tw_idx = 0, first_idx = 0, bias_shift = 0, ib_data;
  dm_pass_t tw_data = '0;
  logic [4:0] count = 0;

  dm2vm dut (.*);

  dig_weights_t d;
  logic [DM_ROW_BITS-1:0] img [DM_ROWS];
  dm_pass_t passes [N_PASSES];
  int ib [128];
  int l [2], x [64], h [127];
  int htanh_clamped = 0, relu_zeroed = 0;

  always @(posedge clk) if (ib_we) ib[ib_addr] <= int'(ib_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int first, int cnt);
    int t0, exp;
    exp = 1;
    for (int i = first; i < first + cnt; i++)
      exp += int'(passes[i].n_in_m1) + 1 + int'(passes[i].m_out_m1) + 1 + 3;
    @(negedge clk); start = 1; first_idx = 4'(first); count = 5'(cnt); t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != exp) begin failures++; $display("passes %0d..: %0d cycles, expected %0d", first, cyc - t0, exp); end
  endtask

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      d.sh1 = 11; d.sh2 = 12; d.sh5 = 9; d.sh6 = 8; d.bias_shift = 6;
      foreach (d.w1[m, k]) d.w1[m][k] = $urandom_range(0, 255) - 128;
      foreach (d.w2[m, k]) d.w2[m][k] = $urandom_range(0, 255) - 128;
      foreach (d.w5[m, k]) d.w5[m][k] = $urandom_range(0, 255) - 128;
      foreach (d.w6[m, k]) d.w6[m][k] = $urandom_range(0, 255) - 128;
      foreach (d.b1[m]) d.b1[m] = $urandom_range(0, 255) - 128;
      foreach (d.b2[m]) d.b2[m] = $urandom_range(0, 255) - 128;
      foreach (d.b5[m]) d.b5[m] = $urandom_range(0, 255) - 128;
      foreach (d.b6[m]) d.b6[m] = $urandom_range(0, 255) - 128;
      build_map(d, img, passes);
      foreach (l[i]) l[i] = $urandom_range(0, 255) - 128;
      foreach (x[i]) x[i] = $urandom_range(0, 255) - 128;
      foreach (h[i]) h[i] = $urandom_range(0, 127);
      foreach (ib[i]) ib[i] = -1;

      rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
      for (int r = 0; r < DM_ROWS; r++) for (int w = 0; w < 8; w++) begin
        @(negedge clk); sw_en = 1; sw_row = 7'(r); sw_word = 3'(w); sw_data = img[r][64*w +: 64];
      end
      @(negedge clk); sw_en = 0;
      for (int i = 0; i < 14; i++) begin
        @(negedge clk); tw_en = 1; tw_idx = 4'(i); tw_data = passes[i];
      end
      @(negedge clk); tw_en = 0;
      for (int i = 0; i < 2; i++) begin @(negedge clk); io_we = 1; io_addr = 8'(L_BASE + i); io_wdata = 8'(l[i]); end
      for (int i = 0; i < 64; i++) begin @(negedge clk); io_we = 1; io_addr = 8'(X_BASE + i); io_wdata = 8'(x[i]); end
      @(negedge clk); io_we = 0;
      // h_t arrives through the IMC-interface port
      for (int i = 0; i < 127; i++) begin @(negedge clk); hw_en = 1; hw_addr = 8'(H_BASE + i); hw_data = 8'(h[i]); end
      @(negedge clk); hw_en = 0;
      bias_shift = 4'(d.bias_shift);

      run(0, 10);
      @(negedge clk);
      for (int m = 0; m < 63; m++) begin
        longint a; int e;
        a = longint'(d.b1[m]) <<< d.bias_shift;
        for (int k = 0; k < 2; k++) a += d.w1[m][k] * l[k];
        e = act_out(a, d.sh1, ACT_RELU, DEST_IBUF0);
        if (e == 0) relu_zeroed++;
        checks++; if (ib[m] != e) begin failures++; $display("fc1[%0d] %0d exp %0d", m, ib[m], e); end
      end
      for (int m = 0; m < 64; m++) begin
        longint a; int e;
        a = longint'(d.b2[m]) <<< d.bias_shift;
        for (int k = 0; k < 64; k++) a += d.w2[m][k] * x[k];
        e = act_out(a, d.sh2, ACT_RELU, DEST_IBUF0);
        checks++; if (ib[63+m] != e) begin failures++; $display("fc2[%0d] %0d exp %0d", m, ib[63+m], e); end
      end

      run(10, 4);
      for (int m = 0; m < 12; m++) begin
        longint a; int e, got;
        a = (m < 10) ? (longint'(d.b5[m]) <<< d.bias_shift) : (longint'(d.b6[m-10]) <<< d.bias_shift);
        for (int k = 0; k < 127; k++) a += ((m < 10) ? d.w5[m][k] : d.w6[m-10][k]) * h[k];
        e = act_out(a, (m < 10) ? d.sh5 : d.sh6, (m < 10) ? ACT_NONE : ACT_HTANH, DEST_IO);
        if (m >= 10 && (e == 64 || e == -64)) htanh_clamped++;
        @(negedge clk); io_addr = 8'(Y_BASE + m); @(negedge clk);
        got = int'(signed'(io_rdata));
        checks++; if (got != e) begin failures++; $display("out[%0d] %0d exp %0d", m, got, e); end
      end
    end
    $display("ReLU zeros %0d, hard-tanh clamps %0d", relu_zeroed, htanh_clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
