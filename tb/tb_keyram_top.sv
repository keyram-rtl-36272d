// tb_keyram_top: end-to-end test of the whole chip at its default sizes. It loads random
// weights for all six layers (fc3/fc4 as 4-bit vectors into the two IMC banks, fc1/fc2/fc5/fc6
// into the DM2VM SRAM using the example map of keyram_tb_pkg), then runs two decisions of
// 3 and 8 glimpses. Each glimpse feeds the location l_{t+1} computed by fc6 back as the
// next l_t with fresh features x_t, as the recurrent attention model does. After every glimpse
// all 127 h_t values, the 10 class scores and the 2 location outputs are compared with an
// integer reference of the whole glimpse (digital layers exact, IMC layers through the ideal
// analog model, 6-bit ADC quantisation and the interface arithmetic), with h_t carried from
// glimpse to glimpse and cleared by a new decision. It counts each mechanism (sparse inputs,
// ReLU zeros, hard-tanh clamps, ADC full-scale clipping, 4-bit saturation, recurrence, state
// clear, IMC read-back, both ADC pairs, each of the six command modes) and checks the glimpse
// latency against the published 18.2 us per glimpse at 1 GHz and each decision against the published 0.05-0.15 ms.
module tb_keyram_top;
  import keyram_pkg::*;
  import keyram_tb_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic rst_n = 0, cmd_valid = 0, cmd_ready, rvalid, glimpse_done, io_we = 0;
  mode_e cmd_mode = MODE_NOP;
  logic [15:0] cmd_addr = 0;
  logic [63:0] cmd_wdata = 0, rdata;
  logic [7:0] io_addr = 0, io_wdata = 0, io_rdata;

  keyram_top dut (.*);

  // glimpses per decision: the short and long ends of the published 0.05-0.15 ms decision latency
  localparam int GLIMPSES [2] = '{3, 8};
  localparam int SH3 = 5, SH4A = 5, SH4B = 2;
  // ADC ramp step per decision; the finer step of the second decision drives some ADCs to full scale
  localparam int STEPS [2] = '{512, 96};
  int step_now;

  dig_weights_t d;
  logic [DM_ROW_BITS-1:0] img [DM_ROWS];
  dm_pass_t passes [N_PASSES];
  int w3 [128][256], w4 [128][256];
  int l [2], x [64], h4 [127], h8 [127], yref [12];
  // mechanism counters
  int n_sparse = 0, n_relu0 = 0, n_clamp = 0, n_recur = 0, n_clear = 0, n_read = 0;
  int max_lat = 0, dec_cyc;
  int pair_done [2] = '{0, 0};
  always @(posedge clk) for (int p = 0; p < 2; p++) if (rst_n && dut.adc_done[p]) pair_done[p]++;
  // hardware-side counters: accepted commands per mode, sparse IMC sums, DM2VM runs
  int mode_cnt [8] = '{default: 0};
  int hw_sparse = 0, dm_runs = 0, adc_clip = 0, q4_sat = 0;
  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) mode_cnt[int'(cmd_mode)]++;
    if (dut.imc_done[0] && dut.nnz0 < 9'd128) hw_sparse++;
    if (dut.imc_done[1] && dut.nnz1 < 9'd255) hw_sparse++;
    if (rst_n && dut.dm_done) dm_runs++;
    for (int p = 0; p < 2; p++)
      if (rst_n && dut.adc_done[p] && (dut.code_p[p] == 6'd63 || dut.code_n[p] == 6'd63)) adc_clip++;
    if (rst_n && dut.adc_done != 0 && dut.if_q4 == 4'd15) q4_sat++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cmd(mode_e m, int a, logic [63:0] wd);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_mode = m; cmd_addr = 16'(a); cmd_wdata = wd;
    @(negedge clk); cmd_valid = 0;
  endtask

  function automatic logic [63:0] imc_word(int bank, int row, int g);
    logic [63:0] v;
    int m, k, bitpos;
    m = row / 4; k = row % 4; bitpos = 3 - k;
    for (int j = 0; j < 64; j++) begin
      int w;
      w = (bank == 0) ? w3[m][4*j + g] : w4[m][4*j + g];
      v[j] = 1'((w >>> bitpos) & 1);
    end
    return v;
  endfunction

  // reference of one glimpse; updates h4/h8 and yref
  task automatic ref_glimpse();
    int a1 [128], g [127], xin [256], wv [256], q4, q8, nnz;
    for (int m = 0; m < 63; m++) begin
      longint a;
      a = longint'(d.b1[m]) <<< d.bias_shift;
      for (int k = 0; k < 2; k++) a += d.w1[m][k] * l[k];
      a1[m] = act_out(a, d.sh1, ACT_RELU, DEST_IBUF0);
    end
    for (int m = 0; m < 64; m++) begin
      longint a;
      a = longint'(d.b2[m]) <<< d.bias_shift;
      for (int k = 0; k < 64; k++) a += d.w2[m][k] * x[k];
      a1[63 + m] = act_out(a, d.sh2, ACT_RELU, DEST_IBUF0);
    end
    a1[127] = 1;
    foreach (a1[i]) if (a1[i] == 0) n_relu0++;
    for (int m = 0; m < 127; m++) begin
      for (int i = 0; i < 256; i++) begin xin[i] = (i < 128) ? a1[i] : 0; wv[i] = w3[m][i]; end
      imc_ref(wv, xin, step_now, SH3, 0, q4, q8, nnz);
      if (nnz < 128) n_sparse++;
      g[m] = q4;
    end
    for (int i = 0; i < 127; i++) if (h4[i] != 0) begin n_recur++; break; end
    begin
      int hn4 [127], hn8 [127];
      for (int m = 0; m < 127; m++) begin
        for (int i = 0; i < 256; i++) begin
          xin[i] = (i < 127) ? g[i] : (i < 254) ? h4[i - 127] : (i == 254) ? 1 : 0;
          wv[i] = w4[m][i];
        end
        imc_ref(wv, xin, step_now, SH4A, SH4B, q4, q8, nnz);
        hn4[m] = q4; hn8[m] = q8;
      end
      h4 = hn4; h8 = hn8;
    end
    for (int m = 0; m < 12; m++) begin
      longint a;
      a = (m < 10) ? (longint'(d.b5[m]) <<< d.bias_shift) : (longint'(d.b6[m-10]) <<< d.bias_shift);
      for (int k = 0; k < 127; k++) a += ((m < 10) ? d.w5[m][k] : d.w6[m-10][k]) * h8[k];
      yref[m] = act_out(a, (m < 10) ? d.sh5 : d.sh6, (m < 10) ? ACT_NONE : ACT_HTANH, DEST_IO);
      if (m >= 10 && (yref[m] == 64 || yref[m] == -64)) n_clamp++;
    end
  endtask

  task automatic io_read(int a, output int v);
    @(negedge clk); io_addr = 8'(a); @(negedge clk); v = int'(signed'(io_rdata));
  endtask

  initial begin
    glimpse_cfg_t cfg;
    // ---------------- weights ----------------
    d.sh1 = 11; d.sh2 = 12; d.sh5 = 8; d.sh6 = 8; d.bias_shift = 6;
    foreach (d.w1[m, k]) d.w1[m][k] = $urandom_range(0, 255) - 128;
    foreach (d.w2[m, k]) d.w2[m][k] = $urandom_range(0, 255) - 128;
    foreach (d.w5[m, k]) d.w5[m][k] = $urandom_range(0, 255) - 128;
    foreach (d.w6[m, k]) d.w6[m][k] = $urandom_range(0, 255) - 128;
    foreach (d.b1[m]) d.b1[m] = $urandom_range(0, 255) - 128;
    foreach (d.b2[m]) d.b2[m] = $urandom_range(0, 255) - 128;
    foreach (d.b5[m]) d.b5[m] = $urandom_range(0, 255) - 128;
    foreach (d.b6[m]) d.b6[m] = $urandom_range(0, 255) - 128;
    foreach (w3[m, i]) w3[m][i] = $urandom_range(0, 15) - 8;
    foreach (w4[m, i]) w4[m][i] = $urandom_range(0, 15) - 8;
    build_map(d, img, passes);

    repeat (3) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 2; b++) for (int r = 0; r < 512; r++) for (int gq = 0; gq < 4; gq++)
      cmd(MODE_IMC_WRITE, (b << 11) | (r << 2) | gq, imc_word(b, r, gq));
    for (int r = 0; r < DM_ROWS; r++) for (int w = 0; w < 8; w++)
      cmd(MODE_DM_WRITE, (r << 3) | w, img[r][64*w +: 64]);
    for (int i = 0; i < 14; i++) cmd(MODE_SETUP, i, 64'(passes[i]));
    cfg = '0; cfg.n_pre = 10; cfg.n_post = 4; cfg.m3 = 127; cfg.m4 = 127; cfg.adc_step = 16'(STEPS[0]);
    cfg.sh3 = SH3; cfg.sh4a = SH4A; cfg.sh4b = SH4B; cfg.h_base = 8'(H_BASE); cfg.bias_shift = 4'(d.bias_shift);
    cmd(MODE_SETUP, SETUP_CFG_ADDR, 64'(cfg));

    // read back a few IMC words
    for (int n = 0; n < 8; n++) begin
      int b, r, gq;
      b = n % 2; r = $urandom_range(0, 511); gq = $urandom_range(0, 3);
      cmd(MODE_IMC_READ, (b << 11) | (r << 2) | gq, 0);
      while (!rvalid) @(negedge clk);
      checks++; n_read++;
      if (rdata != imc_word(b, r, gq)) begin failures++; $display("IMC read bank %0d row %0d", b, r); end
    end

    // ---------------- decisions ----------------
    for (int dec = 0; dec < 2; dec++) begin
      step_now = STEPS[dec];
      cfg.adc_step = 16'(step_now);
      cmd(MODE_SETUP, SETUP_CFG_ADDR, 64'(cfg));
      cmd(MODE_NEW_DECISION, 0, 0);
      foreach (h4[i]) h4[i] = 0;
      n_clear++;
      l[0] = 0; l[1] = 0;
      dec_cyc = 0;
      for (int gl = 0; gl < GLIMPSES[dec]; gl++) begin
        int t0, v;
        foreach (x[i]) x[i] = $urandom_range(0, 255) - 128;
        for (int i = 0; i < 2; i++) begin @(negedge clk); io_we = 1; io_addr = 8'(L_BASE + i); io_wdata = 8'(l[i]); end
        for (int i = 0; i < 64; i++) begin @(negedge clk); io_we = 1; io_addr = 8'(X_BASE + i); io_wdata = 8'(x[i]); end
        @(negedge clk); io_we = 0;
        ref_glimpse();
        cmd(MODE_GLIMPSE, 0, 0); t0 = cyc;
        while (!glimpse_done) @(negedge clk);
        if (cyc - t0 > max_lat) max_lat = cyc - t0;
        dec_cyc += cyc - t0;
        checks++;
        if (cyc - t0 > 18200) begin failures++; $display("glimpse took %0d cycles", cyc - t0); end
        for (int i = 0; i < 127; i++) begin
          io_read(H_BASE + i, v);
          checks++; if (v != h8[i]) begin failures++; $display("dec %0d gl %0d h[%0d] %0d exp %0d", dec, gl, i, v, h8[i]); end
        end
        for (int m = 0; m < 12; m++) begin
          io_read(Y_BASE + m, v);
          checks++; if (v != yref[m]) begin failures++; $display("dec %0d gl %0d out[%0d] %0d exp %0d", dec, gl, m, v, yref[m]); end
        end
        l[0] = yref[10]; l[1] = yref[11];
      end
      // published decision latency 0.05 ms (fewest glimpses) to 0.15 ms (most), 1 GHz clock
      checks++;
      if (dec_cyc > ((GLIMPSES[dec] <= 3) ? 50000 : 150000)) begin
        failures++; $display("decision of %0d glimpses took %0d cycles", GLIMPSES[dec], dec_cyc);
      end
      $display("decision %0d: %0d glimpses in %0d cycles", dec, GLIMPSES[dec], dec_cyc);
    end
    $display("max glimpse latency %0d cycles; sparse dot products %0d, ReLU zeros %0d, htanh clamps %0d, recurrent glimpses %0d, clears %0d, reads %0d, ADC pair conversions %0d/%0d",
             max_lat, n_sparse, n_relu0, n_clamp, n_recur, n_clear, n_read, pair_done[0], pair_done[1]);
    checks++; if (n_sparse == 0) begin failures++; $display("no sparse input"); end
    checks++; if (n_relu0 == 0)  begin failures++; $display("no ReLU zero"); end
    checks++; if (n_clamp == 0)  begin failures++; $display("no hard-tanh clamp"); end
    checks++; if (n_recur == 0)  begin failures++; $display("no recurrence"); end
    checks++; if (n_clear < 2)   begin failures++; $display("no state clear"); end
    checks++; if (pair_done[0] == 0 || pair_done[1] == 0) begin failures++; $display("an ADC pair unused"); end
    for (int md = 1; md <= 6; md++) begin
      checks++; if (mode_cnt[md] == 0) begin failures++; $display("mode %s never used", mode_e'(md)); end
    end
    $display("commands per mode %0d %0d %0d %0d %0d %0d, IMC sums over fewer columns than inputs %0d, DM2VM runs %0d",
             mode_cnt[1], mode_cnt[2], mode_cnt[3], mode_cnt[4], mode_cnt[5], mode_cnt[6], hw_sparse, dm_runs);
    $display("ADC conversions at full scale %0d, 4-bit requantisations saturated %0d", adc_clip, q4_sat);
    checks++; if (adc_clip == 0) begin failures++; $display("ADC never reached full scale"); end
    checks++; if (q4_sat == 0) begin failures++; $display("4-bit saturation never happened"); end
    checks++; if (hw_sparse == 0) begin failures++; $display("sparsity gating never active"); end
    checks++; if (dm_runs != 2 * (GLIMPSES[0] + GLIMPSES[1])) begin failures++; $display("DM2VM runs %0d", dm_runs); end
    checks++; if (n_read == 0)   begin failures++; $display("no IMC read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
