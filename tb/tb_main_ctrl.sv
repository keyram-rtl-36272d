// tb_main_ctrl: drives the main controller with simple testbench responders for the IMC banks
// (done 13 cycles after start), the ADC pairs (done 100 cycles after start, codes derived from
// the order of starts) and DM2VM (done some cycles after start). Checks each host mode's
// strobes, the glimpse sequence (fc1/fc2 passes, fc3 on IMC0, fc4 on IMC1, copy of h_t, fc5/fc6
// passes), the destination and data of every IMC-layer result, the alternation of the two ADC
// pairs and the IMC-layer throughput of one dot product per ~50 cycles.
module tb_main_ctrl;
  import keyram_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic rst_n = 0, cmd_valid = 0, cmd_ready, rvalid, glimpse_done;
  mode_e cmd_mode = MODE_NOP;
  logic [15:0] cmd_addr = 0;
  logic [63:0] cmd_wdata = 0, rdata, imc_wdata;
  logic [1:0] imc_wr_en, imc_rd_en, imc_cgrp, imc_start, adc_start;
  logic [1:0] imc_done = 0, adc_done = 0;
  logic [8:0] imc_row, imc_nnz0 = 9'd100, imc_nnz1 = 9'd200, if_nnz;
  logic [63:0] imc_rdata0 = 64'h0123, imc_rdata1 = 64'h4567;
  logic [6:0] imc_grp;
  logic adc_sel;
  logic [15:0] adc_step;
  logic [1:0][5:0] adc_code_p = 0, adc_code_n = 0;
  logic [5:0] if_code_p, if_code_n;
  logic [3:0] if_sh4, if_sh8, if_q4;
  logic [7:0] if_q8;
  logic dm_sw_en, dm_tw_en, dm_start, dm_done = 0, dm_ib_we = 0, hw_en;
  logic [6:0] dm_sw_row, dm_ib_addr = 0;
  logic [2:0] dm_sw_word;
  logic [63:0] dm_sw_data;
  logic [3:0] dm_tw_idx, dm_first_idx, dm_bias_shift, dm_ib_data = 0;
  dm_pass_t dm_tw_data;
  logic [4:0] dm_count;
  logic [7:0] hw_addr, hw_data;
  logic ib0_clr, ib0_we, ib1_clr, ib1_we;
  logic [6:0] ib0_waddr, ib0_raddr;
  logic [3:0] ib0_wdata, ib0_rdata, ib1_wdata;
  logic [7:0] ib1_waddr;

  main_ctrl dut (.*);

  // fake interface and buffer read: results carry their code so destinations can be checked
  assign if_q4 = if_code_p[3:0];
  assign if_q8 = {2'b0, if_code_p};
  assign ib0_rdata = ib0_raddr[3:0] ^ 4'h5;

  glimpse_cfg_t cfg;
  int imc_cnt [2], pair_starts [2], last_pair_start [2], dm_runs, ib1_writes, ib0_writes, hw_writes, copies;
  int imc_issue_order [$];
  int first_fc3, last_fc3;

  // IMC responder
  int imc_t [2];
  always @(posedge clk) begin
    for (int b = 0; b < 2; b++) begin
      imc_done[b] <= 1'b0;
      if (imc_start[b]) begin imc_t[b] <= 13; imc_cnt[b]++; end
      else if (imc_t[b] > 0) begin
        imc_t[b] <= imc_t[b] - 1;
        if (imc_t[b] == 1) imc_done[b] <= 1'b1;
      end
    end
  end
  // ADC responder: code_p = issue index of the dot product it converts
  int adc_t [2]; int adc_tag [2]; int next_tag = 0;
  always @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      adc_done[p] <= 1'b0;
      if (adc_start[p]) begin
        adc_t[p] <= 99; adc_tag[p] <= next_tag; next_tag <= next_tag + 1;
        pair_starts[p]++;
        if (last_pair_start[p] >= 0 && cyc - last_pair_start[p] < 100) begin
          failures++; $display("pair %0d restarted after %0d cycles", p, cyc - last_pair_start[p]);
        end
        last_pair_start[p] <= cyc;
      end else if (adc_t[p] > 0) begin
        adc_t[p] <= adc_t[p] - 1;
        if (adc_t[p] == 1) begin
          adc_done[p] <= 1'b1;
          adc_code_p[p] <= 6'(adc_tag[p] % 64);
        end
      end
    end
  end
  // DM2VM responder
  int dm_t;
  always @(posedge clk) begin
    dm_done <= 1'b0;
    if (dm_start) begin
      dm_t <= 30;
      if (dm_runs == 0 && (dm_first_idx != 0 || dm_count != 5'(cfg.n_pre))) begin failures++; $display("pre pass range"); end
      if (dm_runs == 1 && (dm_first_idx != cfg.n_pre || dm_count != 5'(cfg.n_post))) begin failures++; $display("post pass range"); end
      dm_runs++;
    end else if (dm_t > 0) begin
      dm_t <= dm_t - 1;
      if (dm_t == 1) dm_done <= 1'b1;
    end
  end
  // result checkers
  always @(negedge clk) if (rst_n) begin
    if (ib1_we && ib1_waddr < 127) begin
      // fc3 result m carries code m % 64 (tags count from 0 at the start of fc3)
      checks++; ib1_writes++;
      if (int'(ib1_wdata) != (int'(ib1_waddr) % 64) % 16) begin failures++; $display("fc3 result %0d data %0d", ib1_waddr, ib1_wdata); end
    end
    if (ib1_we && ib1_waddr >= 127 && ib1_waddr < 254) begin
      checks++; copies++;
      if (ib1_wdata != (4'(ib1_waddr - 8'd127) ^ 4'h5)) begin failures++; $display("copy %0d", ib1_waddr); end
    end
    if (ib0_we && ib0_waddr != 7'd127) begin
      checks++; ib0_writes++;
      if (int'(ib0_wdata) != ((int'(ib0_waddr) + int'(cfg.m3)) % 64) % 16) begin failures++; $display("fc4 result %0d data %0d", ib0_waddr, ib0_wdata); end
    end
    if (hw_en) begin
      hw_writes++; checks++;
      if (hw_addr != cfg.h_base + 8'(ib0_waddr) || !ib0_we) begin failures++; $display("h_t write addr %0d", hw_addr); end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cmd(mode_e m, int a, logic [63:0] wd);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_mode = m; cmd_addr = 16'(a); cmd_wdata = wd;
    @(negedge clk); cmd_valid = 0;
  endtask

  initial begin
    int t0, t_fc3;
    foreach (last_pair_start[p]) last_pair_start[p] = -1000;
    cfg = '0; cfg.n_pre = 10; cfg.n_post = 4; cfg.m3 = 127; cfg.m4 = 127; cfg.adc_step = 512;
    cfg.sh3 = 4; cfg.sh4a = 5; cfg.sh4b = 1; cfg.h_base = 66; cfg.bias_shift = 6;
    repeat (2) @(negedge clk); rst_n = 1;
    // IMC write: strobe on the addressed bank, row and column group from the address
    @(negedge clk); cmd_valid = 1; cmd_mode = MODE_IMC_WRITE; cmd_addr = 16'h0800 | (16'd77 << 2) | 16'd3; cmd_wdata = 64'hABCD;
    #0; @(posedge clk); #0;
    checks++; if (imc_wr_en != 2'b10 || imc_row != 9'd77 || imc_cgrp != 2'd3 || imc_wdata != 64'hABCD) begin failures++; $display("imc write strobe"); end
    @(negedge clk); cmd_valid = 0;
    // IMC read returns bank data with rvalid
    cmd(MODE_IMC_READ, 16'h0004, 0);
    @(negedge clk);
    checks++; if (!rvalid || rdata != 64'h0123) begin failures++; $display("imc read"); end
    // DM write and setup
    @(negedge clk); cmd_valid = 1; cmd_mode = MODE_DM_WRITE; cmd_addr = (16'd90 << 3) | 16'd5; cmd_wdata = 64'h55;
    #0; @(posedge clk); #0;
    checks++; if (!dm_sw_en || dm_sw_row != 7'd90 || dm_sw_word != 3'd5) begin failures++; $display("dm write strobe"); end
    @(negedge clk); cmd_mode = MODE_SETUP; cmd_addr = 16'd3; cmd_wdata = 64'h1234_5678_9ABC_DEF0;
    #0; @(posedge clk); #0;
    checks++; if (!dm_tw_en || dm_tw_idx != 4'd3 || dm_tw_data != dm_pass_t'(64'h1234_5678_9ABC_DEF0)) begin failures++; $display("table write"); end
    @(negedge clk); cmd_valid = 0;
    cmd(MODE_SETUP, SETUP_CFG_ADDR, 64'(cfg));
    // new decision: clear both buffers, then set the bias inputs
    cmd(MODE_NEW_DECISION, 0, 0);
    checks++; if (!ib0_clr || !ib1_clr) begin failures++; $display("clear"); end
    @(negedge clk);
    checks++; if (!(ib0_we && ib0_waddr == 127 && ib0_wdata == 1 && ib1_we && ib1_waddr == 254 && ib1_wdata == 1)) begin failures++; $display("bias words"); end
    // glimpse
    next_tag = 0;
    cmd(MODE_GLIMPSE, 0, 0); t0 = cyc;
    while (!glimpse_done) @(negedge clk);
    checks++; if (imc_cnt[0] != 127 || imc_cnt[1] != 127) begin failures++; $display("imc ops %0d %0d", imc_cnt[0], imc_cnt[1]); end
    checks++; if (pair_starts[0] != 128 || pair_starts[1] != 126) begin failures++; $display("pair use %0d %0d", pair_starts[0], pair_starts[1]); end
    checks++; if (ib1_writes != 127 || ib0_writes != 127 || hw_writes != 127 || copies != 127) begin failures++; $display("writes %0d %0d %0d %0d", ib1_writes, ib0_writes, hw_writes, copies); end
    checks++; if (dm_runs != 2) begin failures++; $display("dm runs %0d", dm_runs); end
    // two IMC layers of 127 dot products with two ADC pairs: about 64 x 100 cycles each
    checks++;
    if (cyc - t0 > 13600 || cyc - t0 < 12600) begin failures++; $display("glimpse took %0d cycles", cyc - t0); end
    $display("glimpse cycles %0d", cyc - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
