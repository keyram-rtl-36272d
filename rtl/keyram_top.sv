// keyram_top: KeyRAM, a keyword-spotting classifier that evaluates a recurrent attention
// model one glimpse at a time. Each glimpse runs six fully connected layers: fc1 (location)
// and fc2 (features) on the digital DM2VM processor, the two large layers fc3 and fc4 as analog
// in-memory dot products on two 512x256 SRAM banks (IMC0, IMC1) digitised by a bank of four
// 6-bit single-slope ADCs, and fc5 (class scores) and fc6 (next glimpse location, hard tanh)
// back on DM2VM. The recurrent state h_t stays on chip between glimpses.
//
// Blocks: main_ctrl (CTRL with ADC control), imc_block x2, input_buffer x2 (128 and 256 4-bit
// words), adc_bank, imc_interface and dm2vm, wired as in the chip architecture figure.
//
// Host interface: a command port (see main_ctrl for the six modes and address map) and the
// DM2VM IO buffer port (io_*), through which the host writes the glimpse inputs (l_t, x_t)
// and reads the results (class scores y_t and next location l_{t+1}) at addresses it chooses
// in the pass descriptors. The softmax of fc5 is left to the host. All logic runs on one clock
// (1 GHz in the published chip).
module keyram_top
  import keyram_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cmd_valid,
  input  mode_e        cmd_mode,
  input  logic [15:0]  cmd_addr,
  input  logic [63:0]  cmd_wdata,
  output logic         cmd_ready,
  output logic [63:0]  rdata,
  output logic         rvalid,
  output logic         glimpse_done,
  input  logic         io_we,
  input  logic [7:0]   io_addr,
  input  logic [7:0]   io_wdata,
  output logic [7:0]   io_rdata
);
  // IMC access
  logic [1:0]  imc_wr_en, imc_rd_en, imc_start, imc_done, imc_busy;
  logic [8:0]  imc_row;
  logic [1:0]  imc_cgrp;
  logic [63:0] imc_wdata, imc_rdata0, imc_rdata1;
  logic [6:0]  imc_grp;
  logic [8:0]  nnz0, nnz1;
  logic [VQ_BITS-1:0] vy0_p, vy0_n, vy1_p, vy1_n;
  // ADCs
  logic        adc_sel;
  logic [1:0]  adc_start, adc_done, adc_busy;
  logic [15:0] adc_step;
  logic [1:0][5:0] code_p, code_n;
  // interface
  logic [5:0]  if_code_p, if_code_n;
  logic [8:0]  if_nnz;
  logic [3:0]  if_sh4, if_sh8, if_q4;
  logic [7:0]  if_q8;
  logic signed [39:0] if_dot;
  // DM2VM
  logic        dm_sw_en, dm_tw_en, dm_start, dm_done, dm_busy, dm_ib_we, hw_en;
  logic [6:0]  dm_sw_row, dm_ib_addr;
  logic [2:0]  dm_sw_word;
  logic [63:0] dm_sw_data;
  logic [3:0]  dm_tw_idx, dm_first_idx, dm_bias_shift, dm_ib_data;
  dm_pass_t    dm_tw_data;
  logic [4:0]  dm_count;
  logic [7:0]  hw_addr, hw_data;
  // input buffers
  logic        ib0_clr, ib0_we, ib1_clr, ib1_we;
  logic [6:0]  ib0_waddr, ib0_raddr;
  logic [7:0]  ib1_waddr;
  logic [3:0]  ib0_wdata, ib0_rdata, ib1_wdata, ib1_rdata;
  logic [IBUF0_WORDS-1:0][IMC_BX-1:0] ib0_words;
  logic [IBUF1_WORDS-1:0][IMC_BX-1:0] ib1_words;
  logic [IMC_COLS-1:0][IMC_BX-1:0]    x0, x1;

  main_ctrl u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_mode, .cmd_addr, .cmd_wdata, .cmd_ready, .rdata, .rvalid,
    .glimpse_done,
    .imc_wr_en, .imc_rd_en, .imc_row, .imc_cgrp, .imc_wdata, .imc_rdata0, .imc_rdata1,
    .imc_start, .imc_grp, .imc_done, .imc_nnz0(nnz0), .imc_nnz1(nnz1),
    .adc_sel, .adc_start, .adc_step, .adc_done, .adc_code_p(code_p), .adc_code_n(code_n),
    .if_code_p, .if_code_n, .if_nnz, .if_sh4, .if_sh8, .if_q4, .if_q8,
    .dm_sw_en, .dm_sw_row, .dm_sw_word, .dm_sw_data, .dm_tw_en, .dm_tw_idx, .dm_tw_data,
    .dm_start, .dm_first_idx, .dm_count, .dm_bias_shift, .dm_done,
    .dm_ib_we, .dm_ib_addr, .dm_ib_data, .hw_en, .hw_addr, .hw_data,
    .ib0_clr, .ib0_we, .ib0_waddr, .ib0_wdata, .ib0_raddr, .ib0_rdata,
    .ib1_clr, .ib1_we, .ib1_waddr, .ib1_wdata
  );

  input_buffer #(.WORDS(IBUF0_WORDS), .BX(IMC_BX)) u_ibuf0 (
    .clk, .rst_n, .clr(ib0_clr), .we(ib0_we), .waddr(ib0_waddr), .wdata(ib0_wdata),
    .raddr(ib0_raddr), .rdata(ib0_rdata), .words(ib0_words)
  );

  input_buffer #(.WORDS(IBUF1_WORDS), .BX(IMC_BX)) u_ibuf1 (
    .clk, .rst_n, .clr(ib1_clr), .we(ib1_we), .waddr(ib1_waddr), .wdata(ib1_wdata),
    .raddr('0), .rdata(ib1_rdata), .words(ib1_words)
  );

  // IMC0 columns 128..255 have no input (fc3 has 127 inputs plus the bias input)
  assign x0 = (IMC_COLS*IMC_BX)'(ib0_words);
  assign x1 = ib1_words;

  imc_block u_imc0 (
    .clk, .rst_n, .wr_en(imc_wr_en[0]), .rd_en(imc_rd_en[0]), .row(imc_row), .cgrp(imc_cgrp),
    .wdata(imc_wdata), .rdata(imc_rdata0), .start(imc_start[0]), .grp(imc_grp), .x(x0),
    .vy_p(vy0_p), .vy_n(vy0_n), .nnz(nnz0), .busy(imc_busy[0]), .done(imc_done[0])
  );

  imc_block u_imc1 (
    .clk, .rst_n, .wr_en(imc_wr_en[1]), .rd_en(imc_rd_en[1]), .row(imc_row), .cgrp(imc_cgrp),
    .wdata(imc_wdata), .rdata(imc_rdata1), .start(imc_start[1]), .grp(imc_grp), .x(x1),
    .vy_p(vy1_p), .vy_n(vy1_n), .nnz(nnz1), .busy(imc_busy[1]), .done(imc_done[1])
  );

  adc_bank u_adcs (
    .clk, .rst_n, .sel(adc_sel), .vy0_p, .vy0_n, .vy1_p, .vy1_n, .step(adc_step),
    .start(adc_start), .code_p, .code_n, .busy(adc_busy), .done(adc_done)
  );

  imc_interface #(.BITS(ADC_BITS), .NW(9)) u_if (
    .code_p(if_code_p), .code_n(if_code_n), .nnz(if_nnz), .step(adc_step),
    .sh4(if_sh4), .sh8(if_sh8), .dot(if_dot), .q4(if_q4), .q8(if_q8)
  );

  dm2vm u_dm (
    .clk, .rst_n, .io_we, .io_addr, .io_wdata, .io_rdata,
    .hw_en, .hw_addr, .hw_data,
    .sw_en(dm_sw_en), .sw_row(dm_sw_row), .sw_word(dm_sw_word), .sw_data(dm_sw_data),
    .tw_en(dm_tw_en), .tw_idx(dm_tw_idx), .tw_data(dm_tw_data),
    .start(dm_start), .first_idx(dm_first_idx), .count(dm_count), .bias_shift(dm_bias_shift),
    .busy(dm_busy), .done(dm_done), .ib_we(dm_ib_we), .ib_addr(dm_ib_addr), .ib_data(dm_ib_data)
  );

endmodule
