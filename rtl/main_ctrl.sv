// main_ctrl: the main controller (CTRL) that synchronises all chip operations, including the
// ADC controller. It runs at the 1 GHz chip clock.
//
// Host commands (cmd_valid with cmd_mode, accepted when cmd_ready is high) select one of six
// operating modes:
//   MODE_IMC_WRITE     addr[11] bank, addr[10:2] row, addr[1:0] column group; 64-bit data
//   MODE_IMC_READ      same address; rdata is valid with rvalid one cycle later
//   MODE_DM_WRITE      addr[9:3] DM2VM SRAM row, addr[2:0] 64-bit slice
//   MODE_SETUP         addr 0..15 writes a DM2VM pass descriptor, addr 16 the glimpse config
//   MODE_NEW_DECISION  clears the recurrent state h_{t-1} (IMC1 input words 127..253) and sets
//                      the constant-1 bias inputs (IMC0 word 127, IMC1 word 254)
//   MODE_GLIMPSE       runs one glimpse: DM2VM passes 0..n_pre-1 (fc1, fc2, writing the fc3
//                      inputs), fc3 on IMC0, fc4 on IMC1, a copy of h_t into the IMC1 input
//                      words 127..253 for the next glimpse, then passes n_pre..n_pre+n_post-1
//                      (fc5, fc6). glimpse_done pulses at the end.
// In an IMC layer the controller starts one dot product (weight vector m) at a time on the
// bank and, once the bank is done and ADC pair m mod 2 is free, hands the two rail voltages
// (held by the bank) to that pair. The bank starts vector m+1 right away and computes it while
// the pairs convert, so with two pairs converting 100 cycles each a layer of M outputs takes
// about 50*M cycles. When a pair finishes, the IMC interface
// requantises its result, which is written to the next layer's input buffer (and, for fc4,
// also as an 8-bit h_t into the DM2VM IO buffer at h_base).
// The existence of six modes, the 1 GHz clock and the layer-to-block mapping follow the
// published design; the command set, the ping-pong use of the ADC pairs and the glimpse
// sequence details are this implementation's own.
module main_ctrl
  import keyram_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // host
  input  logic                  cmd_valid,
  input  mode_e                 cmd_mode,
  input  logic [15:0]           cmd_addr,
  input  logic [63:0]           cmd_wdata,
  output logic                  cmd_ready,
  output logic [63:0]           rdata,
  output logic                  rvalid,
  output logic                  glimpse_done,
  // IMC banks: normal access
  output logic [1:0]            imc_wr_en,
  output logic [1:0]            imc_rd_en,
  output logic [8:0]            imc_row,
  output logic [1:0]            imc_cgrp,
  output logic [63:0]           imc_wdata,
  input  logic [63:0]           imc_rdata0,
  input  logic [63:0]           imc_rdata1,
  // IMC banks: compute
  output logic [1:0]            imc_start,
  output logic [6:0]            imc_grp,
  input  logic [1:0]            imc_done,
  input  logic [8:0]            imc_nnz0,
  input  logic [8:0]            imc_nnz1,
  // ADC bank
  output logic                  adc_sel,
  output logic [1:0]            adc_start,
  output logic [15:0]           adc_step,
  input  logic [1:0]            adc_done,
  input  logic [1:0][5:0]       adc_code_p,
  input  logic [1:0][5:0]       adc_code_n,
  // IMC interface
  output logic [5:0]            if_code_p,
  output logic [5:0]            if_code_n,
  output logic [8:0]            if_nnz,
  output logic [3:0]            if_sh4,
  output logic [3:0]            if_sh8,
  input  logic [3:0]            if_q4,
  input  logic [7:0]            if_q8,
  // DM2VM
  output logic                  dm_sw_en,
  output logic [6:0]            dm_sw_row,
  output logic [2:0]            dm_sw_word,
  output logic [63:0]           dm_sw_data,
  output logic                  dm_tw_en,
  output logic [3:0]            dm_tw_idx,
  output dm_pass_t              dm_tw_data,
  output logic                  dm_start,
  output logic [3:0]            dm_first_idx,
  output logic [4:0]            dm_count,
  output logic [3:0]            dm_bias_shift,
  input  logic                  dm_done,
  input  logic                  dm_ib_we,
  input  logic [6:0]            dm_ib_addr,
  input  logic [3:0]            dm_ib_data,
  output logic                  hw_en,
  output logic [7:0]            hw_addr,
  output logic [7:0]            hw_data,
  // input buffers
  output logic                  ib0_clr,
  output logic                  ib0_we,
  output logic [6:0]            ib0_waddr,
  output logic [3:0]            ib0_wdata,
  output logic [6:0]            ib0_raddr,
  input  logic [3:0]            ib0_rdata,
  output logic                  ib1_clr,
  output logic                  ib1_we,
  output logic [7:0]            ib1_waddr,
  output logic [3:0]            ib1_wdata
);
  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_CLR, S_BIASW, S_PRE, S_PRE_W, S_IMC, S_COPY, S_POST, S_POST_W
  } state_e;
  state_e state;

  glimpse_cfg_t cfg;
  logic         rd_bank;
  logic         lay;          // 0: fc3 on IMC0, 1: fc4 on IMC1
  logic [6:0]   issue, ndone, cur;
  logic         active;       // a dot product is in the bank or waiting for its ADC pair
  logic         ready;        // the bank has finished; its voltages wait for the pair
  logic [1:0]   pbusy;
  logic [1:0][6:0] ptag;
  logic [1:0][8:0] pnnz;
  logic [6:0]   copy_i;
  logic         fin_p;        // pair whose result is written this cycle
  logic         fin;
  logic [6:0]   m_lay;
  logic         can_issue, issued_done;

  wire accept = cmd_valid && state == S_IDLE;

  assign cmd_ready = (state == S_IDLE);
  assign m_lay     = lay ? cfg.m4 : cfg.m3;
  assign adc_sel   = lay;
  assign adc_step  = cfg.adc_step;
  assign dm_bias_shift = cfg.bias_shift;

  always_comb begin
    // host-side single-cycle actions
    imc_wr_en   = '0;
    imc_rd_en   = '0;
    imc_row     = cmd_addr[10:2];
    imc_cgrp    = cmd_addr[1:0];
    imc_wdata   = cmd_wdata;
    if (accept && cmd_mode == MODE_IMC_WRITE) imc_wr_en[cmd_addr[11]] = 1'b1;
    if (accept && cmd_mode == MODE_IMC_READ)  imc_rd_en[cmd_addr[11]] = 1'b1;
    dm_sw_en    = accept && cmd_mode == MODE_DM_WRITE;
    dm_sw_row   = cmd_addr[9:3];
    dm_sw_word  = cmd_addr[2:0];
    dm_sw_data  = cmd_wdata;
    dm_tw_en    = accept && cmd_mode == MODE_SETUP && cmd_addr[4:0] < 5'(SETUP_CFG_ADDR);
    dm_tw_idx   = cmd_addr[3:0];
    dm_tw_data  = dm_pass_t'(cmd_wdata);

    // DM2VM run
    dm_start     = (state == S_PRE) || (state == S_POST);
    dm_first_idx = (state == S_POST) ? cfg.n_pre : 4'd0;
    dm_count     = (state == S_POST) ? 5'(cfg.n_post) : 5'(cfg.n_pre);

    // IMC layer
    can_issue   = (state == S_IMC) && !active && issue < m_lay;
    issued_done = (state == S_IMC) && active && (ready || imc_done[lay]) && !pbusy[cur[0]];
    imc_start   = '0;
    if (can_issue) imc_start[lay] = 1'b1;
    imc_grp     = issue;
    adc_start   = '0;
    if (issued_done) adc_start[cur[0]] = 1'b1;
    fin         = (state == S_IMC) && (adc_done != '0);
    fin_p       = adc_done[1];
    if_code_p   = adc_code_p[fin_p];
    if_code_n   = adc_code_n[fin_p];
    if_nnz      = pnnz[fin_p];
    if_sh4      = lay ? cfg.sh4a : cfg.sh3;
    if_sh8      = cfg.sh4b;
    hw_en       = fin && lay;
    hw_addr     = cfg.h_base + 8'(ptag[fin_p]);
    hw_data     = if_q8;

    // input buffer 0 (fc3 inputs; h_t staging during fc4)
    ib0_clr   = (state == S_CLR);
    ib0_we    = 1'b0;
    ib0_waddr = dm_ib_addr;
    ib0_wdata = dm_ib_data;
    ib0_raddr = copy_i;
    if (dm_ib_we) ib0_we = 1'b1;
    else if (fin && lay) begin
      ib0_we = 1'b1; ib0_waddr = ptag[fin_p]; ib0_wdata = if_q4;
    end else if (state == S_BIASW) begin
      ib0_we = 1'b1; ib0_waddr = 7'd127; ib0_wdata = 4'd1;
    end

    // input buffer 1 (fc4 inputs: g_t, h_{t-1}, bias)
    ib1_clr   = (state == S_CLR);
    ib1_we    = 1'b0;
    ib1_waddr = 8'(ptag[fin_p]);
    ib1_wdata = if_q4;
    if (fin && !lay) ib1_we = 1'b1;
    else if (state == S_COPY) begin
      ib1_we = 1'b1; ib1_waddr = 8'd127 + 8'(copy_i); ib1_wdata = ib0_rdata;
    end else if (state == S_BIASW) begin
      ib1_we = 1'b1; ib1_waddr = 8'd254; ib1_wdata = 4'd1;
    end
  end

  assign rdata = rd_bank ? imc_rdata1 : imc_rdata0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cfg   <= '0;
      rd_bank <= 1'b0;
      rvalid <= 1'b0;
      glimpse_done <= 1'b0;
      lay <= 1'b0; issue <= '0; ndone <= '0; cur <= '0; active <= 1'b0; ready <= 1'b0;
      pbusy <= '0; ptag <= '0; pnnz <= '0; copy_i <= '0;
    end else begin
      rvalid <= 1'b0;
      glimpse_done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          unique case (cmd_mode)
            MODE_IMC_READ:     begin rd_bank <= cmd_addr[11]; state <= S_RD; end
            MODE_SETUP:        if (cmd_addr[4:0] == 5'(SETUP_CFG_ADDR))
                                 cfg <= glimpse_cfg_t'(cmd_wdata);
            MODE_NEW_DECISION: state <= S_CLR;
            MODE_GLIMPSE:      state <= S_PRE;
            default: ;
          endcase
        end
        S_RD:    begin rvalid <= 1'b1; state <= S_IDLE; end
        S_CLR:   state <= S_BIASW;
        S_BIASW: state <= S_IDLE;
        S_PRE:   state <= S_PRE_W;
        S_PRE_W: if (dm_done) begin
          lay <= 1'b0; issue <= '0; ndone <= '0; active <= 1'b0;
          state <= S_IMC;
        end
        S_IMC: begin
          if (can_issue) begin
            active <= 1'b1;
            cur    <= issue;
          end
          if (active && imc_done[lay]) ready <= 1'b1;
          if (issued_done) begin
            active         <= 1'b0;
            ready          <= 1'b0;
            issue          <= issue + 7'd1;
            pbusy[cur[0]]  <= 1'b1;
            ptag[cur[0]]   <= cur;
            pnnz[cur[0]]   <= lay ? imc_nnz1 : imc_nnz0;
          end
          if (fin) begin
            pbusy[fin_p] <= 1'b0;
            ndone        <= ndone + 7'd1;
            if (ndone + 7'd1 == m_lay) begin
              if (!lay) begin
                lay <= 1'b1; issue <= '0; ndone <= '0; active <= 1'b0;
              end else begin
                copy_i <= '0;
                state  <= S_COPY;
              end
            end
          end
        end
        S_COPY: begin
          copy_i <= copy_i + 7'd1;
          if (copy_i == 7'd126) state <= S_POST;
        end
        S_POST:   state <= S_POST_W;
        S_POST_W: if (dm_done) begin
          glimpse_done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the two ADC pairs are started at least one bank operation apart, so they never finish
  // in the same cycle
  always_ff @(posedge clk) begin
    if (state == S_IMC) assert (adc_done != 2'b11) else $error("both ADC pairs finished together");
  end

endmodule
