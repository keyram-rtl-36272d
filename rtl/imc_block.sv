// imc_block: one in-memory-compute bank (IMC0 runs fc3, IMC1 runs fc4). It computes the dot
// product of one stored 4-bit weight vector with the 4-bit input vector in four stages:
// pulse-width-modulated word lines turn each weight into a bit-line discharge, a per-column
// multiplier scales it by the input, the sparsity-aware sum averages the non-zero-input columns,
// and the result leaves as two voltages (positive and negative rail) for a pair of ADCs.
//
// Inside: the bit-cell array with its normal 64-bit port (imc_sram), the word-line pulse
// generator (wl_pulse_gen), the phase control of the summation (sparse_sum_ctrl) and a
// behavioural model of the analog bit-line circuits (imc_bitline_model).
//
// Compute timing (T = T_MAX): 'start' with 'grp' (weight vector index; rows 4*grp..4*grp+3)
// in cycle 0; precharge in cycle 1; word lines pulse in cycles 2..T+1; phi1 at T+3, phi2 at
// T+4; 'done' at T+5, when vy_p, vy_n and nnz are valid. They stay valid until the next start.
// The inputs x must be held for the whole operation. A start while busy is ignored. The stage
// order follows the published description; the cycle budget is this implementation's own.
module imc_block
  import keyram_pkg::*;
#(
  parameter int unsigned ROWS  = IMC_ROWS,
  parameter int unsigned COLS  = IMC_COLS,
  parameter int unsigned RW    = IMC_RW,
  parameter int unsigned BW    = IMC_BW,
  parameter int unsigned BX    = IMC_BX,
  parameter int unsigned T_MAX = IMC_T_MAX
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // normal SRAM access
  input  logic                        wr_en,
  input  logic                        rd_en,
  input  logic [$clog2(ROWS)-1:0]     row,
  input  logic [$clog2(COLS/RW)-1:0]  cgrp,
  input  logic [RW-1:0]               wdata,
  output logic [RW-1:0]               rdata,
  // compute
  input  logic                        start,
  input  logic [$clog2(ROWS/BW)-1:0]  grp,
  input  logic [COLS-1:0][BX-1:0]     x,
  output logic [VQ_BITS-1:0]          vy_p,
  output logic [VQ_BITS-1:0]          vy_n,
  output logic [$clog2(COLS+1)-1:0]   nnz,
  output logic                        busy,
  output logic                        done
);
  typedef enum logic [1:0] {S_IDLE, S_PRECH, S_PULSE, S_SUM} state_e;
  state_e state;

  logic [$clog2(ROWS/BW)-1:0] grp_q;
  logic [BW-1:0][COLS-1:0]    grp_bits;
  logic [BW-1:0]              wl;
  logic                       pg_done;
  logic                       phi1, ss_done;
  logic [COLS-1:0]            phi3;
  logic                       clr;

  assign clr  = (state == S_PRECH);
  assign busy = (state != S_IDLE);
  assign done = ss_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      grp_q <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) begin
                   grp_q <= grp;
                   state <= S_PRECH;
                 end
        S_PRECH: state <= S_PULSE;
        S_PULSE: if (pg_done) state <= S_SUM;
        S_SUM:   if (ss_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  imc_sram #(.ROWS(ROWS), .COLS(COLS), .RW(RW), .BW(BW)) u_sram (
    .clk, .wr_en, .rd_en, .row, .cgrp, .wdata, .rdata,
    .grp(grp_q), .grp_bits
  );

  wl_pulse_gen #(.BW(BW), .T_MAX(T_MAX)) u_pulse (
    .clk, .rst_n, .start(clr), .wl, .busy(), .done(pg_done)
  );

  sparse_sum_ctrl #(.N(COLS), .BX(BX)) u_sparse (
    .clk, .rst_n, .start(state == S_PULSE && pg_done), .x,
    .phi1, .phi2(), .phi3, .nnz, .done(ss_done)
  );

  imc_bitline_model #(.COLS(COLS), .BW(BW), .BX(BX), .VQ_BITS(VQ_BITS)) u_analog (
    .clk, .clr, .wl, .bits(grp_bits), .x, .phi1, .phi3, .vy_p, .vy_n
  );

endmodule
