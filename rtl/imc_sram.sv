// imc_sram: the 512 x 256 6T bit-cell array of one in-memory-compute bank, with its row
// decoder, L:1 column multiplexer (L = 4) and 64-bit read/write buffer.
//
// Two ways in:
//  * Normal SRAM access. A 64-bit word is addressed by a row and a column group g (0..3); bit j
//    of the word is column 4*j + g (interleaved column multiplexing). A write takes effect at
//    the clock edge; read data appear in the read/write buffer one cycle after rd_en.
//  * Compute access. A weight vector is a group of IMC_BW = 4 consecutive rows; group v uses
//    rows 4v (most significant bit) .. 4v+3 (least significant bit), one 4-bit weight per
//    column, as drawn in the bit-cell array figure (MSB row on top, LSB row below). grp_bits
//    presents the four rows of group grp combinationally; in silicon these are the cells that
//    discharge the bit lines when their word lines are pulsed.
// The array size and the 64-bit buffer follow the published design; the interleaved column
// order and the one-cycle read latency are this implementation's choices. Precharge and sense
// amplification are modelled as an ideal read.
module imc_sram
  import keyram_pkg::*;
#(
  parameter int unsigned ROWS = IMC_ROWS,
  parameter int unsigned COLS = IMC_COLS,
  parameter int unsigned RW   = IMC_RW,
  parameter int unsigned BW   = IMC_BW
) (
  input  logic                        clk,
  // normal access
  input  logic                        wr_en,
  input  logic                        rd_en,
  input  logic [$clog2(ROWS)-1:0]     row,
  input  logic [$clog2(COLS/RW)-1:0]  cgrp,
  input  logic [RW-1:0]               wdata,
  output logic [RW-1:0]               rdata,
  // compute access
  input  logic [$clog2(ROWS/BW)-1:0]  grp,
  output logic [BW-1:0][COLS-1:0]     grp_bits
);
  localparam int unsigned L = COLS / RW;

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int j = 0; j < RW; j++) mem[row][j*L + int'(cgrp)] <= wdata[j];
    end
    if (rd_en) begin
      for (int j = 0; j < RW; j++) rdata[j] <= mem[row][j*L + int'(cgrp)];
    end
  end

  always_comb begin
    for (int k = 0; k < BW; k++) grp_bits[k] = mem[int'(grp)*BW + k];
  end

endmodule
