// tb_imc_sram: self-checking test of the IMC bit-cell array. Writes random 64-bit words
// through the normal port, reads them back one cycle later, and checks the 4-row compute view
// of weight groups against a shadow copy kept in the testbench (column 4*j+g <-> bit j).
module tb_imc_sram;
  import keyram_pkg::*;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, rd_en = 0;
  logic [8:0] row;
  logic [1:0] cgrp;
  logic [63:0] wdata, rdata;
  logic [6:0] grp;
  logic [3:0][255:0] grp_bits;
  logic [255:0] shadow [512];

  imc_sram dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill the whole array so every cell is defined
    for (int r = 0; r < 512; r++) for (int g = 0; g < 4; g++) begin
      @(negedge clk);
      wr_en = 1; row = 9'(r); cgrp = 2'(g); wdata = {$urandom, $urandom};
      for (int j = 0; j < 64; j++) shadow[r][4*j+g] = wdata[j];
    end
    @(negedge clk); wr_en = 0;
    // random read-back
    for (int n = 0; n < 300; n++) begin
      logic [63:0] exp;
      @(negedge clk);
      rd_en = 1; row = 9'($urandom_range(0, 511)); cgrp = 2'($urandom);
      for (int j = 0; j < 64; j++) exp[j] = shadow[row][4*j+cgrp];
      @(negedge clk); rd_en = 0;
      checks++; if (rdata !== exp) begin failures++; $display("read mismatch row %0d", row); end
    end
    // overwrite check: a write changes only its own columns
    @(negedge clk); wr_en = 1; row = 9'd5; cgrp = 2'd2; wdata = 64'hDEAD_BEEF_0123_4567;
    for (int j = 0; j < 64; j++) shadow[5][4*j+2] = wdata[j];
    @(negedge clk); wr_en = 0;
    // compute view
    for (int n = 0; n < 128; n++) begin
      grp = 7'(n); @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        checks++; if (grp_bits[k] !== shadow[4*n+k]) begin failures++; $display("group %0d row %0d mismatch", n, k); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
