// tb_dm_sram: writes every 64-bit slice of the 96 x 512 weight SRAM with random data and reads
// random rows back, checking the one-cycle read latency, that the data register holds its value
// between reads, and that a slice write leaves the other slices of the row alone.
module tb_dm_sram;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rd_en = 0, we = 0;
  logic [6:0] raddr, waddr;
  logic [2:0] wword;
  logic [63:0] wdata;
  logic [511:0] rdata;
  logic [511:0] sh [96];

  dm_sram dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 96; r++) for (int w = 0; w < 8; w++) begin
      @(negedge clk); we = 1; waddr = 7'(r); wword = 3'(w); wdata = {$urandom, $urandom};
      sh[r][64*w +: 64] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); rd_en = 1; raddr = 7'($urandom_range(0, 95));
      @(negedge clk); rd_en = 0;
      checks++; if (rdata != sh[raddr]) begin failures++; $display("row %0d", raddr); end
      @(negedge clk);
      checks++; if (rdata != sh[raddr]) begin failures++; $display("data reg not held"); end
      if (n % 20 == 0) begin
        @(negedge clk); we = 1; waddr = raddr; wword = 3'($urandom); wdata = {$urandom, $urandom};
        sh[waddr][64*wword +: 64] = wdata;
        @(negedge clk); we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
