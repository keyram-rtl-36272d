// tb_input_buffer: random writes to a 256-word 4-bit buffer, checked through the parallel
// output and the read port against a shadow copy; then a clear, which must zero every word
// and take priority over a simultaneous write.
module tb_input_buffer;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, clr = 0, we = 0;
  logic [7:0] waddr, raddr;
  logic [3:0] wdata, rdata;
  logic [255:0][3:0] words;
  logic [3:0] sh [256];

  input_buffer #(.WORDS(256), .BX(4)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (sh[i]) sh[i] = 0;
    raddr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk); we = 1; waddr = 8'($urandom); wdata = 4'($urandom); sh[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); @(negedge clk);
      checks++; if (words[i] != sh[i] || rdata != sh[i]) begin failures++; $display("word %0d: %0d %0d exp %0d", i, words[i], rdata, sh[i]); end
    end
    @(negedge clk); clr = 1; we = 1; waddr = 8'd9; wdata = 4'd7;
    @(negedge clk); clr = 0; we = 0;
    // clear has priority over a write in the same cycle; every word must read back 0
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); @(negedge clk);
      checks++; if (words[i] != '0 || rdata != '0) begin failures++; $display("word %0d not cleared", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
