// tb_wl_pulse_gen: checks the pulse-width-modulated word lines: row k stays high for exactly
// T_MAX/2^k cycles, all rows start together, done follows one cycle after the MSB pulse, and a
// start while busy is ignored.
module tb_wl_pulse_gen;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, start = 0, busy, done;
  logic [3:0] wl;
  int hi [4];
  int cyc, done_at;

  wl_pulse_gen #(.BW(4), .T_MAX(8)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      foreach (hi[k]) hi[k] = 0;
      done_at = -1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (cyc = 0; cyc < 20; cyc++) begin
        for (int k = 0; k < 4; k++) begin
          if (wl[k]) hi[k]++;
          // every row rises with the start and falls after T_MAX/2^k cycles
          checks++;
          if (wl[k] != (cyc < (8 >> k))) begin failures++; $display("row %0d is %0b at %0d", k, wl[k], cyc); end
        end
        if (cyc == 3) start = 1;   // ignored while busy
        if (cyc == 4) start = 0;
        if (done) done_at = cyc;
        @(negedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (hi[k] != (8 >> k)) begin failures++; $display("row %0d width %0d", k, hi[k]); end
      end
      checks++; if (done_at != 8) begin failures++; $display("done at %0d", done_at); end
      checks++; if (busy) begin failures++; $display("still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
