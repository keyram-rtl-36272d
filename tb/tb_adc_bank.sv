// tb_adc_bank: starts the two ADC pairs 50 cycles apart on voltages from either IMC bank and
// checks each pair's positive and negative codes against min(63, floor(v/step)), the
// bank-select mux, and the 100-cycle conversion time of each pair.
module tb_adc_bank;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, sel = 0;
  logic [15:0] vy0_p, vy0_n, vy1_p, vy1_n, step;
  logic [1:0] start = 0, busy, done;
  logic [1:0][5:0] code_p, code_n;
  int ep [2], en [2], t_start [2];
  int cyc = 0;

  adc_bank dut (.*);

  always @(posedge clk) cyc++;

  function automatic int q(int v, int s); int r = v / s; return r > 63 ? 63 : r; endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // completion checker
  always @(negedge clk) begin
    for (int p = 0; p < 2; p++) if (rst_n && done[p]) begin
      checks++;
      if (int'(code_p[p]) != ep[p] || int'(code_n[p]) != en[p]) begin
        failures++; $display("pair %0d codes %0d/%0d exp %0d/%0d", p, code_p[p], code_n[p], ep[p], en[p]);
      end
      checks++;
      if (cyc - t_start[p] != 100) begin failures++; $display("pair %0d took %0d", p, cyc - t_start[p]); end
    end
  end

  initial begin
    step = 16'd300;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int p = 0; p < 2; p++) begin
        sel = rep[0];
        vy0_p = 16'($urandom_range(0, 20000)); vy0_n = 16'($urandom_range(0, 20000));
        vy1_p = 16'($urandom_range(0, 20000)); vy1_n = 16'($urandom_range(0, 20000));
        ep[p] = sel ? q(vy1_p, 300) : q(vy0_p, 300);
        en[p] = sel ? q(vy1_n, 300) : q(vy0_n, 300);
        @(negedge clk); start[p] = 1; t_start[p] = cyc;
        @(negedge clk); start[p] = 0;
        vy0_p = 0; vy1_p = 0;
        repeat (58) @(negedge clk);
      end
    end
    repeat (120) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
