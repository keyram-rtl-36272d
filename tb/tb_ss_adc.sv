// tb_ss_adc: converts random and edge-case voltages and checks code = min(63, floor(vin/step)),
// that each conversion takes exactly 100 cycles (10 MS/s at 1 GHz), that a start while busy is
// ignored and that back-to-back conversions run at one per 100 cycles.
module tb_ss_adc;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n = 0, start = 0, busy, done;
  logic [15:0] vin, step;
  logic [5:0] code;

  ss_adc #(.BITS(6), .VQ_BITS(16), .SAMPLE_CYCLES(100)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 60; rep++) begin
      int lat, exp;
      step = 16'($urandom_range(64, 1024));
      vin  = 16'($urandom_range(0, 70000));
      if (rep == 0) vin = 0;
      if (rep == 1) vin = 16'hFFFF;
      if (rep == 2) vin = 16'(step * 5);
      exp = int'(vin) / int'(step); if (exp > 63) exp = 63;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; lat = 1;
      while (!done && lat < 300) begin
        if (lat == 10) begin start = 1; vin = 16'd0; end   // ignored while busy
        if (lat == 11) start = 0;
        @(negedge clk); lat++;
      end
      checks++; if (lat != 100) begin failures++; $display("latency %0d", lat); end
      checks++; if (int'(code) != exp) begin failures++; $display("code %0d exp %0d", code, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
