// tb_imc_interface: random ADC codes, counts and ramp steps; checks the reconstructed dot
// product ((p - n) * step * nnz) >> 8 (floor), its ReLU and the saturating 4- and 8-bit
// requantisation against a reference written with 64-bit integers.
module tb_imc_interface;
  int checks = 0, failures = 0;
  logic [5:0] code_p, code_n;
  logic [8:0] nnz;
  logic [15:0] step;
  logic [3:0] sh4, sh8, q4;
  logic signed [39:0] dot;
  logic [7:0] q8;

  imc_interface dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint d, r, e4, e8, prod;
      code_p = 6'($urandom); code_n = 6'($urandom); nnz = 9'($urandom_range(0, 256));
      step = 16'($urandom_range(1, 2000)); sh4 = 4'($urandom_range(0, 12)); sh8 = 4'($urandom_range(0, 12));
      if (n == 0) begin code_p = 0; code_n = 63; end
      #1;
      prod = (longint'(code_p) - longint'(code_n)) * longint'(step) * longint'(nnz);
      d = prod >>> 8;
      r = d < 0 ? 0 : d;
      e4 = r >> sh4; if (e4 > 15) e4 = 15;
      e8 = r >> sh8; if (e8 > 127) e8 = 127;
      checks++;
      if (longint'(dot) != d || longint'(q4) != e4 || longint'(q8) != e8) begin
        failures++; $display("p %0d n %0d nnz %0d step %0d: dot %0d/%0d q4 %0d/%0d q8 %0d/%0d",
                             code_p, code_n, nnz, step, dot, d, q4, e4, q8, e8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
