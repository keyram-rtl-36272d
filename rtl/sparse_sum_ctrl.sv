// sparse_sum_ctrl: digital control of the sparsity-aware summation in an IMC bank.
//
// After the bit lines have been multiplied by the inputs, each column's product voltage is
// first sampled onto a local capacitor (phase phi1), then the capacitors are shorted together
// (phase phi2) to average them. Because ReLU inputs are mostly zero, averaging over all N
// columns would shrink the output swing; instead only columns with a non-zero input join the
// charge sharing: s_i = (x_i != 0) and phi3_i = phi2 AND s_i, as the summation figure prints.
// The count of joining columns (nnz) is reported so the digital side can undo the averaging.
//
// Timing: 'start' (one cycle) -> phi1 high for one cycle -> phi2 / phi3 high for one cycle ->
// 'done' for one cycle, with nnz valid from the phi1 cycle until the next start. The one-cycle
// phase widths are this implementation's choice.
module sparse_sum_ctrl #(
  parameter int unsigned N  = 256,
  parameter int unsigned BX = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [N-1:0][BX-1:0]     x,
  output logic                     phi1,
  output logic                     phi2,
  output logic [N-1:0]             phi3,
  output logic [$clog2(N+1)-1:0]   nnz,
  output logic                     done
);
  logic [N-1:0] s;
  logic [$clog2(N+1)-1:0] cnt_c;

  always_comb begin
    cnt_c = '0;
    for (int i = 0; i < N; i++) begin
      s[i]  = (x[i] != '0);
      cnt_c = cnt_c + {{($clog2(N+1)-1){1'b0}}, s[i]};
    end
    for (int i = 0; i < N; i++) phi3[i] = phi2 & s[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi1 <= 1'b0;
      phi2 <= 1'b0;
      done <= 1'b0;
      nnz  <= '0;
    end else begin
      phi1 <= start && !phi1 && !phi2;
      phi2 <= phi1;
      done <= phi2;
      if (start && !phi1 && !phi2) nnz <= cnt_c;
    end
  end

endmodule
