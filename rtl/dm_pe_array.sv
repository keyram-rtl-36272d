// dm_pe_array: the linear array of 64 8-bit MAC processing elements of the DM2VM processor.
//
// The array computes y = W x for an N-input, M-output layer on PEs col..col+N-1 with an
// input-stationary, diagonal-major schedule. PE col+k holds input x_k in its input register
// (the 8b x 64-word input buffer). Partial sums travel one PE to the left per step: the
// partial sum of output m enters at PE col+N-1 at step m (carrying the bias) and leaves PE col
// at step m+N-1 with the finished dot product. At step s, PE col+k therefore works on output
// m = s-(N-1-k), so the 64 weights used in one step form a diagonal of W, read as one SRAM row
// (the 8b x 64-word weight buffer). All N x M products are done in N+M-1 steps, with inputs
// streamed in at the start and outputs streamed out at the end.
//
// Interface: x_we loads input register x_idx. On 'step' every PE k does
// psum[k] <= psum_in[k] + x[k] * w[k], where psum_in is 'inject' for k = col_last and
// psum[k+1] otherwise. 'exit_sum' is psum[col]. Operands are signed 8-bit, partial sums 25-bit.
// The PE count, operand and accumulator widths follow the published design; the direction of
// partial-sum flow follows the arrows between the PEs in the architecture figure; the schedule
// itself is this implementation's reading of "diagonal major".
module dm_pe_array
  import keyram_pkg::*;
#(
  parameter int unsigned PES = DM_PES,
  parameter int unsigned B   = DM_B,
  parameter int unsigned ACC = DM_ACC
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          x_we,
  input  logic [$clog2(PES)-1:0]        x_idx,
  input  logic signed [B-1:0]           x_data,
  input  logic                          step,
  input  logic [PES-1:0][B-1:0]         w,
  input  logic [$clog2(PES)-1:0]        col,
  input  logic [$clog2(PES)-1:0]        col_last,
  input  logic signed [ACC-1:0]         inject,
  output logic signed [ACC-1:0]         exit_sum
);
  logic signed [B-1:0]   x    [PES];
  logic signed [ACC-1:0] psum [PES];

  logic signed [ACC-1:0] pin  [PES];

  always_comb begin
    for (int k = 0; k < PES; k++) begin
      if (k == int'(col_last)) pin[k] = inject;
      else if (k == PES - 1)   pin[k] = '0;
      else                     pin[k] = psum[(k + 1) % PES];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < PES; k++) begin
        x[k]    <= '0;
        psum[k] <= '0;
      end
    end else begin
      if (x_we) x[x_idx] <= x_data;
      if (step) begin
        for (int k = 0; k < PES; k++) psum[k] <= pin[k] + ACC'(x[k] * signed'(w[k]));
      end
    end
  end

  assign exit_sum = psum[col];

endmodule
