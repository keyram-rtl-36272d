// imc_interface: turns the two ADC codes of a differential IMC dot product back into a number
// and requantises it for the next layer.
//
// The sparsity-aware sum delivers the mean over the nnz non-zero-input columns, on a positive
// and a negative rail, each digitised with ramp step 'step' (Q8). The dot product estimate is
//   dot = ((code_p - code_n) * step * nnz) >>> 8,
// which undoes the averaging. ReLU follows (both fc3 and fc4 use it). Two requantised copies
// are produced: q4 = min(15, relu >> sh4) for an IMC input buffer and q8 = min(127, relu >> sh8)
// for the digital processor. Purely combinational. The published design names this block; the
// arithmetic is this implementation's own.
module imc_interface #(
  parameter int unsigned BITS = 6,
  parameter int unsigned NW   = 9
) (
  input  logic [BITS-1:0]   code_p,
  input  logic [BITS-1:0]   code_n,
  input  logic [NW-1:0]     nnz,
  input  logic [15:0]       step,
  input  logic [3:0]        sh4,
  input  logic [3:0]        sh8,
  output logic signed [39:0] dot,
  output logic [3:0]        q4,
  output logic [7:0]        q8
);
  logic signed [39:0] diff, relu, r4, r8;

  always_comb begin
    diff = 40'(signed'({1'b0, code_p})) - 40'(signed'({1'b0, code_n}));
    dot  = (diff * 40'(signed'({1'b0, step})) * 40'(signed'({1'b0, nnz}))) >>> 8;
    relu = (dot < 0) ? 40'sd0 : dot;
    r4   = relu >>> sh4;
    r8   = relu >>> sh8;
    q4   = (r4 > 40'sd15)  ? 4'd15  : r4[3:0];
    q8   = (r8 > 40'sd127) ? 8'd127 : r8[7:0];
  end

endmodule
