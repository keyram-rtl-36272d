// adc_bank: the bank of four single-slope ADCs shared by the two IMC banks.
//
// Each IMC dot product is differential and needs two 6-bit conversions, one per rail. The four
// ADCs form two pairs: pair p has ADC 2p on the positive rail and ADC 2p+1 on the negative rail.
// With a conversion taking 100 clocks, alternating the pairs lets a new dot product start every
// 50 clocks. 'sel' picks which IMC bank drives the pairs (the bank is shared by IMC0 and IMC1,
// as the chip architecture figure shows both banks wired to it). Pairing and alternation are
// this implementation's choice; the count, resolution and rate of the ADCs follow the published
// design. Timing per pair is that of ss_adc.
module adc_bank
  import keyram_pkg::*;
#(
  parameter int unsigned BITS          = ADC_BITS,
  parameter int unsigned SAMPLE_CYCLES = ADC_SAMPLE_CYCLES
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sel,          // 0: IMC0, 1: IMC1
  input  logic [VQ_BITS-1:0]      vy0_p, vy0_n,
  input  logic [VQ_BITS-1:0]      vy1_p, vy1_n,
  input  logic [15:0]             step,
  input  logic [1:0]              start,        // per pair
  output logic [1:0][BITS-1:0]    code_p,
  output logic [1:0][BITS-1:0]    code_n,
  output logic [1:0]              busy,
  output logic [1:0]              done
);
  logic [VQ_BITS-1:0] vp, vn;
  logic [1:0] busy_n, done_n;

  assign vp = sel ? vy1_p : vy0_p;
  assign vn = sel ? vy1_n : vy0_n;

  for (genvar p = 0; p < 2; p++) begin : g_pair
    ss_adc #(.BITS(BITS), .VQ_BITS(VQ_BITS), .SAMPLE_CYCLES(SAMPLE_CYCLES)) u_adc_p (
      .clk, .rst_n, .start(start[p]), .vin(vp), .step, .code(code_p[p]),
      .busy(busy[p]), .done(done[p])
    );
    ss_adc #(.BITS(BITS), .VQ_BITS(VQ_BITS), .SAMPLE_CYCLES(SAMPLE_CYCLES)) u_adc_n (
      .clk, .rst_n, .start(start[p]), .vin(vn), .step, .code(code_n[p]),
      .busy(busy_n[p]), .done(done_n[p])
    );
  end

  // both ADCs of a pair start together and take the same time
  always_comb assert (busy == busy_n && done == done_n) else $error("ADC pair out of step");

endmodule
