// ss_adc: behavioural model of a 6-bit single-slope ADC (four of them form the ADC bank).
// The comparator and ramp are analog; the voltage is represented as an unsigned Q8 number.
//
// On 'start' the input voltage is sampled and held. A ramp then rises by 'step' each clock
// while a counter counts; the counter stops when the ramp would pass the held voltage or reaches
// full scale, so code = min(2^BITS - 1, floor(vin / step)). A conversion always takes
// SAMPLE_CYCLES clocks (100 clocks at 1 GHz gives the published 10 MS/s): done pulses
// SAMPLE_CYCLES clocks after the start edge with code valid and held until the next start,
// and a new start is accepted on the next clock. busy is high while
// converting; a start while busy is ignored. The ramp step (full-scale setting) is a run-time
// input here, which is this implementation's choice.
module ss_adc #(
  parameter int unsigned BITS          = 6,
  parameter int unsigned VQ_BITS       = 16,
  parameter int unsigned SAMPLE_CYCLES = 100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [VQ_BITS-1:0] vin,
  input  logic [15:0]        step,
  output logic [BITS-1:0]    code,
  output logic               busy,
  output logic               done
);
  localparam int unsigned CW = $clog2(SAMPLE_CYCLES + 1);
  logic [VQ_BITS-1:0] held;
  logic [23:0]        ramp;     // next ramp level
  logic [BITS-1:0]    cnt;
  logic               running;  // comparator not yet tripped
  logic [CW-1:0]      t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; running <= 1'b0;
      cnt <= '0; code <= '0; held <= '0; ramp <= '0; t <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          running <= 1'b1;
          held    <= vin;
          ramp    <= 24'(step);
          cnt     <= '0;
          t       <= CW'(1);
        end
      end else begin
        if (running) begin
          if (cnt != '1 && ramp <= 24'(held)) begin
            cnt  <= cnt + 1'b1;
            ramp <= ramp + 24'(step);
          end else begin
            running <= 1'b0;
          end
        end
        if (int'(t) == SAMPLE_CYCLES - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          code <= cnt;
        end
        t <= t + 1'b1;
      end
    end
  end

  initial assert (SAMPLE_CYCLES >= (1 << BITS) + 2) else $error("SAMPLE_CYCLES too short");

endmodule
