// wl_pulse_gen: word-line pulse generator of an IMC bank (the "X-Dec. & Pulse Gen." columns).
//
// Digital-to-analog conversion of a multi-bit weight is done in time: the word line of weight
// bit k (k = 0 for the most significant row) is held high for T_MAX / 2^k clock cycles, so the
// bit-line discharge of a column is proportional to the binary-weighted sum of its stored bits.
// The halving from row to row follows the pulse-width figure (T_max, 0.5 T_max, ...); T_MAX in
// clock cycles, and the choice that all pulses start on the same cycle, are this
// implementation's own.
//
// Interface: a one-cycle 'start' begins a pulse train; wl[k] is the enable of the k-th row of
// the selected weight group; 'done' pulses one cycle after the longest pulse ends. 'busy' is
// high from the cycle after start until done. A start while busy is ignored.
module wl_pulse_gen #(
  parameter int unsigned BW    = 4,
  parameter int unsigned T_MAX = 8   // must be >= 2^(BW-1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [BW-1:0] wl,
  output logic          busy,
  output logic          done
);
  localparam int unsigned CW = $clog2(T_MAX + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        if (cnt == CW'(T_MAX - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < BW; k++) wl[k] = busy && (int'(cnt) < int'(T_MAX >> k));
  end

  initial assert (T_MAX >= (1 << (BW - 1))) else $error("T_MAX too small for BW");

endmodule
