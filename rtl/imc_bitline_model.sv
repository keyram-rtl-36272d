// imc_bitline_model: behavioural model of the analog part of an IMC bank: bit-line discharge,
// the per-column charge-redistribution multiplier and the sparsity-aware charge-sharing sum.
// Not synthesizable analog; voltages are represented as unsigned numbers.
//
// How it is modelled (an ideal, noise-free version of the circuit):
//  1. While word-line pulses run, each column integrates the pulse time of the rows whose cell
//     stores a 1, so its discharge equals the binary-weighted 4-bit weight code.
//     Weights are two's complement. The design is differential (two ADCs per dot product); this
//     model routes the most significant (sign) row to a negative rail and the other rows to a
//     positive rail, so weight w = dp - dn with dp in 0..7 and dn in {0, 8}.
//  2. On phi1 each column's discharge is multiplied by its 4-bit input x_i and held on the
//     column capacitor: vm_p,i = dp_i * x_i and vm_n,i = dn_i * x_i.
//  3. On phi3 the capacitors of the columns whose phi3_i is high share charge, giving the mean
//     of their voltages. Outputs vy_p / vy_n are that mean in Q8 (value * 256, truncated),
//     and 0 when no column takes part.
// 'clr' (the precharge) resets the discharge integrators before a new weight vector.
// The split of the sign row onto its own rail and the units are this implementation's reading
// of "differential design"; the three stages follow the published description.
module imc_bitline_model #(
  parameter int unsigned COLS    = 256,
  parameter int unsigned BW      = 4,
  parameter int unsigned BX      = 4,
  parameter int unsigned VQ_BITS = 16
) (
  input  logic                         clk,
  input  logic                         clr,
  input  logic [BW-1:0]                wl,
  input  logic [BW-1:0][COLS-1:0]      bits,
  input  logic [COLS-1:0][BX-1:0]      x,
  input  logic                         phi1,
  input  logic [COLS-1:0]              phi3,
  output logic [VQ_BITS-1:0]           vy_p,
  output logic [VQ_BITS-1:0]           vy_n
);
  localparam int unsigned DW = BW + 1;        // discharge integrator width
  localparam int unsigned MW = DW + BX;       // product width

  logic [COLS-1:0][DW-1:0] dp, dn;
  logic [COLS-1:0][MW-1:0] cap_p, cap_n;

  always_ff @(posedge clk) begin
    if (clr) begin
      dp   <= '0;
      dn   <= '0;
      vy_p <= '0;
      vy_n <= '0;
    end else begin
      for (int i = 0; i < COLS; i++) begin
        logic [DW-1:0] inc;
        inc = '0;
        for (int k = 1; k < BW; k++) inc = inc + DW'(wl[k] & bits[k][i]);
        dp[i] <= dp[i] + inc;
        dn[i] <= dn[i] + DW'(wl[0] & bits[0][i]);
      end
      if (phi1) begin
        for (int i = 0; i < COLS; i++) begin
          cap_p[i] <= MW'(dp[i] * x[i]);
          cap_n[i] <= MW'(dn[i] * x[i]);
        end
      end
      if (phi3 != '0) begin
        logic [31:0] sp, sn, cnt;
        sp = 0; sn = 0; cnt = 0;
        for (int i = 0; i < COLS; i++) begin
          if (phi3[i]) begin
            sp  = sp + 32'(cap_p[i]);
            sn  = sn + 32'(cap_n[i]);
            cnt = cnt + 1;
          end
        end
        vy_p <= VQ_BITS'((sp << 8) / cnt);
        vy_n <= VQ_BITS'((sn << 8) / cnt);
      end
    end
  end

endmodule
