// dm2vm: the digital matrix-vector processor (DM2VM) that runs fc1, fc2, fc5 and fc6.
//
// It holds the 6 kB weight SRAM (dm_sram), the 64-PE array (dm_pe_array), the 8-bit IO buffer
// (256 words: glimpse inputs, h_t and results), a table of pass descriptors (the setup
// register), the 25-bit accumulator with a 64-entry partial-result memory, and the MVM
// controller that executes passes.
//
// A pass (keyram_pkg::dm_pass_t) multiplies N <= 64 inputs read from the IO buffer by an
// N x M (M <= 64) weight block on PEs col..col+N-1. The block is stored diagonal-major: SRAM row
// w_row + r, byte column col+k, holds W[m][k] with m = (r - (N-1-k)) mod M, so M rows hold the
// block with no padding. In step s the controller reads row w_row + (s mod M). A layer wider
// than 64 inputs, or a layer tiled to share SRAM rows, is split into several passes: 'first'
// starts from the bias (byte bias_col+m of row bias_row, shifted left by bias_shift), later
// passes add to the accumulator entry (out_base+m) mod 64, and 'last' shifts right by 'shift',
// applies the activation (none, ReLU or hard tanh clamped to +-64, i.e. +-1.0 in Q1.6) and
// saturates to a signed byte for the IO buffer or to 0..15 for the fc3 input buffer.
//
// Timing of one pass: 1 cycle to fetch the descriptor and bias row, 1 cycle to latch the bias
// row, then N+M cycles of streaming (inputs in during the first N, outputs out during the last
// M), and a last write-back cycle: N+M+3 cycles. 'start' runs 'count' consecutive descriptors
// from 'first_idx'; 'done' pulses when they are finished. Host and IMC-interface ports write
// the IO buffer; the host also reads it (combinationally) and loads the SRAM and table.
// The fixed N+M streaming time, the array and memory sizes follow the published design; the
// descriptor format, the bias handling and the output formats are this implementation's own.
module dm2vm
  import keyram_pkg::*;
#(
  parameter int unsigned ROWS = DM_ROWS,
  parameter int unsigned PES  = DM_PES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host: IO buffer
  input  logic                       io_we,
  input  logic [7:0]                 io_addr,
  input  logic [7:0]                 io_wdata,
  output logic [7:0]                 io_rdata,
  // IMC interface: h_t into the IO buffer
  input  logic                       hw_en,
  input  logic [7:0]                 hw_addr,
  input  logic [7:0]                 hw_data,
  // host: weight SRAM and pass table
  input  logic                       sw_en,
  input  logic [$clog2(ROWS)-1:0]    sw_row,
  input  logic [2:0]                 sw_word,
  input  logic [63:0]                sw_data,
  input  logic                       tw_en,
  input  logic [3:0]                 tw_idx,
  input  dm_pass_t                   tw_data,
  // run control
  input  logic                       start,
  input  logic [3:0]                 first_idx,
  input  logic [4:0]                 count,
  input  logic [3:0]                 bias_shift,
  output logic                       busy,
  output logic                       done,
  // fc3 input buffer write
  output logic                       ib_we,
  output logic [6:0]                 ib_addr,
  output logic [3:0]                 ib_data
);
  localparam int unsigned PW = $clog2(PES);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_BIAS, S_RUN} state_e;
  state_e state;

  logic [7:0]           iobuf [IO_WORDS];
  dm_pass_t             table_q [N_PASSES];
  dm_pass_t             d;
  logic signed [DM_ACC-1:0] acc_mem [PES];

  logic [3:0]           idx;
  logic [4:0]           left;
  logic [7:0]           t;         // cycle within the streaming phase
  logic [6:0]           rho;       // diagonal row offset, t mod M
  logic [DM_ROW_BITS-1:0] bias_q;

  logic [6:0]           n_in, m_out;
  assign n_in  = 7'(d.n_in_m1) + 7'd1;
  assign m_out = 7'(d.m_out_m1) + 7'd1;

  // ---------------- weight SRAM ----------------
  logic                   rd_en;
  logic [$clog2(ROWS)-1:0] raddr;
  logic [DM_ROW_BITS-1:0] rdata;

  dm_sram #(.ROWS(ROWS), .BITS(DM_ROW_BITS)) u_sram (
    .clk, .rd_en, .raddr, .rdata,
    .we(sw_en && state == S_IDLE), .waddr(sw_row), .wword(sw_word), .wdata(sw_data)
  );

  // ---------------- PE array ----------------
  logic                   x_we, step;
  logic [PW-1:0]          x_idx, col_last;
  logic signed [7:0]      x_data;
  logic signed [DM_ACC-1:0] inject, exit_sum;

  dm_pe_array #(.PES(PES), .B(DM_B), .ACC(DM_ACC)) u_pes (
    .clk, .rst_n, .x_we, .x_idx, .x_data, .step, .w(rdata),
    .col(d.col[PW-1:0]), .col_last, .inject, .exit_sum
  );

  assign col_last = PW'(int'(d.col) + int'(n_in) - 1);

  // ---------------- controller datapath ----------------
  logic [7:0] in_off;    // N-1-t
  logic signed [7:0] bias_b;
  logic [6:0] step_s;    // t-1
  logic       out_v;
  logic [6:0] out_m;
  logic [7:0] out_addr;
  logic [5:0] acc_a;
  logic signed [DM_ACC-1:0] acc_v, shv;
  logic signed [8:0] y8;
  logic [3:0] y4;

  always_comb begin
    in_off  = 8'(n_in) - 8'd1 - t;
    step_s  = 7'(t - 8'd1);
    rd_en   = 1'b0;
    raddr   = '0;
    x_we    = 1'b0;
    x_idx   = PW'(int'(d.col) + int'(in_off));
    x_data  = signed'(iobuf[8'(d.in_base + in_off)]);
    step    = 1'b0;
    inject  = '0;
    bias_b  = signed'(bias_q[8*(int'(d.bias_col) + int'(step_s[5:0]) & (PES-1)) +: 8]);
    if (state == S_FETCH) begin
      rd_en = 1'b1;
      raddr = $clog2(ROWS)'(d.bias_row);
    end
    if (state == S_RUN) begin
      if (int'(t) < int'(n_in) + int'(m_out) - 1) begin
        rd_en = 1'b1;
        raddr = $clog2(ROWS)'(int'(d.w_row) + int'(rho));
      end
      if (int'(t) < int'(n_in)) x_we = 1'b1;
      if (t >= 8'd1 && int'(t) < int'(n_in) + int'(m_out)) begin
        step = 1'b1;
        if (d.first && int'(step_s) < int'(m_out))
          inject = DM_ACC'(signed'(bias_b)) <<< bias_shift;
      end
    end
    // write-back of output m = t - N - 1
    out_m    = 7'(int'(t) - int'(n_in) - 1);
    out_v    = (state == S_RUN) && (int'(t) >= int'(n_in) + 1) &&
               (int'(t) <= int'(n_in) + int'(m_out));
    out_addr = 8'(d.out_base + 8'(out_m));
    acc_a    = out_addr[5:0];
    acc_v    = exit_sum + (d.first ? '0 : acc_mem[acc_a]);
    shv      = acc_v >>> d.shift;
    unique case (d.act)
      ACT_RELU:  y8 = (shv < 0) ? 9'sd0 : (shv > 127) ? 9'sd127 : 9'(shv);
      ACT_HTANH: y8 = (shv < -64) ? -9'sd64 : (shv > 64) ? 9'sd64 : 9'(shv);
      default:   y8 = (shv < -128) ? -9'sd128 : (shv > 127) ? 9'sd127 : 9'(shv);
    endcase
    y4       = (y8 < 0) ? 4'd0 : (y8 > 15) ? 4'd15 : y8[3:0];
    ib_we    = out_v && d.last && d.dest == DEST_IBUF0;
    ib_addr  = out_addr[6:0];
    ib_data  = y4;
  end

  assign busy = (state != S_IDLE);
  assign io_rdata = iobuf[io_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      idx   <= '0;
      left  <= '0;
      t     <= '0;
      rho   <= '0;
      d     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (count == '0) done <= 1'b1;
          else begin
            idx   <= first_idx;
            left  <= count;
            d     <= table_q[first_idx];
            state <= S_FETCH;
          end
        end
        S_FETCH: state <= S_BIAS;
        S_BIAS: begin
          t     <= '0;
          rho   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          t   <= t + 8'd1;
          rho <= (rho == m_out - 7'd1) ? '0 : rho + 7'd1;
          if (int'(t) == int'(n_in) + int'(m_out)) begin
            if (left == 5'd1) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              idx   <= idx + 4'd1;
              left  <= left - 5'd1;
              d     <= table_q[idx + 4'd1];
              state <= S_FETCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // bias row latch, accumulator memory, IO buffer and table writes
  always_ff @(posedge clk) begin
    if (state == S_BIAS) bias_q <= rdata;
    if (out_v) acc_mem[acc_a] <= acc_v;
    if (tw_en && state == S_IDLE) table_q[tw_idx] <= tw_data;
    if (io_we) iobuf[io_addr] <= io_wdata;
    if (hw_en) iobuf[hw_addr] <= hw_data;
    if (out_v && d.last && d.dest == DEST_IO) iobuf[out_addr] <= y8[7:0];
  end

endmodule
