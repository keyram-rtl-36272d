// keyram_pkg: sizes, encodings and record types shared by the KeyRAM keyword-spotting
// processor. KeyRAM runs a recurrent attention model (six fully connected layers fc1..fc6
// per glimpse): fc3 and fc4 run on two in-memory-compute (IMC) SRAM banks whose analog dot
// products are digitised by single-slope ADCs, and fc1, fc2, fc5 and fc6 run on a 64-PE digital
// matrix-vector processor (DM2VM).
//
// The array sizes (512x256 IMC banks, 96x512 digital SRAM, 64 8-bit PEs, 25-bit accumulator,
// 4-bit IMC operands, 6-bit ADCs at 10 MS/s from a 1 GHz clock, 128- and 256-word IMC input
// buffers) follow the published design. The host command set, the pass descriptor format and
// the glimpse configuration record are this implementation's own choices.
package keyram_pkg;

  // ---------------- IMC banks ----------------
  localparam int unsigned IMC_ROWS   = 512;  // word lines per bank
  localparam int unsigned IMC_COLS   = 256;  // bit-line columns per bank
  localparam int unsigned IMC_BW     = 4;    // weight bits (rows per weight vector)
  localparam int unsigned IMC_BX     = 4;    // input bits
  localparam int unsigned IMC_RW     = 64;   // normal read/write buffer width
  localparam int unsigned IMC_T_MAX  = 8;    // MSB word-line pulse width in clock cycles
  localparam int unsigned IBUF0_WORDS = 128; // fc3 input buffer
  localparam int unsigned IBUF1_WORDS = 256; // fc4 input buffer
  localparam int unsigned VQ_BITS    = 16;   // analog voltages as unsigned Q8 fixed point

  // ---------------- ADCs ----------------
  localparam int unsigned ADC_BITS          = 6;
  localparam int unsigned ADC_SAMPLE_CYCLES = 100; // 1 GHz clock / 10 MS/s

  // ---------------- DM2VM ----------------
  localparam int unsigned DM_ROWS   = 96;   // weight SRAM rows
  localparam int unsigned DM_PES    = 64;   // MAC processing elements
  localparam int unsigned DM_B      = 8;    // operand width
  localparam int unsigned DM_ROW_BITS = DM_PES * DM_B; // 512
  localparam int unsigned DM_ACC    = 25;   // accumulator width
  localparam int unsigned IO_WORDS  = 256;  // 8-bit activation / IO buffer
  localparam int unsigned N_PASSES  = 16;   // pass descriptor table entries

  // Host command modes (the six operating modes of the main controller).
  typedef enum logic [2:0] {
    MODE_NOP          = 3'd0,
    MODE_IMC_WRITE    = 3'd1,  // write 64 bits of an IMC bank
    MODE_IMC_READ     = 3'd2,  // read 64 bits of an IMC bank
    MODE_DM_WRITE     = 3'd3,  // write 64 bits of a DM2VM SRAM row
    MODE_SETUP        = 3'd4,  // write a pass descriptor or the glimpse configuration
    MODE_NEW_DECISION = 3'd5,  // clear the recurrent state h before a new decision
    MODE_GLIMPSE      = 3'd6   // run fc1..fc6 for one glimpse
  } mode_e;

  typedef enum logic [1:0] {
    ACT_NONE  = 2'd0,
    ACT_RELU  = 2'd1,
    ACT_HTANH = 2'd2
  } act_e;

  typedef enum logic {
    DEST_IO    = 1'b0,  // 8-bit IO buffer
    DEST_IBUF0 = 1'b1   // 4-bit fc3 input buffer
  } dest_e;

  // One DM2VM pass: an (n_in x m_out) matrix-vector product on PEs col..col+n_in-1.
  typedef struct packed {
    logic [6:0] w_row;     // first weight row; row w_row+r holds wrapped diagonal r
    logic [5:0] n_in_m1;   // inputs - 1
    logic [5:0] m_out_m1;  // outputs - 1
    logic [5:0] col;       // first PE / SRAM byte column used
    logic [7:0] in_base;   // IO buffer address of input 0
    logic [7:0] out_base;  // destination address of output 0 (low 6 bits index the accumulator)
    logic [6:0] bias_row;  // SRAM row holding the biases
    logic [5:0] bias_col;  // byte column of the bias of output 0
    logic       first;     // start the accumulation from the bias (else add to the accumulator)
    logic       last;      // requantise, activate and write the outputs
    act_e       act;
    logic [4:0] shift;     // arithmetic right shift before the activation
    dest_e      dest;
  } dm_pass_t;

  // Per-glimpse configuration.
  typedef struct packed {
    logic [1:0]  pad;
    logic [3:0]  bias_shift; // digital biases are added as (bias << bias_shift)
    logic [7:0]  h_base;     // IO buffer address of h_t (8-bit copy for fc5/fc6)
    logic [3:0]  sh4b;       // fc4 -> 8-bit shift
    logic [3:0]  sh4a;       // fc4 -> 4-bit shift
    logic [3:0]  sh3;        // fc3 -> 4-bit shift
    logic [15:0] adc_step;   // ADC ramp step, Q8 volts
    logic [6:0]  m4;         // fc4 outputs
    logic [6:0]  m3;         // fc3 outputs
    logic [3:0]  n_post;     // passes after the IMC layers (fc5, fc6)
    logic [3:0]  n_pre;      // passes before the IMC layers (fc1, fc2)
  } glimpse_cfg_t;

  localparam int unsigned SETUP_CFG_ADDR = 16;

endpackage
