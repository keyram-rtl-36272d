// input_buffer: the 4-bit input buffer that feeds one IMC bank (128 words for IMC0 / fc3,
// 256 words for IMC1 / fc4). Word i drives column i of the bank's multipliers, so all words
// are presented in parallel on 'words'. One word can be written per clock; 'clr' zeroes all
// words (a clear has priority over a write in the same clock). A read port ('raddr'/'rdata',
// combinational) lets the controller move words between buffers. Sizes follow the published
// design; the ports are this implementation's choice.
module input_buffer #(
  parameter int unsigned WORDS = 128,
  parameter int unsigned BX    = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clr,
  input  logic                           we,
  input  logic [$clog2(WORDS)-1:0]       waddr,
  input  logic [BX-1:0]                  wdata,
  input  logic [$clog2(WORDS)-1:0]       raddr,
  output logic [BX-1:0]                  rdata,
  output logic [WORDS-1:0][BX-1:0]       words
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      words <= '0;
    else if (clr)    words <= '0;
    else if (we)     words[waddr] <= wdata;
  end

  assign rdata = words[raddr];

endmodule
