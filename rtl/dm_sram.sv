// dm_sram: the 96 x 512 6T SRAM of the digital processor (6 kB) holding the weights and
// biases of fc1, fc2, fc5 and fc6, with its address register and 512-bit data register.
//
// A 512-bit row is 64 bytes, one byte per processing element, so one read feeds all 64 PEs.
// Reads: 'rd_en' with 'raddr' registers the address; the row appears in 'rdata' (the data
// register) on the next cycle and is held until the next read. Writes come from the host
// 64 bits at a time: 'wword' selects which of the eight 64-bit slices of row 'waddr' is
// written. Size and the address/data registers follow the published design; the 64-bit
// write slices are this implementation's choice.
module dm_sram
  import keyram_pkg::*;
#(
  parameter int unsigned ROWS = DM_ROWS,
  parameter int unsigned BITS = DM_ROW_BITS
) (
  input  logic                          clk,
  input  logic                          rd_en,
  input  logic [$clog2(ROWS)-1:0]       raddr,
  output logic [BITS-1:0]               rdata,
  input  logic                          we,
  input  logic [$clog2(ROWS)-1:0]       waddr,
  input  logic [$clog2(BITS/64)-1:0]    wword,
  input  logic [63:0]                   wdata
);
  logic [BITS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][int'(wword)*64 +: 64] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end

endmodule
