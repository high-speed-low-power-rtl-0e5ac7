// crc32_lut_ram: one CRC-32 lookup table, 256 words of 32 bits.
//
// The table is a plain array: a write port clocked on the rising edge of clk
// and an asynchronous read port, so a lookup costs no clock cycle and all
// tables of the slicing engine can be read in the same cycle. The contents
// are undefined until they are written; the table generator (or a host over
// the top-level write port) fills every location after reset.
//
// Ports
//   we/waddr/wdata : write enable, address and word, sampled at posedge clk
//   raddr/rdata    : combinational read
module crc32_lut_ram #(
  parameter int unsigned DEPTH  = 256,  // one location per byte value
  parameter int unsigned WIDTH  = 32,   // CRC-32 word
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
