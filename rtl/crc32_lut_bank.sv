// crc32_lut_bank: the sixteen lookup tables T0..T15 of the slicing-by-16
// CRC-32 engine.
//
// Each table is a crc32_lut_ram of 256 x 32 bits. All tables share one write
// port; tbl_sel picks the table a write goes to. Every table has its own
// asynchronous read port, so the processor can look up sixteen bytes in the
// same cycle.
//
// Ports
//   we, sel, waddr, wdata : write of one word into table sel (posedge clk)
//   raddr[t] / rdata[t]   : combinational read of table t
module crc32_lut_bank
  import crc32_pkg::*;
#(
  parameter int unsigned N_TABLES = 16,   // slicing by 16
  parameter int unsigned SEL_W    = $clog2(N_TABLES)
) (
  input  logic       clk,
  input  logic       we,
  input  logic [SEL_W-1:0] sel,
  input  lut_addr_t  waddr,
  input  crc_t       wdata,
  input  lut_addr_t  raddr [N_TABLES],
  output crc_t       rdata [N_TABLES]
);

  for (genvar t = 0; t < N_TABLES; t++) begin : g_table
    crc32_lut_ram #(
      .DEPTH (LUT_DEPTH),
      .WIDTH (CRC_W)
    ) u_ram (
      .clk   (clk),
      .we    (we && (sel == SEL_W'(t))),
      .waddr (waddr),
      .wdata (wdata),
      .raddr (raddr[t]),
      .rdata (rdata[t])
    );
  end

endmodule
