// crc32_fpga_top: Ethernet CRC-32 engine computing 16 bytes per clock with
// sixteen lookup tables (slicing by 16).
//
// Structure
//   crc32_table_gen    computes the 16 tables after reset (6656 cycles)
//   crc32_lut_bank     holds them: T0..T15, 256 x 32 bits each
//   crc32_input_buffer 128-bit buffer, passes a word on at negedge clk
//   crc32_slice16      looks the 16 bytes up and XORs the results into the
//                      CRC register at posedge clk
//
// The data side follows the six ports of the document's design entity:
// clk, reset, start, eof (the "end" input), data_in[127:0] and crc_32[31:0].
// A word offered with the rising edge of cycle n is buffered at the falling
// edge of cycle n and absorbed at the rising edge that ends it, so crc_32
// holds the CRC of a frame one clock after the frame's last word is offered.
// See crc32_slice16 for the framing rules.
//
// tables_ready rises when generation has finished; words offered before are
// ignored. The tbl_* port is the table download link that a host computer
// uses in the document: a host may overwrite any table word once
// tables_ready is high (writes during generation are dropped). While the
// generator runs it also owns the read port of T0, which it needs to derive
// T1..T15.
module crc32_fpga_top
  import crc32_pkg::*;
#(
  parameter int unsigned SLICES = 16,
  parameter int unsigned DATA_W = 8 * SLICES,   // 128-bit data_in
  parameter int unsigned SEL_W  = $clog2(SLICES)
) (
  input  logic              clk,
  input  logic              reset,       // synchronous, active high
  input  logic              start,
  input  logic              eof,
  input  logic [DATA_W-1:0] data_in,
  output logic [CRC_W-1:0]  crc_32,
  output logic              tables_ready,
  // host table download port
  input  logic              tbl_we,
  input  logic [SEL_W-1:0]  tbl_sel,
  input  logic [LUT_AW-1:0] tbl_addr,
  input  logic [CRC_W-1:0]  tbl_wdata
);

  // table generator
  logic             gen_busy, gen_done, gen_we;
  logic [SEL_W-1:0] gen_sel;
  lut_addr_t        gen_waddr, gen_raddr;
  crc_t             gen_wdata;

  // table bank
  logic             bank_we;
  logic [SEL_W-1:0] bank_sel;
  lut_addr_t        bank_waddr;
  crc_t             bank_wdata;
  lut_addr_t        bank_raddr [SLICES];
  crc_t             bank_rdata [SLICES];

  // processor
  lut_addr_t         proc_addr [SLICES];
  logic [DATA_W-1:0] buf_data;
  logic              buf_start, buf_eof;

  crc32_table_gen #(
    .POLY     (CRC32_POLY),
    .N_TABLES (SLICES)
  ) u_gen (
    .clk     (clk),
    .reset   (reset),
    .busy    (gen_busy),
    .done    (gen_done),
    .wr_en   (gen_we),
    .wr_sel  (gen_sel),
    .wr_addr (gen_waddr),
    .wr_data (gen_wdata),
    .rd_addr (gen_raddr),
    .rd_data (bank_rdata[0])
  );

  always_comb begin
    if (gen_busy) begin
      bank_we    = gen_we;
      bank_sel   = gen_sel;
      bank_waddr = gen_waddr;
      bank_wdata = gen_wdata;
    end else begin
      bank_we    = tbl_we;
      bank_sel   = tbl_sel;
      bank_waddr = tbl_addr;
      bank_wdata = tbl_wdata;
    end
    bank_raddr = proc_addr;
    if (gen_busy) bank_raddr[0] = gen_raddr;
  end

  crc32_lut_bank #(
    .N_TABLES (SLICES)
  ) u_bank (
    .clk   (clk),
    .we    (bank_we),
    .sel   (bank_sel),
    .waddr (bank_waddr),
    .wdata (bank_wdata),
    .raddr (bank_raddr),
    .rdata (bank_rdata)
  );

  crc32_input_buffer #(
    .DATA_W (DATA_W)
  ) u_buf (
    .clk       (clk),
    .reset     (reset),
    .in_data   (data_in),
    .in_start  (start),
    .in_eof    (eof),
    .out_data  (buf_data),
    .out_start (buf_start),
    .out_eof   (buf_eof)
  );

  crc32_slice16 #(
    .SLICES (SLICES)
  ) u_proc (
    .clk      (clk),
    .reset    (reset),
    .enable   (gen_done),
    .data     (buf_data),
    .start    (buf_start),
    .eof      (buf_eof),
    .lut_addr (proc_addr),
    .lut_data (bank_rdata),
    .crc_32   (crc_32)
  );

  assign tables_ready = gen_done;

endmodule
