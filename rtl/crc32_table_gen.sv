// crc32_table_gen: fills the sixteen CRC-32 lookup tables after reset.
//
// Phase 1 builds table T0 as the generation flow chart does it, one bit per
// clock: for every dividend 0..255, temp is loaded with the dividend and then
// shifted right eight times, XORing in the (reflected) polynomial whenever the
// bit shifted out is a one. After the eighth step temp is written to
// T0[dividend]. That takes 10 cycles per entry (load, 8 steps, write).
//
// Phase 2 derives T1..T15 by the slicing-by-N rule
//     Tk[i] = (Tk-1[i] >> 8) ^ T0[Tk-1[i] & 0xFF].
// For each index i the generator reads T0[i] once, keeps the running value in
// a register (so Tk-1[i] never needs to be read back) and then spends one
// cycle per table, looking up T0 through its read port and writing Tk[i].
// That takes 16 cycles per index.
//
// The whole run lasts 256*10 + 256*16 = 6656 cycles; busy is high during it
// and done rises in the cycle after the last write and stays high until the
// next reset. Generation starts by itself when reset is released.
//
// Ports
//   wr_en/wr_sel/wr_addr/wr_data : write into table wr_sel
//   rd_addr/rd_data              : combinational read port of table T0
//
// The document lets a host PC compute the tables and download them; this
// block does the same computation on chip. The document's generation loop
// shifts right with the polynomial written as 0x04C11DB7; to obtain the
// Ethernet CRC (the document's example gives 0xCBF53A1C for bytes 31..35) the
// right-shifting loop here uses that polynomial bit-reversed.
module crc32_table_gen
  import crc32_pkg::*;
#(
  parameter logic [31:0] POLY     = CRC32_POLY, // normal notation
  parameter int unsigned N_TABLES = 16,
  parameter int unsigned SEL_W    = $clog2(N_TABLES)
) (
  input  logic             clk,
  input  logic             reset,     // synchronous, active high
  output logic             busy,
  output logic             done,
  output logic             wr_en,
  output logic [SEL_W-1:0] wr_sel,
  output lut_addr_t        wr_addr,
  output crc_t             wr_data,
  output lut_addr_t        rd_addr,
  input  crc_t             rd_data
);

  localparam crc_t POLY_REFL = reflect32(POLY);

  typedef enum logic [2:0] {
    S_T0_LOAD,   // temp = dividend, BitCounter = 0
    S_T0_SHIFT,  // temp = (LSB(temp) & poly) ^ SHR(temp), BitCounter++
    S_T0_WRITE,  // T0[dividend] = temp, dividend++
    S_SL_LOAD,   // v = T0[i], k = 1
    S_SL_STEP,   // v = (v >> 8) ^ T0[v & 0xFF], Tk[i] = v, k++
    S_DONE
  } state_t;

  state_t           state;
  lut_addr_t        idx;       // dividend in phase 1, i in phase 2
  logic [2:0]       bit_cnt;
  logic [SEL_W-1:0] tbl;       // k in phase 2
  crc_t             temp;

  crc_t             slice_next;
  assign slice_next = (temp >> 8) ^ rd_data;

  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= S_T0_LOAD;
      idx     <= '0;
      bit_cnt <= '0;
      tbl     <= '0;
      temp    <= '0;
    end else begin
      unique case (state)
        S_T0_LOAD: begin
          temp    <= crc_t'(idx);
          bit_cnt <= '0;
          state   <= S_T0_SHIFT;
        end
        S_T0_SHIFT: begin
          temp    <= crc_bit_step(temp, POLY_REFL);
          bit_cnt <= bit_cnt + 3'd1;
          if (bit_cnt == 3'd7) state <= S_T0_WRITE;
        end
        S_T0_WRITE: begin
          idx <= idx + 1'b1;
          if (idx == '1) state <= S_SL_LOAD;
          else           state <= S_T0_LOAD;
        end
        S_SL_LOAD: begin
          temp  <= rd_data;            // T0[i]
          tbl   <= SEL_W'(1);
          state <= S_SL_STEP;
        end
        S_SL_STEP: begin
          temp <= slice_next;
          tbl  <= tbl + 1'b1;
          if (tbl == SEL_W'(N_TABLES - 1)) begin
            idx <= idx + 1'b1;
            if (idx == '1) state <= S_DONE;
            else           state <= S_SL_LOAD;
          end
        end
        S_DONE: ;
        default: state <= S_DONE;
      endcase
    end
  end

  always_comb begin
    wr_en   = 1'b0;
    wr_sel  = '0;
    wr_addr = idx;
    wr_data = temp;
    rd_addr = idx;
    unique case (state)
      S_T0_WRITE: wr_en = 1'b1;
      S_SL_STEP: begin
        wr_en   = 1'b1;
        wr_sel  = tbl;
        wr_data = slice_next;
        rd_addr = temp[7:0];
      end
      default: ;
    endcase
  end

  assign busy = (state != S_DONE);
  assign done = (state == S_DONE);

endmodule
