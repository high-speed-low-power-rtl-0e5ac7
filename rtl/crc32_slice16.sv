// crc32_slice16: slicing-by-16 CRC-32 processor, one 128-bit word per clock.
//
// The word's sixteen bytes address sixteen lookup tables at once. The twelve
// upper bytes go straight to the tables: bits [127:120] to T0, [119:112] to
// T1, ... [39:32] to T11. The lower 32 bits are first XORed with the previous
// CRC value and the four resulting bytes address T12 (bits [31:24]) to T15
// (bits [7:0]). The sixteen table words XORed together are the new CRC value,
// loaded into the CRC register on the rising edge of clk. With the first
// stream byte in bits [7:0] this is the standard slicing-by-16 step of the
// reflected (Ethernet) CRC-32, which absorbs 16 bytes per clock: 102.4 Gbit/s
// at 800 MHz.
//
// Framing (this design's choice; the document names the start, end and reset
// inputs but does not define them): a frame is the run of consecutive words
// from the one flagged start to the one flagged eof, one word per clock with
// no gaps; start and eof may flag the same word. The start word uses the
// initial value 0xFFFFFFFF in place of the previous CRC. Between frames the
// register holds. crc_32 is the complement of the register: after a frame's
// last word it is the frame's Ethernet CRC-32 (FCS value), and mid-frame it is
// the CRC of the bytes so far. Words are ignored while enable is low (the
// tables are not loaded yet). Frame lengths must be whole 16-byte words.
// Two assertions check the framing rules.
//
// Twelve of the sixteen table addresses are data bytes wired straight
// through; only the four addresses of T12..T15 pass through logic.
//
// Ports
//   data/start/eof : word and flags from the input buffer
//   lut_addr[t]    : address into table t;  lut_data[t]: its word
//   crc_32         : CRC output, registered (changes at posedge clk)
module crc32_slice16
  import crc32_pkg::*;
#(
  parameter int unsigned SLICES = 16,            // bytes per word
  parameter int unsigned DATA_W = 8 * SLICES,
  parameter crc_t        INIT   = CRC32_INIT,
  parameter crc_t        XOROUT = CRC32_XOROUT
) (
  input  logic              clk,
  input  logic              reset,      // synchronous, active high
  input  logic              enable,
  input  logic [DATA_W-1:0] data,
  input  logic              start,
  input  logic              eof,
  output lut_addr_t         lut_addr [SLICES],
  input  crc_t              lut_data [SLICES],
  output crc_t              crc_32
);

  crc_t              crc_q;
  logic              in_frame;
  crc_t              prev_crc;
  logic [DATA_W-1:0] mixed;       // data with the previous CRC folded in
  crc_t              crc_next;
  logic              absorb;

  assign absorb   = enable && (start || in_frame);
  assign prev_crc = start ? INIT : crc_q;
  assign mixed    = {data[DATA_W-1:CRC_W], data[CRC_W-1:0] ^ prev_crc};

  // Table t is addressed by byte SLICES-1-t of the mixed word.
  for (genvar t = 0; t < SLICES; t++) begin : g_addr
    assign lut_addr[t] = mixed[BYTE_W*(SLICES-1-t) +: BYTE_W];
  end

  always_comb begin
    crc_next = '0;
    for (int t = 0; t < SLICES; t++) crc_next ^= lut_data[t];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      crc_q    <= INIT;
      in_frame <= 1'b0;
    end else if (absorb) begin
      crc_q    <= crc_next;
      in_frame <= !eof;
    end
  end

  assign crc_32 = crc_q ^ XOROUT;

  // Framing rules: a new frame may only start once the previous one has
  // ended, and an end flag must belong to a frame.
  a_start_outside_frame : assert property (
    @(posedge clk) disable iff (reset) (enable && start) |-> !in_frame)
    else $error("start flagged inside a frame");
  a_eof_inside_frame : assert property (
    @(posedge clk) disable iff (reset) (enable && eof) |-> (start || in_frame))
    else $error("eof flagged outside a frame");

endmodule
