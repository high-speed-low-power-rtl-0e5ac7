// crc32_input_buffer: 128-bit input buffer of the CRC-32 engine.
//
// The buffer takes one 16-byte data word and its frame flags (start, eof) and
// hands them to the processor on the falling edge of clk. The processor's
// lookups and XOR tree then settle in the second half of the cycle and its
// CRC register loads on the next rising edge, so a word offered at a rising
// edge is absorbed half a cycle after it is buffered and one full cycle
// after it is offered. The falling-edge transfer follows the document; the
// synchronous reset, which clears the two flags, is this design's choice.
//
// Ports
//   in_data/in_start/in_eof    : word and flags from the data stream
//   out_data/out_start/out_eof : registered copy (changes at negedge clk)
module crc32_input_buffer #(
  parameter int unsigned DATA_W = 128
) (
  input  logic              clk,
  input  logic              reset,   // synchronous, active high
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_start,
  input  logic              in_eof,
  output logic [DATA_W-1:0] out_data,
  output logic              out_start,
  output logic              out_eof
);

  always_ff @(negedge clk) begin
    out_data <= in_data;
    if (reset) begin
      out_start <= 1'b0;
      out_eof   <= 1'b0;
    end else begin
      out_start <= in_start;
      out_eof   <= in_eof;
    end
  end

endmodule
