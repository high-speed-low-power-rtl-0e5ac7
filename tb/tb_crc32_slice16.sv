// tb_crc32_slice16: drives the slicing-by-16 processor with random frames of
// 1 to 8 words, one word per clock, and compares crc_32 after every word with
// a bit-by-bit CRC-32 of the bytes so far. The tables seen by the processor
// are filled from the reference model. Also covered: idle gaps (register
// holds), frames back to back with no idle cycle, single-word frames,
// enable low (words ignored), reset in mid-frame, and the receiver check
// that a frame followed by its own FCS leaves the fixed residue 0x2144DF1C.
module tb_crc32_slice16;
  import crc32_pkg::*;
  import crc32_ref_pkg::*;

  logic         clk = 1'b0;
  logic         reset, enable, start, eof;
  logic [127:0] data;
  lut_addr_t    lut_addr [16];
  crc_t         lut_data [16];
  crc_t         crc_32;
  crc_t         tables [16][256];
  int checks = 0, failures = 0;
  int words = 0, frames = 0, cycles = 0;

  crc32_slice16 dut (.clk, .reset, .enable, .data, .start, .eof, .lut_addr,
                     .lut_data, .crc_32);

  always #5 clk = ~clk;
  always_comb for (int t = 0; t < 16; t++) lut_data[t] = tables[t][lut_addr[t]];
  always @(posedge clk) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One frame of n words; returns the final CRC (complemented remainder).
  task automatic send_frame(input int n, output crc_t fcs);
    crc_t r = 32'hFFFF_FFFF;
    int c0;
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      if (w == 0) c0 = cycles;
      data = rand_word(); start = (w == 0); eof = (w == n - 1);
      r = ref_word(r, data);
      @(posedge clk); #1;
      check(crc_32 == ~r, $sformatf("frame %0d word %0d: crc %h expected %h",
                                    frames, w, crc_32, ~r));
      words++;
    end
    check(cycles - c0 == n, "one word per clock");
    fcs = ~r;
    frames++;
  endtask

  initial begin
    crc_t fcs, held;
    crc_t r;
    for (int t = 0; t < 16; t++)
      for (int a = 0; a < 256; a++) tables[t][a] = ref_table(t, a);
    reset = 1; enable = 1; start = 0; eof = 0; data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    #1 check(crc_32 == 32'h0, "reset value");

    // random frames, some back to back, some with idle gaps
    for (int f = 0; f < 60; f++) begin
      send_frame(1 + $urandom % 8, fcs);
      if (($urandom % 2) != 0) begin
        @(negedge clk) start = 0; eof = 0; data = rand_word();
        held = crc_32;
        repeat (1 + $urandom % 3) @(posedge clk);
        #1 check(crc_32 == held, "holds between frames");
      end
    end

    // enable low: words are ignored
    @(negedge clk) start = 0; eof = 0;
    held = crc_32;
    @(negedge clk) enable = 0; start = 1; eof = 1; data = rand_word();
    @(posedge clk); #1 check(crc_32 == held, "ignored while enable low");
    @(negedge clk) enable = 1; start = 0; eof = 0;

    // reset in mid-frame, then a clean frame
    @(negedge clk) start = 1; eof = 0; data = rand_word();
    @(negedge clk) start = 0; data = rand_word();
    @(negedge clk) reset = 1; start = 0;
    @(posedge clk); #1 check(crc_32 == 32'h0, "reset mid-frame");
    @(negedge clk) reset = 0; data = rand_word();
    @(posedge clk); #1 check(crc_32 == 32'h0, "no frame after reset until start");
    send_frame(3, fcs);

    // receiver check: 3 words of data + a 4th word ending in the FCS
    begin
      logic [127:0] w [4];
      r = 32'hFFFF_FFFF;
      for (int i = 0; i < 3; i++) begin w[i] = rand_word(); r = ref_word(r, w[i]); end
      w[3] = rand_word();
      // FCS goes in the last 4 bytes, least significant byte first
      for (int b = 0; b < 12; b++) r = ref_byte(r, w[3][8*b +: 8]);
      w[3][127:96] = ~r;
      for (int i = 0; i < 4; i++) begin
        @(negedge clk) data = w[i]; start = (i == 0); eof = (i == 3);
      end
      @(posedge clk); #1;
      check(crc_32 == 32'h2144_DF1C, $sformatf("receiver residue %h", crc_32));
      @(negedge clk) start = 0; eof = 0;
    end
    $display("words=%0d frames=%0d", words, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
