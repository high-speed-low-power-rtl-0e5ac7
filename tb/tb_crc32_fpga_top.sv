// tb_crc32_fpga_top: end-to-end test of the CRC-32 engine at its default
// size (16 tables, 128-bit words).
//
// After reset the engine builds its own tables; the test waits for
// tables_ready, checks that it took 6656 cycles, and then streams Ethernet
// frames through it, one 128-bit word per clock, offering each word just
// after a rising edge and checking crc_32 one clock later against a
// bit-by-bit reference. Each mechanism of the design is exercised and
// counted, and a mechanism that never happened counts as a failure:
//   generation    table generation after reset
//   early         words offered before tables_ready are ignored
//   gen_write     host table writes during generation are dropped
//   single        one-word frames (start and eof on the same word)
//   multi         multi-word frames
//   back_to_back  a frame starting in the clock after the previous eof
//   idle_hold     crc_32 holding its value between frames
//   host_write    a host write into a table changes the CRC; restoring
//                 the entry restores it
//   residue       receiver check: frame plus its FCS gives 0x2144DF1C
//   error_found   a corrupted frame fails the receiver check
//   mid_reset     reset in mid-frame, followed by regeneration
module tb_crc32_fpga_top;
  import crc32_ref_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int GEN_CYCLES = 256 * 10 + 256 * 16;

  logic         clk = 1'b0;
  logic         reset, start, eof, tables_ready;
  logic [127:0] data_in;
  logic [31:0]  crc_32;
  logic         tbl_we;
  logic [3:0]   tbl_sel;
  logic [7:0]   tbl_addr;
  logic [31:0]  tbl_wdata;

  int checks = 0, failures = 0;
  int n_generation = 0, n_early = 0, n_gen_write = 0, n_single = 0, n_multi = 0;
  int n_back_to_back = 0, n_idle_hold = 0, n_host_write = 0, n_residue = 0;
  int n_error_found = 0, n_mid_reset = 0;
  int bytes_done = 0;

  crc32_fpga_top dut (
    .clk, .reset, .start, .eof, .data_in, .crc_32, .tables_ready,
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_wdata
  );

  always #0.625ns clk = ~clk;   // 800 MHz

  initial begin
    repeat (60000) @(posedge clk);
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

  task automatic idle();
    start = 0; eof = 0; data_in = rand_word();
  endtask

  // Reset, then wait for the tables; checks the generation time.
  task automatic reset_and_generate();
    int cycles = 0;
    @(posedge clk); #0.1ns;
    reset = 1; idle();
    @(posedge clk); #0.1ns;
    reset = 0;
    // a frame offered during generation must have no effect
    start = 1; eof = 1; data_in = rand_word();
    @(posedge clk); #0.1ns;
    cycles++;
    idle();
    check(crc_32 == 32'h0, "word before tables_ready ignored");
    n_early++;
    while (!tables_ready) begin
      // a host write after T0 is complete must be dropped, or T0 and every
      // table derived after it would be wrong
      tbl_we = (cycles == 3000);
      tbl_sel = 4'd0; tbl_addr = 8'd5; tbl_wdata = 32'h0;
      @(posedge clk); #0.1ns;
      cycles++;
    end
    tbl_we = 0;
    check(cycles == GEN_CYCLES, $sformatf("tables ready after %0d cycles", cycles));
    n_generation++;
    n_gen_write++;   // checked by the CRC results that follow
  endtask

  // Streams one frame of n words; the CRC is checked after each word.
  // Returns the final running remainder through r.
  task automatic send_words(input logic [127:0] w [], inout logic [31:0] r,
                            input bit verify = 1);
    for (int i = 0; i < w.size(); i++) begin
      start = (i == 0); eof = (i == w.size() - 1); data_in = w[i];
      r = ref_word(r, w[i]);
      @(posedge clk); #0.1ns;
      if (verify) check(crc_32 == ~r, $sformatf("crc %h expected %h", crc_32, ~r));
    end
    idle();
    bytes_done += 16 * w.size();
  endtask

  task automatic random_frame(input int n, output logic [31:0] fcs);
    logic [127:0] w [];
    logic [31:0]  r = 32'hFFFF_FFFF;
    w = new[n];
    foreach (w[i]) w[i] = rand_word();
    send_words(w, r);
    fcs = ~r;
    if (n == 1) n_single++; else n_multi++;
  endtask

  // A frame of n words whose last 4 bytes are the FCS of the rest.
  task automatic receiver_frame(input int n, input bit corrupt);
    logic [127:0] w [];
    logic [31:0]  r = 32'hFFFF_FFFF;
    w = new[n];
    foreach (w[i]) w[i] = rand_word();
    for (int i = 0; i < n - 1; i++) r = ref_word(r, w[i]);
    for (int b = 0; b < 12; b++) r = ref_byte(r, w[n-1][8*b +: 8]);
    w[n-1][127:96] = ~r;
    if (corrupt) w[$urandom % n][$urandom % 128] ^= 1'b1;
    r = 32'hFFFF_FFFF;
    send_words(w, r, 0);
    if (corrupt) begin
      check(crc_32 != 32'h2144_DF1C, "corrupted frame detected");
      n_error_found++;
    end else begin
      check(crc_32 == 32'h2144_DF1C, $sformatf("receiver residue %h", crc_32));
      n_residue++;
    end
  endtask

  initial begin
    logic [31:0] fcs, held, good;
    logic [127:0] w [];
    logic [31:0] r;
    reset = 1; tbl_we = 0; tbl_sel = 0; tbl_addr = 0; tbl_wdata = 0; idle();
    repeat (3) @(posedge clk);
    reset_and_generate();

    // random frames: sizes from one word to a maximum Ethernet frame
    for (int f = 0; f < 40; f++) begin
      int n;
      case (f % 4)
        0: n = 1;
        1: n = 4;                    // 64 bytes, minimum Ethernet frame
        2: n = 2 + $urandom % 10;
        default: n = 94;             // 1504 bytes, near the maximum
      endcase
      random_frame(n, fcs);
      if (f % 3 == 0) begin
        held = crc_32;
        repeat (1 + $urandom % 4) @(posedge clk);
        #0.1ns check(crc_32 == held, "holds between frames");
        n_idle_hold++;
      end else n_back_to_back++;
    end

    // the same 48-byte frame, with a table entry overwritten by the host
    w = new[3];
    foreach (w[i]) w[i] = rand_word();
    r = 32'hFFFF_FFFF;
    send_words(w, r);
    good = crc_32;
    // T0 is addressed by byte 15 of the last word
    tbl_we = 1; tbl_sel = 4'd0; tbl_addr = w[2][127:120]; tbl_wdata = 32'h1234_5678;
    @(posedge clk); #0.1ns tbl_we = 0;
    r = 32'hFFFF_FFFF;
    send_words(w, r, 0);
    check(crc_32 != good, "overwritten table entry changes the CRC");
    tbl_we = 1; tbl_wdata = ref_table(0, int'(w[2][127:120]));
    @(posedge clk); #0.1ns tbl_we = 0;
    r = 32'hFFFF_FFFF;
    send_words(w, r);
    check(crc_32 == good, "restored table entry restores the CRC");
    n_host_write++;

    // receiver check on minimum and larger frames, intact and corrupted
    for (int f = 0; f < 8; f++) begin
      receiver_frame((f % 2 != 0) ? 4 : 2 + $urandom % 20, 0);
      receiver_frame(4, 1);
    end

    // reset in mid-frame, then regenerate and run a frame
    w = new[2];
    foreach (w[i]) w[i] = rand_word();
    start = 1; eof = 0; data_in = w[0];
    @(posedge clk); #0.1ns;
    start = 0; data_in = w[1];
    reset_and_generate();
    check(crc_32 == 32'h0, "reset value after mid-frame reset");
    n_mid_reset++;
    random_frame(5, fcs);

    $display("bytes=%0d generation=%0d early=%0d gen_write=%0d single=%0d multi=%0d",
             bytes_done, n_generation, n_early, n_gen_write, n_single, n_multi);
    $display("back_to_back=%0d idle_hold=%0d host_write=%0d residue=%0d error_found=%0d mid_reset=%0d",
             n_back_to_back, n_idle_hold, n_host_write, n_residue, n_error_found, n_mid_reset);
    check(n_generation > 0 && n_early > 0 && n_gen_write > 0 && n_single > 0 &&
          n_multi > 0 && n_back_to_back > 0 && n_idle_hold > 0 && n_host_write > 0 &&
          n_residue > 0 && n_error_found > 0 && n_mid_reset > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
