// tb_crc32_table_gen: runs the table generator against a testbench memory
// and compares all 16 x 256 entries with the bit-by-bit reference. Also
// checks that every entry is written exactly once, that the run lasts the
// 6656 cycles the schedule implies (256*10 + 256*16), that done stays high,
// and that a second reset regenerates the tables.
module tb_crc32_table_gen;
  import crc32_pkg::*;
  import crc32_ref_pkg::*;

  localparam int GEN_CYCLES = 256 * 10 + 256 * 16;

  logic       clk = 1'b0;
  logic       reset;
  logic       busy, done, wr_en;
  logic [3:0] wr_sel;
  lut_addr_t  wr_addr, rd_addr;
  crc_t       wr_data, rd_data;
  crc_t       mem [16][256];
  int         wcount [16][256];
  int checks = 0, failures = 0;

  crc32_table_gen dut (.clk, .reset, .busy, .done, .wr_en, .wr_sel, .wr_addr,
                       .wr_data, .rd_addr, .rd_data);

  always #5 clk = ~clk;
  assign rd_data = mem[0][rd_addr];

  always @(posedge clk) if (wr_en) begin
    mem[wr_sel][wr_addr]    <= wr_data;
    wcount[wr_sel][wr_addr] <= wcount[wr_sel][wr_addr] + 1;
  end

  initial begin
    repeat (40000) @(posedge clk);
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

  task automatic run_and_check();
    int cycles;
    for (int t = 0; t < 16; t++)
      for (int a = 0; a < 256; a++) begin
        wcount[t][a] = 0;
        mem[t][a]    = 32'hDEAD_BEEF;
      end
    @(negedge clk) reset = 1;
    @(negedge clk) reset = 0;
    check(busy && !done, "busy after reset");
    cycles = 0;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == GEN_CYCLES, $sformatf("generation took %0d cycles, expected %0d",
                                          cycles, GEN_CYCLES));
    for (int t = 0; t < 16; t++)
      for (int a = 0; a < 256; a++) begin
        check(mem[t][a] == ref_table(t, a),
              $sformatf("T%0d[%0d] = %h, expected %h", t, a, mem[t][a], ref_table(t, a)));
        check(wcount[t][a] == 1, $sformatf("T%0d[%0d] written %0d times", t, a, wcount[t][a]));
      end
    repeat (20) @(posedge clk);
    #1 check(done && !busy && !wr_en, "done holds, no further writes");
  endtask

  initial begin
    reset = 1;
    repeat (3) @(posedge clk);
    // well-known entries of the Ethernet table
    run_and_check();
    check(mem[0][1] == 32'h7707_3096 && mem[0][255] == 32'h2D02_EF8D, "T0 known entries");
    // a second reset runs the generation again
    run_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
