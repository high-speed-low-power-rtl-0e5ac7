// tb_crc32_line_rate: runs the engine as in its intended use at 800 MHz (a
// 1.25 ns clock) and measures what the design claims: one 128-bit word per
// clock, so 102.4 Gbit/s, and a CRC that is ready 1.25 ns after the last
// word of a frame is offered.
//
// A continuous stream of 2000 words is cut into back-to-back frames of 1 to
// 16 words. The throughput is the number of data bits over the time between
// the first word offered and the last CRC ready. For every frame the time
// from offering its last word to crc_32 showing the expected value is
// measured, and crc_32 is checked not to change before the rising edge
// (half way through the cycle, when the input buffer has just taken the word).
// It also checks that the reference model gives 0xCBF53A1C for the bytes
// 31 32 33 34 35, the textbook Ethernet CRC-32 value.
module tb_crc32_line_rate;
  import crc32_ref_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime T_CLK = 1.25ns;
  localparam int      N_WORDS = 2000;

  logic         clk = 1'b0;
  logic         reset, start, eof, tables_ready;
  logic [127:0] data_in;
  logic [31:0]  crc_32;
  int checks = 0, failures = 0;

  crc32_fpga_top dut (
    .clk, .reset, .start, .eof, .data_in, .crc_32, .tables_ready,
    .tbl_we(1'b0), .tbl_sel(4'd0), .tbl_addr(8'd0), .tbl_wdata(32'd0)
  );

  always #(T_CLK / 2) clk = ~clk;

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

  initial begin
    logic [31:0] r, expected, crc_prev;
    realtime t_first, t_offer, t_ready, t_end;
    int sent, frames;
    real gbps;

    r = 32'hFFFF_FFFF;
    for (int b = 0; b < 5; b++) r = ref_byte(r, 8'h31 + 8'(b));
    check(~r == 32'hCBF5_3A1C, $sformatf("reference CRC of 31..35 is %h", ~r));

    reset = 1; start = 0; eof = 0; data_in = '0;
    repeat (3) @(posedge clk);
    #0.01ns reset = 0;
    wait (tables_ready);
    @(posedge clk); #0.01ns;

    t_first = $realtime;
    sent = 0;
    frames = 0;
    while (sent < N_WORDS) begin
      int n;
      n = 1 + $urandom % 16;
      if (n > N_WORDS - sent) n = N_WORDS - sent;
      r = 32'hFFFF_FFFF;
      for (int i = 0; i < n; i++) begin
        data_in = rand_word(); start = (i == 0); eof = (i == n - 1);
        r = ref_word(r, data_in);
        t_offer = $realtime;
        crc_prev  = crc_32;
        @(negedge clk); #0.01ns;
        check(crc_32 == crc_prev, "crc_32 stable until the rising edge");
        @(posedge clk);
        t_ready = $realtime;
        #0.01ns;
      end
      expected = ~r;
      check(crc_32 == expected, $sformatf("frame %0d crc %h expected %h", frames, crc_32, expected));
      check((t_ready - t_offer + 0.01ns - T_CLK) < 0.001ns &&
            (T_CLK - (t_ready - t_offer + 0.01ns)) < 0.001ns,
            $sformatf("latency %0.3f ns", t_ready - t_offer + 0.01ns));
      sent += n;
      frames++;
    end
    t_end = t_ready;
    gbps = (128.0 * N_WORDS) / ((t_end - t_first + 0.01ns) / 1ns);
    $display("words=%0d frames=%0d time=%0.3f ns throughput=%0.2f Gbit/s latency=%0.3f ns",
             N_WORDS, frames, t_end - t_first + 0.01ns, gbps, T_CLK);
    check(gbps > 102.39 && gbps < 102.41, $sformatf("throughput %0.2f Gbit/s", gbps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
