// tb_crc32_input_buffer: checks that the buffer's outputs change only at the
// falling clock edge, carry the word and flags present at that edge, and
// that reset clears the flags.
module tb_crc32_input_buffer;

  logic         clk = 1'b0;
  logic         reset;
  logic [127:0] in_data, out_data;
  logic         in_start, in_eof, out_start, out_eof;
  int checks = 0, failures = 0;

  crc32_input_buffer dut (.clk, .reset, .in_data, .in_start, .in_eof,
                          .out_data, .out_start, .out_eof);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    logic [127:0] d;
    logic s, e;
    reset = 1; in_data = '0; in_start = 1; in_eof = 1;
    @(negedge clk); #1;
    check(!out_start && !out_eof, "reset clears flags");
    reset = 0;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      d = {$urandom, $urandom, $urandom, $urandom};
      s = 1'($urandom); e = 1'($urandom);
      in_data = d; in_start = s; in_eof = e;
      #2;  // still before the falling edge: outputs must be unchanged
      check(n == 0 || out_data !== d || d == '0, "no transfer before negedge");
      @(negedge clk); #1;
      check(out_data == d && out_start == s && out_eof == e,
            $sformatf("word %0d transferred at negedge", n));
      @(posedge clk); #1;
      check(out_data == d && out_start == s && out_eof == e, "held over posedge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
