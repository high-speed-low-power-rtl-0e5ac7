// tb_crc32_lut_ram: writes random words to random locations of one lookup
// table and reads every location back against a shadow copy; also checks
// that the read port is combinational and that a write with we low is lost.
module tb_crc32_lut_ram;

  logic        clk = 1'b0;
  logic        we;
  logic [7:0]  waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  crc32_lut_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    // fill every location
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = $urandom; shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    // random overwrites, and writes with we low that must be lost
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0; waddr = 8'($urandom); wdata = $urandom;
      if (we) shadow[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 256; a++) begin
      raddr = 8'(a);
      #1 check(rdata, shadow[a], $sformatf("read %0d", a));
    end
    // read-after-write in the same cycle sees the new word after the edge
    @(negedge clk);
    we = 1; waddr = 8'd77; wdata = 32'hA5A5_0F0F; raddr = 8'd77;
    @(posedge clk); #1 check(rdata, 32'hA5A5_0F0F, "read after write");
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
