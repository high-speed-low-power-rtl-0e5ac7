// tb_crc32_lut_bank: fills all sixteen tables with distinct random words
// through the shared write port, then reads all tables in the same cycle at
// independent addresses and checks each against a shadow copy, so a write
// landing in the wrong table or a crossed read port is caught.
module tb_crc32_lut_bank;
  import crc32_pkg::*;

  logic       clk = 1'b0;
  logic       we;
  logic [3:0] sel;
  lut_addr_t  waddr;
  crc_t       wdata;
  lut_addr_t  raddr [16];
  crc_t       rdata [16];
  crc_t       shadow [16][256];
  int checks = 0, failures = 0;

  crc32_lut_bank dut (.clk, .we, .sel, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; sel = 0; waddr = 0; wdata = 0;
    for (int t = 0; t < 16; t++) raddr[t] = '0;
    for (int t = 0; t < 16; t++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        we = 1; sel = 4'(t); waddr = 8'(a); wdata = $urandom; shadow[t][a] = wdata;
      end
    @(negedge clk) we = 0;
    for (int n = 0; n < 300; n++) begin
      for (int t = 0; t < 16; t++) raddr[t] = 8'($urandom);
      #1;
      for (int t = 0; t < 16; t++) begin
        checks++;
        if (rdata[t] !== shadow[t][raddr[t]]) begin
          failures++;
          $display("FAIL table %0d addr %0d: got %h expected %h",
                   t, raddr[t], rdata[t], shadow[t][raddr[t]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
