// tb_dstu_dp_ram: writes random words on one clock and reads them back on an
// unrelated clock, checking the one-cycle read latency and that unwritten
// words read as zero; cycles with wr_en low must not write. A scoreboard
// array holds the expected contents.
module tb_dstu_dp_ram;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0;
  always #2.5 wclk = ~wclk;
  always #10  rclk = ~rclk;

  logic        wr_en;
  logic [3:0]  wr_addr, rd_addr;
  logic [63:0] wr_data, rd_data;
  logic [63:0] model [16];

  dstu_dp_ram #(.WIDTH(64), .DEPTH(16)) dut (
    .wr_clk(wclk), .wr_en, .wr_addr, .wr_data, .rd_clk(rclk), .rd_addr, .rd_data
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    for (int pass = 0; pass < 4; pass++) begin
      // write a random subset of addresses
      for (int n = 0; n < 12; n++) begin
        @(negedge wclk);
        wr_en   = 1;
        wr_addr = 4'($urandom);
        wr_data = {$urandom, $urandom};
        model[wr_addr] = wr_data;
      end
      // idle cycles with wr_en low and changing address/data must not write
      for (int n = 0; n < 8; n++) begin
        @(negedge wclk);
        wr_en   = 0;
        wr_addr = 4'($urandom);
        wr_data = {$urandom, $urandom};
      end
      // read everything back
      for (int a = 0; a < 16; a++) begin
        @(negedge rclk);
        rd_addr = 4'(a);
        @(negedge rclk);
        checks++;
        if (rd_data !== model[a]) begin failures++; $display("FAIL addr %0d: %h exp %h", a, rd_data, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
