// tb_kalyna_gf_mul: all 256 inputs of the multiplier bank compared with
// carry-less products reduced by 0x11d (kalyna_ref_pkg::gmul).
module tb_kalyna_gf_mul;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] x, x4, x5, x6, x7, x8;

  kalyna_gf_mul dut (.x, .x4, .x5, .x6, .x7, .x8);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      checks++;
      if (x4 !== gmul(x, 8'h04) || x5 !== gmul(x, 8'h05) || x6 !== gmul(x, 8'h06) ||
          x7 !== gmul(x, 8'h07) || x8 !== gmul(x, 8'h08)) begin
        failures++;
        $display("FAIL x=%02h: %02h %02h %02h %02h %02h", x, x4, x5, x6, x7, x8);
      end
    end
    // 0x80 * 2 = 0x1d folded back: 0x80 * 4 = 0x3a
    checks++;
    x = 8'h80; #1;
    if (x4 !== 8'h3a) begin failures++; $display("FAIL 80*4=%02h", x4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
