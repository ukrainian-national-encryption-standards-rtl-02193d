// tb_kalyna_sbox_row: exhaustive check of the four row ROMs (NB = 2) against
// kalyna_pkg::sbox_value, plus bijectivity of each table and the sample
// entry pi_1(0x11) = 0x15.
module tb_kalyna_sbox_row;
  int checks = 0, failures = 0;
  logic [1:0][7:0] in;
  logic [1:0][7:0] out [4];
  int hits [4][256];

  for (genvar m = 0; m < 4; m++) begin : g_m
    kalyna_sbox_row #(.M(m), .NB(2)) dut (.in(in), .out(out[m]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int v = 0; v < 256; v++) hits[m][v] = 0;
    for (int x = 0; x < 256; x++) begin
      in[0] = 8'(x);
      in[1] = 8'(255 - x);
      #1;
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (out[m][0] !== kalyna_pkg::sbox_value(m, 8'(x)) ||
            out[m][1] !== kalyna_pkg::sbox_value(m, 8'(255 - x))) begin
          failures++;
          $display("FAIL m=%0d x=%02h got %02h/%02h", m, x, out[m][0], out[m][1]);
        end
        hits[m][int'(out[m][0])] += 1;
      end
      if (x == 8'h11) begin
        checks++;
        if (out[1][0] !== 8'h15) begin failures++; $display("FAIL pi1(11)=%02h", out[1][0]); end
      end
    end
    for (int m = 0; m < 4; m++) begin
      int cnt;
      cnt = 0;
      for (int v = 0; v < 256; v++) if (hits[m][v] == 1) cnt++;
      checks++;
      if (cnt != 256) begin failures++; $display("FAIL table %0d is not a permutation", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
