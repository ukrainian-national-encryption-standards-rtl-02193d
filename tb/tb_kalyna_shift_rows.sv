// tb_kalyna_shift_rows: random states through kalyna_shift_rows for NB = 2, 4 and 8, each result
// compared with the behavioural model kalyna_ref_pkg::shift_ref,
// plus the 128-bit layout drawn for ShiftRows (w12 moves to row 4, column 0).
module tb_kalyna_shift_rows;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0][63:0] i2, o2;
  logic [3:0][63:0] i4, o4;
  logic [7:0][63:0] i8, o8;

  kalyna_shift_rows #(.NB(2)) dut2 (.state_in(i2), .state_out(o2));
  kalyna_shift_rows #(.NB(4)) dut4 (.state_in(i4), .state_out(o4));
  kalyna_shift_rows #(.NB(8)) dut8 (.state_in(i8), .state_out(o8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t e;
    for (int n = 0; n < 200; n++) begin
      for (int c = 0; c < 8; c++) begin
        i8[c] = {$urandom, $urandom};
        if (c < 4) i4[c] = {$urandom, $urandom};
        if (c < 2) i2[c] = {$urandom, $urandom};
      end
      #1;
      e = shift_ref(st_t'(i2), 2);
      checks++; if (o2 !== e[127:0]) begin failures++; $display("FAIL nb2 %h -> %h exp %h", i2, o2, e[127:0]); end
      e = shift_ref(st_t'(i4), 4);
      checks++; if (o4 !== e[255:0]) begin failures++; $display("FAIL nb4 %h", i4); end
      e = shift_ref(st_t'(i8), 8);
      checks++; if (o8 !== e[511:0]) begin failures++; $display("FAIL nb8 %h", i8); end
    end
    // Fig. 6a: after the shift of a 128-bit block, row 4 column 0 holds w12
    for (int k = 0; k < 16; k++) i2[k / 8][8*(k % 8) +: 8] = 8'(k);
    #1;
    checks++;
    if (o2[0][39:32] !== 8'd12 || o2[1][39:32] !== 8'd4 || o2[0][31:24] !== 8'd3) begin
      failures++; $display("FAIL figure 6a layout %h", o2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
