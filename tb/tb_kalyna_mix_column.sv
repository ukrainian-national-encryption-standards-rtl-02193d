// tb_kalyna_mix_column: unit columns must reproduce the MDS matrix columns
// of the printed matrix; random columns are compared with the reference.
module tb_kalyna_mix_column;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] col_in, col_out;

  kalyna_mix_column dut (.col_in, .col_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_t e;
    for (int b = 0; b < 8; b++) begin
      col_in = 64'h01 << (8 * b);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (col_out[8*r +: 8] !== MDS[r][b]) begin
          failures++; $display("FAIL unit col %0d row %0d: %02h", b, r, col_out[8*r +: 8]);
        end
      end
    end
    for (int n = 0; n < 500; n++) begin
      col_in = {$urandom, $urandom};
      #1;
      e = mix_ref(st_t'(col_in), 1);
      checks++;
      if (col_out !== e[63:0]) begin failures++; $display("FAIL %h -> %h exp %h", col_in, col_out, e[63:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
