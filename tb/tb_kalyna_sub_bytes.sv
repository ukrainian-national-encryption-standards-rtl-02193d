// tb_kalyna_sub_bytes: random states through kalyna_sub_bytes for NB = 2, 4 and 8, each result
// compared with the behavioural model kalyna_ref_pkg::sub_ref.
module tb_kalyna_sub_bytes;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0][63:0] i2, o2;
  logic [3:0][63:0] i4, o4;
  logic [7:0][63:0] i8, o8;

  kalyna_sub_bytes #(.NB(2)) dut2 (.state_in(i2), .state_out(o2));
  kalyna_sub_bytes #(.NB(4)) dut4 (.state_in(i4), .state_out(o4));
  kalyna_sub_bytes #(.NB(8)) dut8 (.state_in(i8), .state_out(o8));

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
      e = sub_ref(st_t'(i2), 2);
      checks++; if (o2 !== e[127:0]) begin failures++; $display("FAIL nb2 %h -> %h exp %h", i2, o2, e[127:0]); end
      e = sub_ref(st_t'(i4), 4);
      checks++; if (o4 !== e[255:0]) begin failures++; $display("FAIL nb4 %h", i4); end
      e = sub_ref(st_t'(i8), 8);
      checks++; if (o8 !== e[511:0]) begin failures++; $display("FAIL nb8 %h", i8); end
    end
    
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
