// tb_strumok_t: the nonlinear function on random and edge words compared
// with Kalyna SubBytes + MixColumn on one column (kalyna_ref_pkg::t_ref).
module tb_strumok_t;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] w, t;

  strumok_t dut (.w, .t);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      w = (n == 0) ? 64'd0 : (n == 1) ? '1 : {$urandom, $urandom};
      #1;
      checks++;
      if (t !== t_ref(w)) begin failures++; $display("FAIL T(%h) = %h exp %h", w, t, t_ref(w)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
