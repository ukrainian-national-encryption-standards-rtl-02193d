// tb_strumok_alpha_mul: alpha * w is compared with polynomial multiplication
// by z modulo g(z) (kalyna_ref_pkg::mulz), alpha^-1 * w with the solution v of
// v * z = w (divz), and the two multipliers must undo each other.
module tb_strumok_alpha_mul;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] w, pa, pi, back;

  strumok_alpha_mul #(.INVERSE(1'b0)) dut_a  (.w(w),  .p(pa));
  strumok_alpha_mul #(.INVERSE(1'b1)) dut_i  (.w(w),  .p(pi));
  strumok_alpha_mul #(.INVERSE(1'b1)) dut_ai (.w(pa), .p(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      w = (n < 8) ? (64'hff << (8 * n)) : {$urandom, $urandom};
      #1;
      checks++;
      if (pa !== mulz(w)) begin failures++; $display("FAIL alpha*%h = %h exp %h", w, pa, mulz(w)); end
      checks++;
      if (pi !== divz(w)) begin failures++; $display("FAIL alpha^-1*%h = %h exp %h", w, pi, divz(w)); end
      checks++;
      if (back !== w) begin failures++; $display("FAIL alpha^-1*alpha*%h = %h", w, back); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
