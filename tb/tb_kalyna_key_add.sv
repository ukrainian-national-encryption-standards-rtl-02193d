// tb_kalyna_key_add: both key operations on random and carry-edge values:
// modulo-2^64 addition must not carry between columns.
module tb_kalyna_key_add;
  int checks = 0, failures = 0;
  kalyna_pkg::key_op_e op;
  logic [1:0][63:0] a, k, o;

  kalyna_key_add #(.NB(2)) dut (.op, .state_in(a), .key(k), .state_out(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      if (n == 0) begin a = '1; k = {64'd0, 64'd1}; end
      op = (n % 2 == 0) ? kalyna_pkg::KEY_ADD : kalyna_pkg::KEY_XOR;
      #1;
      checks++;
      if (op == kalyna_pkg::KEY_ADD) begin
        if (o[0] !== 64'(a[0] + k[0]) || o[1] !== 64'(a[1] + k[1])) begin
          failures++; $display("FAIL add %h + %h = %h", a, k, o);
        end
      end else if (o !== (a ^ k)) begin
        failures++; $display("FAIL xor");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
