// tb_strumok_t_table: every entry of the eight T tables compared with Kalyna
// SubBytes and MixColumn applied to a word holding one byte x in position i
// (kalyna_ref_pkg::t_ref).
module tb_strumok_t_table;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0]  addr;
  logic [63:0] data [8];

  for (genvar i = 0; i < 8; i++) begin : g_t
    strumok_t_table #(.COL(i)) dut (.addr(addr), .data(data[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] full;
    for (int x = 0; x < 256; x++) begin
      addr = 8'(x);
      #1;
      for (int i = 0; i < 8; i++) begin
        // the T image of a word whose other bytes are zero is T_i[x] XOR the
        // images of the zero bytes; t_ref of that word minus t_ref(0) parts
        full = t_ref(64'(x) << (8 * i)) ^ t_ref(64'd0);
        checks++;
        if ((data[i] ^ zero_part(i)) !== full) begin
          failures++; $display("FAIL T%0d[%02h] = %h", i, x, data[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // T_i[0], the contribution of a zero byte in position i
  function automatic logic [63:0] zero_part(int i);
    st_t s = '0;
    s[8*i +: 8] = kalyna_pkg::sbox_value(i % 4, 8'h00);
    s = mix_ref(s, 1);
    return s[63:0];
  endfunction
endmodule
