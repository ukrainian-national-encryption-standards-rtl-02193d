// tb_kalyna_core: key load, then a stream of blocks offered back to back with
// random gaps, for the default core (128-bit block) and a 256-bit one.
// Ciphertexts are checked against kalyna_ref_pkg (key schedule and
// encryption models), in_ready must stay low while keys are being made, and
// the core is re-keyed between bursts. A monitor checks that every out_valid
// answers a block accepted with in_valid and in_ready.
module tb_kalyna_core;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             kl2, kr2, iv2, ir2, ov2;
  logic [1:0][63:0] k2, b2, o2;
  logic             kl4, kr4, iv4, ir4, ov4;
  logic [3:0][63:0] k4, b4, o4;

  kalyna_core dut2 (.clk, .rst_n, .key_load(kl2), .key(k2), .key_ready(kr2),
                    .in_valid(iv2), .in_ready(ir2), .block_in(b2), .out_valid(ov2), .block_out(o2));
  kalyna_core #(.NB(4)) dut4 (.clk, .rst_n, .key_load(kl4), .key(k4), .key_ready(kr4),
                    .in_valid(iv4), .in_ready(ir4), .block_in(b4), .out_valid(ov4), .block_out(o4));

  // every out_valid must answer a block that was handed over with in_ready
  int outstanding2 = 0, outstanding4 = 0;
  always @(posedge clk) if (rst_n) begin
    if (ov2) begin
      checks++;
      if (outstanding2 == 0 && !(iv2 && ir2)) begin failures++; $display("FAIL nb=2 out_valid without a block"); end
    end
    if (ov4) begin
      checks++;
      if (outstanding4 == 0 && !(iv4 && ir4)) begin failures++; $display("FAIL nb=4 out_valid without a block"); end
    end
    outstanding2 <= outstanding2 + int'(iv2 && ir2) - int'(ov2);
    outstanding4 <= outstanding4 + int'(iv4 && ir4) - int'(ov4);
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic st_t rnd_block(int nb);
    st_t v = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
              $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    return v & ({512{1'b1}} >> (512 - 64 * nb));
  endfunction

  task automatic burst(int nb, int blocks);
    st_t key, p, e, got;
    rk_t rk;
    key = rnd_block(nb);
    rk  = keys_ref(key, nb);
    @(negedge clk);
    if (nb == 2) begin k2 = key[127:0]; kl2 = 1; end else begin k4 = key[255:0]; kl4 = 1; end
    @(negedge clk);
    kl2 = 0; kl4 = 0;
    checks++;
    if ((nb == 2) ? ir2 : ir4) begin failures++; $display("FAIL nb=%0d in_ready during key schedule", nb); end
    for (int n = 0; n < blocks; n++) begin
      p = rnd_block(nb);
      if (nb == 2) begin b2 = p[127:0]; iv2 = 1; end else begin b4 = p[255:0]; iv4 = 1; end
      // wait for the handshake
      do @(posedge clk); while (!((nb == 2) ? ir2 : ir4));
      @(negedge clk);
      iv2 = 0; iv4 = 0;
      while (!((nb == 2) ? ov2 : ov4)) @(negedge clk);
      e   = encrypt_ref(p, rk, nb);
      got = (nb == 2) ? st_t'(o2) : st_t'(o4);
      checks++;
      if (got !== e) begin failures++; $display("FAIL nb=%0d block %0d got %h exp %h", nb, n, got, e); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  initial begin
    kl2 = 0; kl4 = 0; iv2 = 0; iv4 = 0; k2 = '0; k4 = '0; b2 = '0; b4 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      burst(2, 8);
      burst(4, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
