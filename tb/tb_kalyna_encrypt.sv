// tb_kalyna_encrypt: random round keys and plaintexts for NB = 2 and 8;
// each ciphertext is compared with kalyna_ref_pkg::encrypt_ref and done must
// come exactly NR cycles after start. A start while busy must be ignored.
module tb_kalyna_encrypt;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   st2, st8, busy2, busy8, done2, done8;
  logic [1:0][63:0]       p2, c2;
  logic [7:0][63:0]       p8, c8;
  logic [10:0][1:0][63:0] rk2;
  logic [18:0][7:0][63:0] rk8;

  kalyna_encrypt #(.NB(2)) dut2 (.clk, .rst_n, .start(st2), .block_in(p2), .round_keys(rk2), .busy(busy2), .done(done2), .block_out(c2));
  kalyna_encrypt #(.NB(8)) dut8 (.clk, .rst_n, .start(st8), .block_in(p8), .round_keys(rk8), .busy(busy8), .done(done8), .block_out(c8));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nb);
    rk_t k;
    st_t p, e, got;
    int  cyc, nr;
    nr = nr_of(nb);
    for (int i = 0; i < 19; i++)
      k[i] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
              $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
         $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    p = p & ({512{1'b1}} >> (512 - 64 * nb));
    for (int i = 0; i < 19; i++) k[i] = k[i] & ({512{1'b1}} >> (512 - 64 * nb));
    for (int i = 0; i <= 10; i++) rk2[i] = k[i][127:0];
    for (int i = 0; i <= 18; i++) rk8[i] = k[i];
    @(negedge clk);
    p2 = p[127:0]; p8 = p;
    st2 = (nb == 2); st8 = (nb == 8);
    @(negedge clk);
    // a second start while busy, with other data, must be ignored
    p2 = ~p2; p8 = ~p8;
    cyc = 0;
    while (!((nb == 2) ? done2 : done8)) begin @(negedge clk); cyc++; end
    st2 = 0; st8 = 0;
    checks++;
    if (cyc != nr) begin failures++; $display("FAIL nb=%0d done after %0d cycles", nb, cyc); end
    e   = encrypt_ref(p, k, nb);
    got = (nb == 2) ? st_t'(c2) : st_t'(c8);
    checks++;
    if (got !== e) begin
      failures++; $display("FAIL nb=%0d got %h exp %h", nb, got, e);
    end
    // start was dropped with done: the datapath must be idle again
    @(negedge clk);
    checks++;
    if (busy2 || busy8) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    st2 = 0; st8 = 0; p2 = '0; p8 = '0; rk2 = '0; rk8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      run(2);
      run(8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
