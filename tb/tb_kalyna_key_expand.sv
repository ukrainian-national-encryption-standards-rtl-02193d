// tb_kalyna_key_expand: loads random keys for the five block/key sizes
// (128/128, 128/256, 256/256, 256/512, 512/512) and compares every round key
// with kalyna_ref_pkg::keys_ref2; also checks that key_ready
// rises exactly 3 + 2*(NR/2 + 1) cycles after key_load and that a new load
// in the middle of a schedule restarts it.
module tb_kalyna_key_expand;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                  ld2, ld4, ld8, rdy2, rdy4, rdy8, b2, b4, b8;
  logic [1:0][63:0]      k2;
  logic [3:0][63:0]      k4;
  logic [7:0][63:0]      k8;
  logic [10:0][1:0][63:0] rk2;
  logic [14:0][3:0][63:0] rk4;
  logic [18:0][7:0][63:0] rk8;
  // key twice the block
  logic                  ld24, ld48, rdy24, rdy48, b24, b48;
  logic [3:0][63:0]      k24;
  logic [7:0][63:0]      k48;
  logic [14:0][1:0][63:0] rk24;
  logic [18:0][3:0][63:0] rk48;

  kalyna_key_expand #(.NB(2)) dut2 (.clk, .rst_n, .key_load(ld2), .key(k2), .busy(b2), .key_ready(rdy2), .round_keys(rk2));
  kalyna_key_expand #(.NB(4)) dut4 (.clk, .rst_n, .key_load(ld4), .key(k4), .busy(b4), .key_ready(rdy4), .round_keys(rk4));
  kalyna_key_expand #(.NB(8)) dut8 (.clk, .rst_n, .key_load(ld8), .key(k8), .busy(b8), .key_ready(rdy8), .round_keys(rk8));
  kalyna_key_expand #(.NB(2), .NK(4)) dut24 (.clk, .rst_n, .key_load(ld24), .key(k24), .busy(b24), .key_ready(rdy24), .round_keys(rk24));
  kalyna_key_expand #(.NB(4), .NK(8)) dut48 (.clk, .rst_n, .key_load(ld48), .key(k48), .busy(b48), .key_ready(rdy48), .round_keys(rk48));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ready_of(int nb, int nk);
    if (nk != nb) return (nb == 2) ? rdy24 : rdy48;
    return (nb == 2) ? rdy2 : (nb == 4) ? rdy4 : rdy8;
  endfunction

  function automatic st_t key_of(int nb, int nk, int i);
    if (nk != nb) return (nb == 2) ? st_t'(rk24[i]) : st_t'(rk48[i]);
    return (nb == 2) ? st_t'(rk2[i]) : (nb == 4) ? st_t'(rk4[i]) : st_t'(rk8[i]);
  endfunction

  task automatic pulse(int nb, int nk, st_t key);
    @(negedge clk);
    k2 = key[127:0]; k4 = key[255:0]; k8 = key; k24 = key[255:0]; k48 = key;
    ld2  = (nb == 2 && nk == 2); ld4 = (nb == 4 && nk == 4); ld8 = (nb == 8);
    ld24 = (nb == 2 && nk == 4); ld48 = (nb == 4 && nk == 8);
    @(negedge clk); ld2 = 0; ld4 = 0; ld8 = 0; ld24 = 0; ld48 = 0;
  endtask

  task automatic run(int nb, int nk, bit abort_first);
    rk_t e;
    st_t key;
    int  cyc, nr;
    nr  = nr_of(nk);
    key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    key = key & ({512{1'b1}} >> (512 - 64 * nk));
    if (abort_first) begin
      // start a schedule with a different key and interrupt it
      pulse(nb, nk, ~key);
      repeat (4) @(negedge clk);
    end
    pulse(nb, nk, key);
    cyc = 0;
    while (!ready_of(nb, nk)) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 3 + 2 * (nr / 2 + 1)) begin
      failures++; $display("FAIL nb=%0d nk=%0d key_ready after %0d cycles", nb, nk, cyc);
    end
    e = keys_ref2(key, nb, nk);
    for (int i = 0; i <= nr; i++) begin
      st_t got;
      got = key_of(nb, nk, i);
      checks++;
      if (got !== e[i]) begin
        failures++; $display("FAIL nb=%0d nk=%0d K%0d got %h exp %h", nb, nk, i, got, e[i]);
      end
    end
  endtask

  initial begin
    ld2 = 0; ld4 = 0; ld8 = 0; ld24 = 0; ld48 = 0;
    k2 = '0; k4 = '0; k8 = '0; k24 = '0; k48 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin
      run(2, 2, n == 1);
      run(2, 4, n == 2);
      run(4, 4, n == 3);
      run(4, 8, n == 0);
      run(8, 8, n == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
