// tb_dstu_crypto_top: end-to-end test of the whole FPGA-side system at its
// default parameters (128-bit block cipher, 256-word result RAM).
//
// Acting as the host on the 50 MHz bus clock, it starts jobs, waits for the
// returning done pulse and reads the results out of the RAM; acting as the
// data source on the 200 MHz core clock, it feeds plaintext with random gaps.
// Every word read back is compared with the reference models. The test
// counts each mechanism it relies on and fails if one never happened:
// block-cipher jobs, keystream jobs, re-keying between jobs, stalls of the
// plaintext stream, start/done crossings between the clocks, and RAM reads.
module tb_dstu_crypto_top;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_kalyna = 0, n_strumok = 0, n_rekey = 0, n_stall = 0, n_cross = 0, n_reads = 0;

  logic clk_core = 0, clk_bus = 0, rst_n = 0;
  always #2.5 clk_core = ~clk_core;   // 200 MHz
  always #10  clk_bus  = ~clk_bus;    // 50 MHz

  logic              bus_cmd_start, bus_cmd_mode, bus_cmd_done, bus_busy;
  logic [15:0]       bus_cmd_count;
  logic [7:0]        bus_rd_addr;
  logic [63:0]       bus_rd_data;
  logic [1:0][63:0]  kalyna_key, data_block;
  logic              data_valid, data_ready, core_busy;
  logic [15:0][63:0] strumok_init_state;
  strumok_pkg::mode_e strumok_mode;

  dstu_crypto_top dut (
    .clk_core, .clk_bus, .rst_n,
    .bus_cmd_start, .bus_cmd_mode, .bus_cmd_count, .bus_cmd_done, .bus_busy,
    .bus_rd_addr, .bus_rd_data,
    .kalyna_key, .data_valid, .data_ready, .data_block, .strumok_init_state,
    .core_busy, .strumok_mode
  );

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- data source on the core clock -----------------------------------------
  st_t plain [128];
  int  to_send = 0, sent = 0;
  always @(negedge clk_core) begin
    if (sent < to_send) begin
      data_valid <= ($urandom_range(0, 3) != 0);
      data_block <= plain[sent][127:0];
    end else begin
      data_valid <= 1'b0;
    end
  end
  always @(posedge clk_core) begin
    if (data_valid && data_ready) sent <= sent + 1;
    if (sent < to_send && !data_valid && rst_n && core_busy) n_stall++;
  end

  // ---- host on the bus clock ----------------------------------------------------
  task automatic start_job(logic mode, int count);
    @(negedge clk_bus);
    bus_cmd_mode  = mode;
    bus_cmd_count = 16'(count);
    bus_cmd_start = 1;
    @(negedge clk_bus);
    bus_cmd_start = 0;
    checks++;
    if (!bus_busy) begin failures++; $display("FAIL bus_busy not set"); end
    while (!bus_cmd_done) @(negedge clk_bus);
    n_cross++;
    @(negedge clk_bus);
    checks++;
    if (bus_busy) begin failures++; $display("FAIL bus_busy still set"); end
  endtask

  task automatic read_word(int addr, output logic [63:0] v);
    @(negedge clk_bus);
    bus_rd_addr = 8'(addr);
    @(negedge clk_bus);
    v = bus_rd_data;
    n_reads++;
  endtask

  task automatic kalyna_job(int n);
    rk_t         rk;
    st_t         key, e;
    logic [63:0] lo, hi;
    key = st_t'({$urandom, $urandom, $urandom, $urandom});
    if (n_kalyna > 0) n_rekey++;
    rk = keys_ref(key, 2);
    @(negedge clk_core);
    kalyna_key = key[127:0];
    for (int i = 0; i < n; i++) plain[i] = st_t'({$urandom, $urandom, $urandom, $urandom});
    sent    = 0;
    to_send = n;
    start_job(1'b0, n);
    n_kalyna++;
    for (int i = 0; i < n; i++) begin
      e = encrypt_ref(plain[i], rk, 2);
      read_word(2 * i, lo);
      read_word(2 * i + 1, hi);
      checks++;
      if ({hi, lo} !== e[127:0]) begin failures++; $display("FAIL block %0d: %h%h exp %h", i, hi, lo, e[127:0]); end
    end
    to_send = 0;
  endtask

  task automatic strumok_job(int n);
    strumok_state_t st;
    logic [63:0]    v, e;
    for (int i = 0; i < 16; i++) begin st.s[i] = {$urandom, $urandom}; strumok_init_state[i] = st.s[i]; end
    st.r1 = '0; st.r2 = '0;
    for (int i = 0; i < int'(strumok_pkg::INIT_STEPS); i++) void'(strumok_step(st, 1'b1));
    void'(strumok_step(st, 1'b0));
    start_job(1'b1, n);
    n_strumok++;
    for (int i = 0; i < n; i++) begin
      e = strumok_step(st, 1'b0);
      read_word(i, v);
      checks++;
      if (v !== e) begin failures++; $display("FAIL gamma word %0d: %h exp %h", i, v, e); end
    end
  endtask

  initial begin
    bus_cmd_start = 0; bus_cmd_mode = 0; bus_cmd_count = '0; bus_rd_addr = '0;
    kalyna_key = '0; data_block = '0; data_valid = 0; strumok_init_state = '0;
    repeat (3) @(negedge clk_bus);
    rst_n = 1;
    kalyna_job(16);
    strumok_job(256);
    kalyna_job(128);
    strumok_job(33);
    checks += 6;
    if (n_kalyna == 0) begin failures++; $display("FAIL no block-cipher job"); end
    if (n_strumok == 0) begin failures++; $display("FAIL no keystream job"); end
    if (n_rekey == 0) begin failures++; $display("FAIL no re-keying"); end
    if (n_stall == 0) begin failures++; $display("FAIL no plaintext stall"); end
    if (n_cross == 0) begin failures++; $display("FAIL no clock-domain crossing"); end
    if (n_reads == 0) begin failures++; $display("FAIL no RAM read"); end
    $display("mechanisms: kalyna jobs %0d, strumok jobs %0d, rekeys %0d, stall cycles %0d, crossings %0d, reads %0d",
             n_kalyna, n_strumok, n_rekey, n_stall, n_cross, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
