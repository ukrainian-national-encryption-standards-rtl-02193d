// tb_dstu_ctrl: the control logic driving the real cipher cores. Jobs of both
// kinds are started back to back; every RAM write is captured and compared
// with the reference models (ciphertext columns in order for a block-cipher
// job, keystream words for a generator job), the plaintext stream is stalled
// at random, and cmd_done must come once per job after the last write.
module tb_dstu_ctrl;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              cmd_start, cmd_mode, cmd_done, busy, data_valid, data_ready;
  logic [15:0]       cmd_count;
  logic              k_key_load, k_key_ready, k_in_valid, k_in_ready, k_out_valid;
  logic [1:0][63:0]  k_block_out, key, block;
  logic              s_load, s_z_valid, s_z_ready;
  logic [63:0]       s_z;
  logic [15:0][63:0] init_state;
  logic              ram_wr_en;
  logic [7:0]        ram_wr_addr;
  logic [63:0]       ram_wr_data;
  strumok_pkg::mode_e mode;

  logic [63:0] ram [256];
  int          writes;

  dstu_ctrl #(.NB(2), .AW(8), .CW(16)) dut (
    .clk, .rst_n, .cmd_start, .cmd_mode, .cmd_count, .cmd_done, .busy,
    .data_valid, .data_ready,
    .k_key_load, .k_key_ready, .k_in_valid, .k_in_ready, .k_out_valid, .k_block_out,
    .s_load, .s_z_valid, .s_z_ready, .s_z,
    .ram_wr_en, .ram_wr_addr, .ram_wr_data
  );
  kalyna_core u_k (.clk, .rst_n, .key_load(k_key_load), .key, .key_ready(k_key_ready),
                   .in_valid(k_in_valid), .in_ready(k_in_ready), .block_in(block),
                   .out_valid(k_out_valid), .block_out(k_block_out));
  strumok_keystream u_s (.clk, .rst_n, .load(s_load), .init_state, .z_ready(s_z_ready),
                         .z_valid(s_z_valid), .z(s_z), .mode);

  always @(posedge clk) if (ram_wr_en) begin ram[ram_wr_addr] <= ram_wr_data; writes++; end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic kalyna_job(int n);
    rk_t rk;
    st_t blocks [64];
    int  sent;
    key = {$urandom, $urandom, $urandom, $urandom};
    rk  = keys_ref(st_t'(key), 2);
    for (int i = 0; i < n; i++) blocks[i] = st_t'({$urandom, $urandom, $urandom, $urandom});
    writes = 0;
    @(negedge clk);
    cmd_mode = 0; cmd_count = 16'(n); cmd_start = 1;
    @(negedge clk);
    cmd_start = 0;
    sent = 0;
    while (!cmd_done) begin
      // offer the next block, with random gaps
      data_valid = (sent < n) && ($urandom_range(0, 2) != 0);
      block      = blocks[sent][127:0];
      @(posedge clk);
      if (data_valid && data_ready) sent++;
      @(negedge clk);
    end
    data_valid = 0;
    @(negedge clk);
    checks++;
    if (writes != 2 * n || busy) begin failures++; $display("FAIL kalyna job: %0d writes, busy %0d", writes, busy); end
    for (int i = 0; i < n; i++) begin
      st_t e = encrypt_ref(blocks[i], rk, 2);
      checks++;
      if (ram[2*i] !== e[63:0] || ram[2*i+1] !== e[127:64]) begin
        failures++; $display("FAIL block %0d: %h %h exp %h", i, ram[2*i+1], ram[2*i], e[127:0]);
      end
    end
  endtask

  task automatic strumok_job(int n);
    strumok_state_t st;
    for (int i = 0; i < 16; i++) begin st.s[i] = {$urandom, $urandom}; init_state[i] = st.s[i]; end
    st.r1 = '0; st.r2 = '0;
    for (int i = 0; i < 32; i++) void'(strumok_step(st, 1'b1));
    void'(strumok_step(st, 1'b0));
    writes = 0;
    @(negedge clk);
    cmd_mode = 1; cmd_count = 16'(n); cmd_start = 1;
    @(negedge clk);
    cmd_start = 0;
    while (!cmd_done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (writes != n) begin failures++; $display("FAIL strumok job: %0d writes", writes); end
    for (int i = 0; i < n; i++) begin
      logic [63:0] e = strumok_step(st, 1'b0);
      checks++;
      if (ram[i] !== e) begin failures++; $display("FAIL word %0d: %h exp %h", i, ram[i], e); end
    end
  endtask

  initial begin
    cmd_start = 0; cmd_mode = 0; cmd_count = '0; data_valid = 0; key = '0; block = '0;
    init_state = '0; writes = 0;
    for (int i = 0; i < 256; i++) ram[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    kalyna_job(5);
    strumok_job(40);
    strumok_job(7);
    kalyna_job(12);
    kalyna_job(1);
    strumok_job(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
