// tb_strumok_keystream: loads random states, lets the generator initialise
// and compares 200 keystream words per load with the step-by-step model in
// kalyna_ref_pkg, while z_ready is dropped at random (the state must hold
// during a stall). Also checks the mode sequence: INIT for INIT_STEPS cycles,
// one WARM cycle, then GAMMA; and that a load in GAMMA restarts it.
module tb_strumok_keystream;
  import kalyna_ref_pkg::*;
  int checks = 0, failures = 0, stalls = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              load, z_ready, z_valid;
  logic [15:0][63:0] init_state;
  logic [63:0]       z;
  strumok_pkg::mode_e mode;

  strumok_keystream dut (.clk, .rst_n, .load, .init_state, .z_ready, .z_valid, .z, .mode);

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(int words);
    strumok_state_t st;
    logic [63:0]    e;
    int             init_cycles;
    for (int i = 0; i < 16; i++) begin
      st.s[i] = {$urandom, $urandom};
      init_state[i] = st.s[i];
    end
    st.r1 = '0;
    st.r2 = '0;
    for (int i = 0; i < int'(strumok_pkg::INIT_STEPS); i++) void'(strumok_step(st, 1'b1));
    void'(strumok_step(st, 1'b0));
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    init_cycles = 0;
    while (mode == strumok_pkg::MODE_INIT) begin @(negedge clk); init_cycles++; end
    checks++;
    if (init_cycles != int'(strumok_pkg::INIT_STEPS) || mode != strumok_pkg::MODE_WARM) begin
      failures++; $display("FAIL init took %0d cycles, then mode %0d", init_cycles, mode);
    end
    @(negedge clk);
    for (int n = 0; n < words; ) begin
      z_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (!z_ready) stalls++;
      checks++;
      if (!z_valid) begin failures++; $display("FAIL z_valid low in gamma mode"); end
      if (z_ready) begin
        e = strumok_step(st, 1'b0);
        checks++;
        if (z !== e) begin failures++; $display("FAIL word %0d: %h exp %h", n, z, e); end
        n++;
      end
      @(negedge clk);
    end
    z_ready = 0;
  endtask

  initial begin
    load = 0; z_ready = 0; init_state = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (z_valid) begin failures++; $display("FAIL z_valid out of reset"); end
    for (int k = 0; k < 4; k++) session(200);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
