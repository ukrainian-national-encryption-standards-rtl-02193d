// tb_dstu_pulse_sync: sends pulses from a slow clock to a fast one and from
// the fast to the slow (with the required spacing), and checks that every
// source pulse makes exactly one destination pulse within three destination
// cycles.
module tb_dstu_pulse_sync;
  int checks = 0, failures = 0;
  logic slow = 0, fast = 0, rst_n = 0;
  always #10 slow = ~slow;
  always #2.5 fast = ~fast;

  logic sp_a, dp_a, sp_b, dp_b;
  int   got_a = 0, got_b = 0;

  dstu_pulse_sync u_up   (.src_clk(slow), .src_rst_n(rst_n), .src_pulse(sp_a),
                          .dst_clk(fast), .dst_rst_n(rst_n), .dst_pulse(dp_a));
  dstu_pulse_sync u_down (.src_clk(fast), .src_rst_n(rst_n), .src_pulse(sp_b),
                          .dst_clk(slow), .dst_rst_n(rst_n), .dst_pulse(dp_b));

  always @(posedge fast) if (rst_n && dp_a) got_a++;
  always @(posedge slow) if (rst_n && dp_b) got_b++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sp_a = 0; sp_b = 0;
    repeat (2) @(negedge slow);
    rst_n = 1;
    for (int n = 1; n <= 20; n++) begin
      // slow -> fast
      @(negedge slow); sp_a = 1;
      @(negedge slow); sp_a = 0;
      repeat (2) @(negedge slow);
      checks++;
      if (got_a != n) begin failures++; $display("FAIL up: %0d pulses after %0d sent", got_a, n); end
      // fast -> slow
      @(negedge fast); sp_b = 1;
      @(negedge fast); sp_b = 0;
      repeat (4) @(negedge slow);
      checks++;
      if (got_b != n) begin failures++; $display("FAIL down: %0d pulses after %0d sent", got_b, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
