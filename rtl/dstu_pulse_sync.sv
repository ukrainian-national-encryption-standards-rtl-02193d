// dstu_pulse_sync: carries a one-cycle pulse from one clock domain to another.
//
// Each source pulse flips a toggle flop; the toggle crosses into the
// destination domain through two synchronising flops, and a change seen on
// the synchronised toggle makes one destination-clock pulse. Latency is two
// to three destination cycles. Source pulses must be at least three
// destination cycles apart to be seen separately.
//
// The reference system names a synchroniser here; the toggle scheme is this
// design's choice.
module dstu_pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic       toggle;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     toggle <= 1'b0;
    else if (src_pulse) toggle <= ~toggle;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], toggle};
  end

  assign dst_pulse = sync[2] ^ sync[1];
endmodule
