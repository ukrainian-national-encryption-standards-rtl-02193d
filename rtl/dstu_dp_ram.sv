// dstu_dp_ram: simple dual-port RAM that buffers cipher output words X(t)
// between the core clock domain and the bus clock domain.
//
// Port A writes (wr_en, wr_addr, wr_data) on wr_clk; port B reads on rd_clk
// with one cycle of latency: rd_data shows the word at rd_addr sampled on the
// previous rd_clk edge. Written as an array so that FPGA tools map it onto a
// block RAM. The contents are not reset; they start cleared so a read of an
// unwritten word is defined.
//
// The reference system names a dual-port RAM here; size and read latency are
// this design's choices.
module dstu_dp_ram #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    rd_data <= mem[rd_addr];
  end
endmodule
