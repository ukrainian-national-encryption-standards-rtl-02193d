// dstu_crypto_top: FPGA side of the encryption system built around the two
// Ukrainian cipher cores: the DSTU 7624:2014 block cipher (kalyna_core) and
// the DSTU 8845:2019 keystream generator (strumok_keystream).
//
// Two clock domains. The cores, the control logic (dstu_ctrl) and the write
// port of the result RAM (dstu_dp_ram) run on clk_core (200 MHz in the
// reference system, made by a PLL outside this module). The host side - a
// processor behind a memory-mapped bridge - runs on clk_bus (50 MHz): it
// starts a job with a one-cycle bus_cmd_start, holding bus_cmd_mode and
// bus_cmd_count stable until bus_cmd_done, and reads the output words from
// the RAM through bus_rd_addr / bus_rd_data (one bus cycle of latency).
// The start and done pulses cross the domains through dstu_pulse_sync.
//
// Job inputs come in on the core clock: kalyna_key and the plaintext
// stream (data_valid / data_ready / data_block) for a block-cipher job,
// strumok_init_state for a keystream job. rst_n resets both domains
// asynchronously; it must be released synchronously to each clock.
//
// The block structure follows the reference system; all interfaces of the
// top are this design's own.
module dstu_crypto_top #(
  parameter int unsigned NB        = 2,     // Kalyna block = 64*NB bits
  parameter int unsigned NK        = NB,    // Kalyna key = 64*NK bits (NB or 2*NB)
  parameter int unsigned RAM_DEPTH = 256,   // 64-bit words
  parameter int unsigned CW        = 16     // job length counter width
) (
  input  logic                    clk_core,
  input  logic                    clk_bus,
  input  logic                    rst_n,
  // host side (clk_bus)
  input  logic                    bus_cmd_start,
  input  logic                    bus_cmd_mode,     // 0: DSTU 7624, 1: DSTU 8845
  input  logic [CW-1:0]           bus_cmd_count,    // blocks or keystream words
  output logic                    bus_cmd_done,
  output logic                    bus_busy,
  input  logic [$clog2(RAM_DEPTH)-1:0] bus_rd_addr,
  output logic [63:0]             bus_rd_data,
  // job data (clk_core)
  input  logic [NK-1:0][63:0]     kalyna_key,
  input  logic                    data_valid,
  output logic                    data_ready,
  input  logic [NB-1:0][63:0]     data_block,
  input  logic [15:0][63:0]       strumok_init_state,
  // status (clk_core)
  output logic                    core_busy,
  output strumok_pkg::mode_e      strumok_mode
);
  localparam int unsigned AW = $clog2(RAM_DEPTH);

  logic cmd_start, cmd_done;

  dstu_pulse_sync u_sync_start (
    .src_clk(clk_bus), .src_rst_n(rst_n), .src_pulse(bus_cmd_start),
    .dst_clk(clk_core), .dst_rst_n(rst_n), .dst_pulse(cmd_start)
  );
  dstu_pulse_sync u_sync_done (
    .src_clk(clk_core), .src_rst_n(rst_n), .src_pulse(cmd_done),
    .dst_clk(clk_bus), .dst_rst_n(rst_n), .dst_pulse(bus_cmd_done)
  );

  // host-visible busy: set by the host's start, cleared by the returning done
  always_ff @(posedge clk_bus or negedge rst_n) begin
    if (!rst_n)             bus_busy <= 1'b0;
    else if (bus_cmd_start) bus_busy <= 1'b1;
    else if (bus_cmd_done)  bus_busy <= 1'b0;
  end

  // ---- cores ----------------------------------------------------------------
  logic                k_key_load, k_key_ready, k_in_valid, k_in_ready, k_out_valid;
  logic [NB-1:0][63:0] k_block_out;
  logic                s_load, s_z_valid, s_z_ready;
  logic [63:0]         s_z;

  kalyna_core #(.NB(NB), .NK(NK)) u_kalyna (
    .clk(clk_core), .rst_n,
    .key_load(k_key_load), .key(kalyna_key), .key_ready(k_key_ready),
    .in_valid(k_in_valid), .in_ready(k_in_ready), .block_in(data_block),
    .out_valid(k_out_valid), .block_out(k_block_out)
  );

  strumok_keystream u_strumok (
    .clk(clk_core), .rst_n,
    .load(s_load), .init_state(strumok_init_state),
    .z_ready(s_z_ready), .z_valid(s_z_valid), .z(s_z), .mode(strumok_mode)
  );

  // ---- control and result buffer -------------------------------------------
  logic          ram_wr_en;
  logic [AW-1:0] ram_wr_addr;
  logic [63:0]   ram_wr_data;

  dstu_ctrl #(.NB(NB), .AW(AW), .CW(CW)) u_ctrl (
    .clk(clk_core), .rst_n,
    .cmd_start, .cmd_mode(bus_cmd_mode), .cmd_count(bus_cmd_count), .cmd_done,
    .busy(core_busy),
    .data_valid, .data_ready,
    .k_key_load, .k_key_ready, .k_in_valid, .k_in_ready, .k_out_valid, .k_block_out,
    .s_load, .s_z_valid, .s_z_ready, .s_z,
    .ram_wr_en, .ram_wr_addr, .ram_wr_data
  );

  dstu_dp_ram #(.WIDTH(64), .DEPTH(RAM_DEPTH)) u_ram (
    .wr_clk(clk_core), .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data),
    .rd_clk(clk_bus), .rd_addr(bus_rd_addr), .rd_data(bus_rd_data)
  );
endmodule
