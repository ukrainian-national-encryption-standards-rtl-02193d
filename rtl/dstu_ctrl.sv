// dstu_ctrl: control logic that runs one of the two cipher cores for a job
// and stores its output words in the result RAM.
//
// A job starts with cmd_start (one cycle, core clock) and uses cmd_mode and
// cmd_count, which must hold until cmd_done:
//  * MODE_KALYNA: pulse key_load, wait for key_ready, then pass cmd_count
//    blocks from the data stream (data_valid / data_ready) to the block
//    cipher; each ciphertext is written to the RAM as NB 64-bit words,
//    column 0 first, at consecutive addresses from 0.
//  * MODE_STRUMOK: pulse load, wait for the keystream generator to reach
//    gamma mode, then take cmd_count keystream words, one per cycle, and
//    write them to RAM addresses 0 .. cmd_count-1.
// cmd_done pulses for one cycle when the last word is written; busy is high
// from cmd_start to cmd_done. cmd_count must be at least 1. Addresses wrap
// at the RAM depth.
//
// The reference system names the control logic only; the whole job protocol
// is this design's own.
module dstu_ctrl #(
  parameter int unsigned NB = 2,
  parameter int unsigned AW = 8,
  parameter int unsigned CW = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // job
  input  logic                cmd_start,
  input  logic                cmd_mode,       // 0: Kalyna, 1: Strumok
  input  logic [CW-1:0]       cmd_count,
  output logic                cmd_done,
  output logic                busy,
  // data stream towards the block cipher
  input  logic                data_valid,
  output logic                data_ready,
  // block cipher
  output logic                k_key_load,
  input  logic                k_key_ready,
  output logic                k_in_valid,
  input  logic                k_in_ready,
  input  logic                k_out_valid,
  input  logic [NB-1:0][63:0] k_block_out,
  // keystream generator
  output logic                s_load,
  input  logic                s_z_valid,
  output logic                s_z_ready,
  input  logic [63:0]         s_z,
  // result RAM write port
  output logic                ram_wr_en,
  output logic [AW-1:0]       ram_wr_addr,
  output logic [63:0]         ram_wr_data
);
  localparam logic MODE_KALYNA  = 1'b0;
  localparam logic MODE_STRUMOK = 1'b1;

  typedef enum logic [2:0] {IDLE, K_KEY, K_RUN, S_INIT, S_RUN} state_e;

  state_e                    state;
  logic [CW-1:0]             taken, stored;     // blocks sent / blocks or words written
  logic [NB-1:0][63:0]       hold;              // ciphertext being written out
  logic [$clog2(NB+1)-1:0]   words_left;
  logic [AW-1:0]             addr;
  logic                      launched;

  // ---- combinational outputs ---------------------------------------------
  always_comb begin
    data_ready  = (state == K_RUN) && (taken != cmd_count) && k_in_ready;
    k_in_valid  = (state == K_RUN) && (taken != cmd_count) && data_valid;
    s_z_ready   = (state == S_RUN);
    ram_wr_en   = 1'b0;
    ram_wr_data = s_z;
    if (state == S_RUN && s_z_valid) ram_wr_en = 1'b1;
    if (state == K_RUN && words_left != 0) begin
      ram_wr_en   = 1'b1;
      ram_wr_data = hold[NB - 32'(words_left)];
    end
    ram_wr_addr = addr;
    busy        = (state != IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= IDLE;
      taken          <= '0;
      stored         <= '0;
      hold           <= '0;
      words_left     <= '0;
      addr           <= '0;
      cmd_done       <= 1'b0;
      k_key_load     <= 1'b0;
      s_load         <= 1'b0;
      launched <= 1'b0;
    end else begin
      cmd_done   <= 1'b0;
      k_key_load <= 1'b0;
      s_load     <= 1'b0;
      if (ram_wr_en) addr <= addr + 1'b1;
      case (state)
        IDLE: if (cmd_start) begin
          taken          <= '0;
          stored         <= '0;
          words_left     <= '0;
          addr           <= '0;
          launched <= 1'b0;
          if (cmd_mode == MODE_KALYNA) begin
            state      <= K_KEY;
            k_key_load <= 1'b1;
          end else begin
            state  <= S_INIT;
            s_load <= 1'b1;
          end
        end
        K_KEY: begin
          // key_ready drops in the cycle after key_load; wait one cycle first
          launched <= 1'b1;
          if (launched && k_key_ready) state <= K_RUN;
        end
        K_RUN: begin
          if (k_in_valid && k_in_ready) taken <= taken + 1'b1;
          if (words_left != 0) words_left <= words_left - 1'b1;
          if (k_out_valid) begin
            hold       <= k_block_out;
            words_left <= ($clog2(NB+1))'(NB);
            stored     <= stored + 1'b1;
          end
          if (words_left == 1 && stored == cmd_count && !k_out_valid) begin
            state    <= IDLE;
            cmd_done <= 1'b1;
          end
        end
        S_INIT: begin
          // z_valid of a previous job drops in the cycle after load
          launched <= 1'b1;
          if (launched && s_z_valid) state <= S_RUN;
        end
        S_RUN: if (s_z_valid) begin
          stored <= stored + 1'b1;
          if (stored + 1'b1 == cmd_count) begin
            state    <= IDLE;
            cmd_done <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a new ciphertext must not arrive while the previous one is still being
  // written out (NB words take NB cycles, a block takes NR cycles)
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (state == K_RUN && k_out_valid) |-> (words_left <= 1));
endmodule
