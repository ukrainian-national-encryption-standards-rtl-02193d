// strumok_keystream: the DSTU 8845:2019 keystream ("gamma") generator.
//
// State: sixteen 64-bit LFSR cells s_0..s_15 and the two FSM registers r1, r2.
// One step, in one clock:
//   fsm_out = (s_15 + r1 mod 2^64) ^ r2
//   fb      = alpha * s_0  ^  alpha^-1 * s_11  ^  s_13   [ ^ fsm_out in INIT ]
//   s_i <= s_(i+1) (i < 15),  s_15 <= fb
//   r2  <= T(r1),  r1 <= r2 + s_13 mod 2^64
//   z    = fsm_out ^ s_0            (keystream word of this step)
// A mode FSM runs the register: load (a one-cycle pulse) writes s_0..s_15
// from init_state and clears r1, r2; then INIT_STEPS steps with fsm_out
// XORed into the feedback; then one plain step whose output is dropped;
// then GAMMA, where z_valid is high and each cycle with z_ready moves one word
// out and advances the state (z_ready low stalls the generator). Expanding
// the key and IV into init_state is left to the caller.
//
// The step equations follow the standard; loading a ready-made state, the
// WARM step as a separate mode and the z_ready stall are this design's
// choices.
module strumok_keystream #(
  parameter int unsigned INIT_STEPS = strumok_pkg::INIT_STEPS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [15:0][63:0] init_state,   // [i] = s_i
  input  logic              z_ready,
  output logic              z_valid,
  output logic [63:0]       z,
  output strumok_pkg::mode_e mode
);
  import strumok_pkg::*;

  localparam int unsigned CW = $clog2(INIT_STEPS + 1);

  logic [15:0][63:0] s;
  logic [63:0]       r1, r2;
  logic [CW-1:0]     count;

  logic [63:0] fsm_out, a_s0, ainv_s11, t_r1, fb;
  logic        step;

  strumok_alpha_mul #(.INVERSE(1'b0)) u_alpha     (.w(s[0]),  .p(a_s0));
  strumok_alpha_mul #(.INVERSE(1'b1)) u_alpha_inv (.w(s[11]), .p(ainv_s11));
  strumok_t                            u_t         (.w(r1),    .t(t_r1));

  always_comb begin
    fsm_out = (s[15] + r1) ^ r2;
    fb      = a_s0 ^ ainv_s11 ^ s[13];
    if (mode == MODE_INIT) fb ^= fsm_out;
    z       = fsm_out ^ s[0];
    z_valid = (mode == MODE_GAMMA);
    step    = (mode == MODE_INIT) || (mode == MODE_WARM) ||
              (mode == MODE_GAMMA && z_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode  <= MODE_IDLE;
      count <= '0;
      s     <= '0;
      r1    <= '0;
      r2    <= '0;
    end else if (load) begin
      mode  <= MODE_INIT;
      count <= '0;
      s     <= init_state;
      r1    <= '0;
      r2    <= '0;
    end else begin
      if (step) begin
        for (int i = 0; i < 15; i++) s[i] <= s[i+1];
        s[15] <= fb;
        r1    <= r2 + s[13];
        r2    <= t_r1;
      end
      case (mode)
        MODE_INIT: begin
          count <= count + 1'b1;
          if (32'(count) == INIT_STEPS - 1) mode <= MODE_WARM;
        end
        MODE_WARM: mode <= MODE_GAMMA;
        default: ;
      endcase
    end
  end
endmodule
