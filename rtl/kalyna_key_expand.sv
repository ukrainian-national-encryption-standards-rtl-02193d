// kalyna_key_expand: round-key generation ("key deployment") of
// DSTU 7624:2014, for a key as long as the block (NK = NB) or twice as long
// (NK = 2*NB).
//
// The key is split into K_a (words 0..NB-1) and K_b (words NK-NB..NK-1);
// both are the whole key when NK = NB. An FSM drives one shared round unit
// (kalyna_round) through two phases:
//  * KT, 3 cycles: the intermediate key Kt is three rounds applied to the
//    constant word NB+NK+1, with K_a added modulo 2^64 before the first
//    round, K_b XORed before the second and K_a added before the third.
//  * EVEN, 2 cycles per even key K_2j, j = 0..NR/2: with ktr = Kt + tmv_j
//    (per 64-bit column, modulo 2^64) an NB-word slice of the key words is
//    added to ktr, passes a round, is XORed with ktr, passes a second round
//    and is added to ktr again. tmv_0 has every 64-bit word
//    0x0001000100010001, and each even key shifts every word left by one
//    bit. With NK = NB the key words rotate by one word position after each
//    even key; with NK = 2*NB the even keys alternate between the low and the
//    high half of the key words, which rotate by one word after each high
//    half. The odd key K_2j+1 is K_2j rotated by 2*NB+3 bytes (byte i of the
//    new key is byte i+2NB+3 of the old one), written with K_2j.
// A key_load pulse latches key and restarts the schedule; key_ready rises
// 3 + 2*(NR/2+1) cycles later and the NR+1 keys then stay on round_keys
// until the next load. busy is high while the schedule runs.
//
// The three-round phases follow the standard's key schedule; the cycle counts,
// the single shared round unit and the register file of keys are this
// design's choices.
module kalyna_key_expand #(
  parameter int unsigned NB = 2,
  parameter int unsigned NK = NB,   // NB or 2*NB
  parameter int unsigned NR = kalyna_pkg::rounds_for(NK)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       key_load,
  input  logic [NK-1:0][63:0]        key,
  output logic                       busy,
  output logic                       key_ready,
  output logic [NR:0][NB-1:0][63:0]  round_keys
);
  import kalyna_pkg::*;

  localparam int unsigned NBYTES = 8 * NB;
  localparam int unsigned ROT    = 2 * NB + 3;
  localparam int unsigned JW     = $clog2(NR / 2 + 1) + 1;

  typedef enum logic [1:0] {IDLE, KT, EVEN} phase_e;

  phase_e              phase;
  logic [1:0]          step;
  logic [JW-1:0]       j;
  logic                hi;                  // NK = 2*NB: high key half in use
  logic [NK-1:0][63:0] k_master, k_rot;
  logic [NB-1:0][63:0] s, kt, tmv, k_a, k_b, k_slice;

  assign k_a     = k_master[NB-1:0];
  assign k_b     = k_master[NK-1:NK-NB];
  assign k_slice = hi ? k_rot[NK-1:NK-NB] : k_rot[NB-1:0];

  // ---- datapath -----------------------------------------------------------
  logic [NB-1:0][63:0] ktr, pre_a, pre_b, round_in, round_out, key_even, key_odd;
  key_op_e             pre_op;

  kalyna_key_add #(.NB(NB)) u_ktr (
    .op(KEY_ADD), .state_in(kt), .key(tmv), .state_out(ktr)
  );

  always_comb begin
    pre_a  = s;
    pre_b  = k_a;
    pre_op = KEY_ADD;
    if (phase == KT) begin
      if (step == 2'd1) begin
        pre_op = KEY_XOR;
        pre_b  = k_b;
      end
    end else begin
      pre_b  = ktr;
      if (step == 2'd0) pre_a = k_slice;
      else              pre_op = KEY_XOR;
    end
  end

  kalyna_key_add #(.NB(NB)) u_pre (
    .op(pre_op), .state_in(pre_a), .key(pre_b), .state_out(round_in)
  );

  kalyna_round #(.NB(NB)) u_round (.state_in(round_in), .state_out(round_out));

  kalyna_key_add #(.NB(NB)) u_post (
    .op(KEY_ADD), .state_in(round_out), .key(ktr), .state_out(key_even)
  );

  always_comb begin
    for (int i = 0; i < int'(NBYTES); i++)
      key_odd[(i / 8)][8*(i % 8) +: 8] =
        key_even[((i + ROT) % NBYTES) / 8][8*(((i + ROT) % NBYTES) % 8) +: 8];
  end

  // ---- control ------------------------------------------------------------
  logic last_even;
  assign last_even = (32'(j) * 2 == NR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= IDLE;
      step       <= '0;
      j          <= '0;
      hi         <= 1'b0;
      key_ready  <= 1'b0;
      k_master   <= '0;
      k_rot      <= '0;
      s          <= '0;
      kt         <= '0;
      tmv        <= '0;
      round_keys <= '0;
    end else if (key_load) begin
      phase     <= KT;
      step      <= '0;
      key_ready <= 1'b0;
      k_master  <= key;
      s         <= '0;
      s[0]      <= {32'd0, 32'(NB + NK + 1)};      // const = Nb + Nk + 1
    end else begin
      case (phase)
        KT: begin
          s    <= round_out;
          step <= step + 2'd1;
          if (step == 2'd2) begin
            kt    <= round_out;
            phase <= EVEN;
            step  <= '0;
            j     <= '0;
            hi    <= 1'b0;
            k_rot <= k_master;
            for (int c = 0; c < int'(NB); c++) tmv[c] <= TMV0_WORD;
          end
        end
        EVEN: begin
          if (step == 2'd0) begin
            s    <= round_out;
            step <= 2'd1;
          end else begin
            round_keys[2*j] <= key_even;
            if (!last_even) round_keys[2*j+1] <= key_odd;
            step <= '0;
            if (last_even) begin
              phase     <= IDLE;
              key_ready <= 1'b1;
            end else begin
              j <= j + 1'b1;
              for (int c = 0; c < int'(NB); c++) tmv[c] <= tmv[c] << 1;
              if (NK == NB || hi) begin
                for (int c = 0; c < int'(NK); c++) k_rot[c] <= k_rot[(c + 1) % NK];
              end
              if (NK != NB) hi <= ~hi;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign busy = (phase != IDLE);
endmodule
