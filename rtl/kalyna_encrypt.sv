// kalyna_encrypt: iterative DSTU 7624:2014 encryption, one round per clock.
//
// On start (accepted when not busy) the plaintext is whitened with K_0 by
// per-column addition modulo 2^64 and registered. Each of the next NR cycles
// passes the state through one combinational round (SubBytes, ShiftRows,
// MixColumns); rounds 1..NR-1 XOR in K_i, round NR adds K_NR modulo 2^64 and
// registers the ciphertext. done pulses for one cycle together with the new
// block_out, NR cycles after the cycle in which start was taken; block_out
// then holds until the next result. Round keys come from kalyna_key_expand
// and must stay stable while busy.
//
// The round sequence follows the standard; the start/done interface and the
// NR-cycle latency are this design's choices.
module kalyna_encrypt #(
  parameter int unsigned NB = 2,
  parameter int unsigned NR = kalyna_pkg::rounds_for(NB)   // set by the key size
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [NB-1:0][63:0]        block_in,
  input  logic [NR:0][NB-1:0][63:0]  round_keys,
  output logic                       busy,
  output logic                       done,
  output logic [NB-1:0][63:0]        block_out
);
  import kalyna_pkg::*;

  localparam int unsigned RW = $clog2(NR + 1);

  logic [NB-1:0][63:0] s, whitened, round_out, keyed;
  logic [RW-1:0]       rnd;
  logic                last;

  assign last = (32'(rnd) == NR);

  kalyna_key_add #(.NB(NB)) u_white (
    .op(KEY_ADD), .state_in(block_in), .key(round_keys[0]), .state_out(whitened)
  );

  kalyna_round #(.NB(NB)) u_round (.state_in(s), .state_out(round_out));

  kalyna_key_add #(.NB(NB)) u_key (
    .op(last ? KEY_ADD : KEY_XOR), .state_in(round_out), .key(round_keys[rnd]),
    .state_out(keyed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      rnd       <= '0;
      s         <= '0;
      block_out <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          s    <= whitened;
          rnd  <= RW'(1);
          busy <= 1'b1;
        end
      end else if (last) begin
        block_out <= keyed;
        done      <= 1'b1;
        busy      <= 1'b0;
      end else begin
        s   <= keyed;
        rnd <= rnd + 1'b1;
      end
    end
  end
endmodule
