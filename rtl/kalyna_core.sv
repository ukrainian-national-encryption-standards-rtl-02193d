// kalyna_core: DSTU 7624:2014 block-encryption IP core, key deployment plus
// encryption, for a block of 64*NB bits and a key of 64*NK bits, NK = NB or
// 2*NB (default NB = NK = 2: 128-bit block and key, 10 rounds).
//
// key_load with key starts the round-key schedule (kalyna_key_expand);
// in_ready is high once the keys are ready and the encryption datapath
// (kalyna_encrypt) is idle. A block offered with in_valid while in_ready is
// taken, and its ciphertext appears on block_out with a one-cycle out_valid
// NR cycles later. Loading a new key while a block is in flight is not
// allowed (the assertion below checks it).
//
// The valid/ready interface and the separate round units for key schedule and
// encryption are this design's choices.
module kalyna_core #(
  parameter int unsigned NB = 2,
  parameter int unsigned NK = NB,
  parameter int unsigned NR = kalyna_pkg::rounds_for(NK)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_load,
  input  logic [NK-1:0][63:0] key,
  output logic                key_ready,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [NB-1:0][63:0] block_in,
  output logic                out_valid,
  output logic [NB-1:0][63:0] block_out
);
  logic                      ks_busy, enc_busy;
  logic [NR:0][NB-1:0][63:0] round_keys;

  kalyna_key_expand #(.NB(NB), .NK(NK), .NR(NR)) u_keys (
    .clk, .rst_n, .key_load, .key,
    .busy(ks_busy), .key_ready, .round_keys
  );

  assign in_ready = key_ready && !ks_busy && !enc_busy && !key_load;

  kalyna_encrypt #(.NB(NB), .NR(NR)) u_enc (
    .clk, .rst_n,
    .start(in_valid && in_ready), .block_in, .round_keys,
    .busy(enc_busy), .done(out_valid), .block_out
  );

  a_no_rekey_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    !(key_load && enc_busy));
endmodule
