// aes_top: Rijndael/AES engine for a 256-bit data block and a 256-bit key
// (NB = NK = 8, NR = 14 rounds by default).
//
// The key schedule (aes_key_expansion) expands the cipher key once into a
// register file of NB*(NR+1) words; an encryption core and a decryption
// core both read it through their own round-key selectors. Each core is
// rolled: a single round, split by pipelining registers between its
// transformations, is reused for every round under a round counter.
//
// The structure follows the original description: key expansion and
// round-key selection feed a rolled, inner-pipelined round.
// Several choices are this design's own: decryption built next to
// encryption, the request handshake, and sizes set by parameters.
//
// Interface (all synchronous to clk, rst_n asynchronous active low):
//   key_load/key     load a new cipher key; taken only while nothing is busy.
//                    key_ready rises NW-NK = 112 clocks later.
//   start/decrypt/block_in
//                    start one block; taken only when key_ready is high and
//                    nothing is busy. decrypt = 0 encrypts, 1 decrypts.
//   done/block_out   done pulses 4*NR = 56 clocks after the edge that took
//                    start; block_out holds the result until the next start.
//   busy             a key expansion or a block is in progress.
// Which core drives block_out is remembered from the last accepted start.
module aes_top #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT,
  parameter int unsigned NK = aes_pkg::NK_DEFAULT,
  parameter int unsigned NR = aes_pkg::num_rounds(NB, NK),
  parameter int unsigned NW = NB * (NR + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             key_load,
  input  logic [NK*32-1:0] key,
  output logic             key_ready,
  input  logic             start,
  input  logic             decrypt,
  input  logic [NB*32-1:0] block_in,
  output logic             busy,
  output logic             done,
  output logic [NB*32-1:0] block_out
);

  logic [NW*32-1:0] round_keys;
  logic             kx_busy, enc_busy, dec_busy, enc_done, dec_done;
  logic             enc_start, dec_start, accept, mode_q;
  logic [NB*32-1:0] enc_out, dec_out;

  assign busy      = kx_busy | enc_busy | dec_busy;
  assign accept    = start && key_ready && !busy;
  assign enc_start = accept && !decrypt;
  assign dec_start = accept && decrypt;

  aes_key_expansion #(.NB(NB), .NK(NK), .NR(NR), .NW(NW)) u_keyexp (
    .clk, .rst_n,
    .load      (key_load && !busy),
    .key       (key),
    .busy      (kx_busy),
    .ready     (key_ready),
    .round_keys(round_keys)
  );

  aes_encrypt_core #(.NB(NB), .NK(NK), .NR(NR), .NW(NW)) u_enc (
    .clk, .rst_n,
    .start     (enc_start),
    .block_in  (block_in),
    .key_ready (key_ready),
    .round_keys(round_keys),
    .busy      (enc_busy),
    .done      (enc_done),
    .block_out (enc_out)
  );

  aes_decrypt_core #(.NB(NB), .NK(NK), .NR(NR), .NW(NW)) u_dec (
    .clk, .rst_n,
    .start     (dec_start),
    .block_in  (block_in),
    .key_ready (key_ready),
    .round_keys(round_keys),
    .busy      (dec_busy),
    .done      (dec_done),
    .block_out (dec_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      mode_q <= 1'b0;
    else if (accept) mode_q <= decrypt;
  end

  assign done      = enc_done | dec_done;
  assign block_out = mode_q ? dec_out : enc_out;

  a_one_core_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
    !(enc_busy && dec_busy));

endmodule
