// aes_round_key_select: picks the round key of one round out of the
// expanded key.
//
// Round r uses words w[r*NB .. r*NB+NB-1]; the selector is a plain
// multiplexer over the NR+1 round keys. An index above NR gives zero.
// Purely combinational.
//
// Round-key selection as a part of its own follows the original
// description; the multiplexer form is this design's choice.
//
// Interface: round_keys (NW*32 bits, w[0] most significant), round ->
// round_key (NB*32 bits, w[r*NB] most significant).
module aes_round_key_select #(
  parameter int unsigned NB = aes_pkg::NB_DEFAULT,
  parameter int unsigned NK = aes_pkg::NK_DEFAULT,
  parameter int unsigned NR = aes_pkg::num_rounds(NB, NK),
  parameter int unsigned NW = NB * (NR + 1),
  parameter int unsigned RW = $clog2(NR + 1)
) (
  input  logic [NW*32-1:0] round_keys,
  input  logic [RW-1:0]    round,
  output logic [NB*32-1:0] round_key
);

  always_comb begin
    round_key = '0;
    for (int r = 0; r <= NR; r++) begin
      if (round == RW'(r)) round_key = round_keys[NW*32-1-NB*32*r -: NB*32];
    end
  end

endmodule
